`timescale 1ps/1fs
// tb_load_pointer: applies random read counts (1..10) and checks the pointer
// against a running sum kept here, the coarse output against the Gray code
// of sum/16 computed here, and that the coarse Gray value never changes in
// more than one bit per read (the property that lets it cross clock
// domains). Reset is checked at the start and after a second reset.
module tb_load_pointer;
  localparam int DEPTH = 128, NB = 10, SH = 4, PW = 8;
  logic wr_clk = 1'b0, rst_n = 1'b1;
  logic [3:0] count = '0;
  logic [PW-1:0] ptr;
  logic [PW-SH-1:0] coarse_gray, prev_gray, g_exp;
  int checks = 0, failures = 0;
  int sum;

  load_pointer #(.DEPTH(DEPTH), .NBITS(NB), .GRAN_SH(SH)) dut (
    .wr_clk(wr_clk), .rst_n(rst_n), .count(count), .ptr(ptr), .coarse_gray(coarse_gray));

  task automatic check_state();
    logic [PW-SH-1:0] c;
    c = PW'(sum) >> SH;
    g_exp = c ^ (c >> 1);
    checks++;
    if (ptr !== PW'(sum) || coarse_gray !== g_exp) begin
      failures++;
      if (failures < 10) $display("FAIL ptr=%0d expected %0d gray=%b expected %b", ptr, PW'(sum), coarse_gray, g_exp);
    end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    sum = 0;
    check_state();
    prev_gray = coarse_gray;
    for (int i = 0; i < 2000; i++) begin
      count = 4'($urandom_range(NB, 1));
      #100 wr_clk = 1'b1;
      sum += int'(count);
      #100 wr_clk = 1'b0;
      check_state();
      checks++;
      if ($countones(coarse_gray ^ prev_gray) > 1) begin
        failures++; $display("FAIL gray step %b -> %b", prev_gray, coarse_gray);
      end
      prev_gray = coarse_gray;
    end
    rst_n = 1'b0; sum = 0;
    #10 check_state();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
