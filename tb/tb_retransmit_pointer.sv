`timescale 1ps/1fs
// tb_retransmit_pointer: random enable and load on a free-running clock; the
// pointer is compared every cycle with a model counter kept here (load wins
// over enable, wrap at 2*DEPTH).
module tb_retransmit_pointer;
  localparam int DEPTH = 128, PW = 8;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, load = 1'b0;
  logic [PW-1:0] load_val = '0, ptr;
  int checks = 0, failures = 0;
  int model;

  retransmit_pointer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .load_val(load_val), .ptr(ptr));

  always #470 clk = ~clk;

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    model = 0;
    repeat (3000) begin
      @(negedge clk);
      checks++;
      if (ptr !== PW'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL ptr=%0d expected %0d", ptr, PW'(model));
      end
      en = ($urandom_range(3) != 0);
      load = ($urandom_range(40) == 0);
      load_val = PW'($urandom);
      @(posedge clk);
      if (load) model = int'(load_val);
      else if (en) model = (model + 1) % (2 * DEPTH);
    end
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
