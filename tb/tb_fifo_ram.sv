`timescale 1ps/1fs
// tb_fifo_ram: writes bursts of 1..10 random bits at a moving address, as the
// load side does, keeps its own copy of the buffer, and after every burst
// reads back random locations that have been written, plus every location of
// the burst just written, comparing with the copy. Bits beyond the burst
// count must leave memory unchanged.
module tb_fifo_ram;
  localparam int DEPTH = 128, NB = 10, AW = 7;
  logic wr_clk = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [NB-1:0] wbits = '0;
  logic [3:0] wcount = '0;
  logic rbit;
  logic model [DEPTH];
  logic written [DEPTH];
  int checks = 0, failures = 0;

  fifo_ram #(.DEPTH(DEPTH), .NBITS(NB)) dut (
    .wr_clk(wr_clk), .waddr(waddr), .wbits(wbits), .wcount(wcount), .raddr(raddr), .rbit(rbit));

  task automatic rd(input int a);
    raddr = AW'(a);
    #1;
    checks++;
    if (rbit !== model[a]) begin
      failures++;
      if (failures < 10) $display("FAIL addr %0d read %b expected %b", a, rbit, model[a]);
    end
  endtask

  initial begin
    automatic int ptr = 0;
    foreach (written[i]) written[i] = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      wcount = 4'($urandom_range(NB, 1));
      wbits  = NB'($urandom);
      waddr  = AW'(ptr);
      #10 wr_clk = 1'b1;
      for (int j = 0; j < int'(wcount); j++) begin
        model[(ptr + j) % DEPTH] = wbits[j];
        written[(ptr + j) % DEPTH] = 1'b1;
      end
      #10 wr_clk = 1'b0;
      for (int j = 0; j < int'(wcount); j++) rd((ptr + j) % DEPTH);
      ptr = (ptr + int'(wcount)) % DEPTH;
      for (int k = 0; k < 4; k++) begin
        automatic int a = $urandom_range(DEPTH - 1);
        if (written[a]) rd(a);
      end
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
