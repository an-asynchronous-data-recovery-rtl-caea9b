`timescale 1ps/1fs
// tb_retimer: feeds random data that changes at random instants, away from
// the clock edge, and checks that the output equals the input sampled at the
// previous rising clock edge, that it holds between edges regardless of the
// input, and that valid follows the enable with one clock of latency.
module tb_retimer;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, din = 1'b0;
  logic dout, valid;
  logic exp_d, exp_v;
  int checks = 0, failures = 0;

  retimer dut (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(dout), .valid(valid));

  always #470 clk = ~clk;

  initial begin
    #10 rst_n = 1'b0;
    #20;
    checks++;
    if (dout !== 1'b0 || valid !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    repeat (2000) begin
      @(posedge clk);
      exp_d = en ? din : 1'b0;
      exp_v = en;
      #100 din = $urandom_range(1); en = ($urandom_range(4) != 0);
      #300 din = $urandom_range(1);
      checks++;
      if (dout !== exp_d || valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL dout=%b valid=%b expected %b %b", dout, valid, exp_d, exp_v);
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
