`timescale 1ps/1fs
// tb_sample_latch: drives random tap vectors and read pulses and checks that
// the latch holds, for every bit m, tap (4m+1) as it was at the rising edge
// of the read pulse, that it ignores tap changes between pulses, and that
// reset clears it.
module tb_sample_latch;
  localparam int NB = 10, TPB = 4;
  logic read_pulse = 1'b0, rst_n = 1'b1;
  logic [NB*TPB-1:0] tap = '0;
  logic [NB-1:0] smp, expect_smp;
  int checks = 0, failures = 0;

  sample_latch #(.NBITS(NB), .TPB(TPB)) dut (.read_pulse(read_pulse), .rst_n(rst_n), .tap(tap), .smp(smp));

  initial begin
    tap = '1;
    #10 rst_n = 1'b0;
    #100;
    checks++;
    if (smp !== '0) begin failures++; $display("FAIL reset value %b", smp); end
    rst_n = 1'b1;
    #100;
    for (int i = 0; i < 200; i++) begin
      tap = {$urandom, $urandom};
      for (int m = 0; m < NB; m++) expect_smp[m] = tap[m*TPB + 1];
      #50 read_pulse = 1'b1;
      #50 tap = ~tap;              // changes after the edge must not show
      #185 read_pulse = 1'b0;
      #100;
      checks++;
      if (smp !== expect_smp) begin
        failures++;
        $display("FAIL read %0d: smp=%b expected %b", i, smp, expect_smp);
      end
    end
    rst_n = 1'b0;
    #10;
    checks++;
    if (smp !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
