`timescale 1ps/1fs
// tb_dll: runs the DLL from reset against a 941 ps reference and checks that
// it locks within a bounded number of reference cycles at a code whose
// four-cell delay is within two code steps of the reference period (the
// delay law of the cell is evaluated here), that the code stays frozen and
// the replica clock stays gated while asleep, that `calibrated` stays high
// through a recalibration, and that after the reference period is changed to
// 1000 ps a recalibration moves the code to the new lock point.
module tb_dll;
  import adr_pkg::*;
  logic ref_clk = 1'b0, rst_n = 1'b1, recal = 1'b0;
  logic [CODE_W-1:0] ctrl, frozen;
  logic locked, calibrated;
  realtime half = 470.5;
  int checks = 0, failures = 0;

  dll dut (.ref_clk(ref_clk), .rst_n(rst_n), .recal(recal),
           .ctrl(ctrl), .locked(locked), .calibrated(calibrated));

  always #(half * 1ps) ref_clk = ~ref_clk;

  function automatic real line_delay(input logic [CODE_W-1:0] c);
    return 4.0 * (390.0 - 200.0 * real'(c) / 255.0);
  endfunction

  task automatic wait_lock(input real period);
    int n = 0;
    while (!locked && n < 3000) begin @(posedge ref_clk); n++; end
    checks++;
    if (!locked) begin failures++; $display("FAIL no lock after %0d cycles", n); end
    else $display("INFO locked after %0d cycles at code %0d (line %0.1f ps, period %0.1f ps)",
                  n, ctrl, line_delay(ctrl), period);
    checks++;
    if (line_delay(ctrl) < period - 2.0 * 3.14 || line_delay(ctrl) > period + 2.0 * 3.14) begin
      failures++; $display("FAIL lock code %0d gives %0.1f ps", ctrl, line_delay(ctrl));
    end
  endtask

  task automatic check_sleep();
    frozen = ctrl;
    repeat (300) begin
      @(posedge ref_clk);
      checks++;
      if (ctrl !== frozen || !locked || dut.replica_in !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL not asleep: code %0d", ctrl);
      end
    end
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    checks++;
    if (locked || calibrated) begin failures++; $display("FAIL lock flags after reset"); end
    wait_lock(941.0);
    check_sleep();
    // the reference period changes (as a temperature drift would change the
    // delay); a recalibration follows it
    half = 500.0;
    @(posedge ref_clk) recal = 1'b1;
    @(posedge ref_clk) recal = 1'b0;
    #1;
    checks++;
    if (locked || !calibrated) begin failures++; $display("FAIL flags during recalibration"); end
    wait_lock(1000.0);
    check_sleep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
