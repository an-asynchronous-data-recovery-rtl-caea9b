`timescale 1ps/1fs
// tb_adr_top_full: one complete operation of the system with every parameter
// at its default: DLL calibration against the 941 ps reference, then 6000
// bits of run-limited data at +50 ppm with +-0.15 bit period jitter per
// transition, recovered and retransmitted. Checked: every retransmitted bit
// equals the bit sent (starting with the bits before the first transition),
// no underflow or overflow happens, the DLL locks once and sleeps, and the
// retransmit clock period stays within the trim range of 941 ps (+-400 ppm)
// and bits leave at one per retransmit clock.
module tb_adr_top_full;
  import adr_pkg::*;
  logic rst_n = 1'b1, ref_clk = 1'b0, recal = 1'b0;
  logic data_in, retx_clk, retimed_data, retimed_valid;
  logic [CODE_W-1:0] dll_code;
  logic dll_locked, dll_calibrated;
  logic signed [VCO_CODE_W-1:0] vco_code;
  tx_state_e tx_state;
  logic signed [7:0] fifo_fill;
  logic underflow, overflow, read_pulse;
  logic [3:0] read_count;
  int checks = 0, failures = 0;
  int n_fault = 0, n_valid = 0, n_clk = 0;
  realtime t_first, t_last;

  adr_top dut (
    .rst_n(rst_n), .ref_clk(ref_clk), .recal(recal), .data_in(data_in),
    .retx_clk(retx_clk), .retimed_data(retimed_data), .retimed_valid(retimed_valid),
    .dll_code(dll_code), .dll_locked(dll_locked), .dll_calibrated(dll_calibrated),
    .vco_code(vco_code), .tx_state(tx_state), .fifo_fill(fifo_fill),
    .underflow(underflow), .overflow(overflow),
    .read_pulse(read_pulse), .read_count(read_count));

  adr_link_model link (
    .line(data_in), .retx_clk(retx_clk), .retimed_data(retimed_data),
    .retimed_valid(retimed_valid), .underflow(underflow), .overflow(overflow));

  always #470.5 ref_clk = ~ref_clk;

  always @(posedge retx_clk) begin
    if (underflow || overflow) n_fault++;
    if (retimed_valid) begin
      if (n_valid == 0) t_first = $realtime;
      n_valid++;
      t_last = $realtime;
    end
  end

  initial begin
    real per;
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    wait (dll_calibrated);
    checks++;
    if (!dll_locked) begin failures++; $display("FAIL DLL not asleep after calibration"); end
    $display("INFO DLL code %0d", dll_code);
    link.jitter_ui = 0.15;
    link.bit_ps = 941.0 / (1.0 + 50.0e-6);
    link.start();
    repeat (6000) #(941 * 1ps);
    failures += link.errors;
    checks += link.checked;
    checks++;
    if (link.checked < 5800) begin failures++; $display("FAIL only %0d bits checked", link.checked); end
    checks++;
    if (link.pre_edge != 10) begin failures++; $display("FAIL %0d bits from before the first transition", link.pre_edge); end
    checks++;
    if (n_fault != 0) begin failures++; $display("FAIL %0d underflow/overflow events", n_fault); end
    per = (t_last - t_first) / real'(n_valid - 1);
    $display("INFO %0d bits checked, retransmit bit period %0.3f ps, trim code %0d", link.checked, per, vco_code);
    checks++;
    if (per < 941.0 * (1.0 - 400.0e-6) || per > 941.0 * (1.0 + 400.0e-6)) begin
      failures++; $display("FAIL retransmit bit period %0.3f ps", per);
    end
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
