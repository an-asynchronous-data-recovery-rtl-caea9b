`timescale 1ps/1fs
// tb_adr_top: end-to-end test of the recovery / retransmission system.
//
// The far end (adr_link_model) sends random run-limited data with jitter of
// +-0.15 bit period on every transition; the design recovers it with no
// recovered clock and retransmits it on its own oscillator. Every
// retransmitted bit is compared with what was sent. The oscillator trim step
// is raised to 400 ppm so that
// the frequency-tracking mechanisms happen within a short simulation.
//
// Phases: DLL calibration; far end 0.4 % fast (trim must rise); far end
// 0.4 % slow (trim must fall) with a DLL recalibration on live traffic; far
// end silent (underflow); far end 2 % fast, beyond the trim range
// (overflow and re-centring); nominal rate to finish. Each mechanism is
// counted and must have happened at least once.
module tb_adr_top;
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

  // mechanism counters
  int n_lock = 0, n_sleep_cycles = 0, n_recal = 0, n_read = 0, n_purge = 0, n_full_read = 0;
  int n_start = 0, n_trim_up = 0, n_trim_dn = 0, n_under = 0, n_over = 0;

  adr_top #(.VCO_STEP(400.0)) dut (
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

  always @(posedge dll_locked) n_lock++;
  always @(posedge ref_clk) if (dll_locked) n_sleep_cycles++;
  always @(negedge read_pulse) begin
    n_read++;
    if (read_count < 4'd10) n_purge++;
    else n_full_read++;
  end
  tx_state_e prev_state = TX_IDLE;
  logic signed [VCO_CODE_W-1:0] prev_code = '0;
  always @(posedge retx_clk) begin
    if (tx_state == TX_RUN && prev_state != TX_RUN) n_start++;
    if (vco_code > prev_code) n_trim_up++;
    if (vco_code < prev_code) n_trim_dn++;
    if (underflow) n_under++;
    if (overflow) n_over++;
    prev_state <= tx_state;
    prev_code  <= vco_code;
  end

  task automatic bits(input int n);
    repeat (n) #(941 * 1ps);
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("INFO %s: %0d", what, count);
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    wait (dll_calibrated);
    bits(20);
    link.jitter_ui = 0.15;
    link.bit_ps = 941.0 * (1.0 - 0.004);
    link.start();
    bits(6000);
    link.bit_ps = 941.0 * (1.0 + 0.004);
    bits(3000);
    @(posedge ref_clk) recal = 1'b1;
    @(posedge ref_clk) recal = 1'b0;
    n_recal++;
    bits(5000);
    link.stall = 1'b1;
    bits(400);
    link.stall = 1'b0;
    link.bit_ps = 941.0 * (1.0 - 0.02);
    link.jitter_ui = 0.05;
    bits(4000);
    link.bit_ps = 941.0;
    link.jitter_ui = 0.15;
    bits(4000);
    checks++;
    if (link.errors != 0) failures += link.errors;
    checks += link.checked;
    need("DLL lock", n_lock);
    need("DLL asleep (reference cycles)", n_sleep_cycles);
    need("DLL recalibration with live data", (n_recal > 0 && n_lock >= 2) ? n_recal : 0);
    need("reads", n_read);
    need("reads with redundant samples purged", n_purge);
    need("reads taking the whole line", n_full_read);
    need("bits recovered from before the first transition", link.pre_edge);
    need("retransmission starts", n_start);
    need("oscillator trim up", n_trim_up);
    need("oscillator trim down", n_trim_dn);
    need("underflow", n_under);
    need("overflow", n_over);
    need("resynchronisations of the checker after faults", link.resyncs);
    $display("INFO bits checked %0d, mismatches %0d", link.checked, link.errors);
    checks++;
    if (link.checked < 15000) begin failures++; $display("FAIL only %0d bits checked", link.checked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
