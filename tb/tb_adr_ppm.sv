`timescale 1ps/1fs
// tb_adr_ppm: the +-100 ppm Fibre Channel clock tolerance at default
// parameters. The far end runs first 200 ppm fast, then 200 ppm slow, the
// largest difference two +-100 ppm clocks can have, for 120,000 bits each,
// with +-0.15 bit period jitter per transition. The oscillator trim must
// settle near the 8 steps of 25 ppm that 200 ppm needs (6 to 10 at the end
// of each phase, never beyond 12, in either direction), the buffer must
// never underflow or overflow, and every retransmitted bit must equal the
// bit sent.
module tb_adr_ppm;
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
  int n_fault = 0, code_max = 0, code_min = 0;

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
    if (int'(vco_code) > code_max) code_max = int'(vco_code);
    if (int'(vco_code) < code_min) code_min = int'(vco_code);
  end

  initial begin
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    wait (dll_calibrated);
    link.jitter_ui = 0.15;
    link.bit_ps = 941.0 / (1.0 + 200.0e-6);
    link.start();
    repeat (120000) #(941 * 1ps);
    $display("INFO after far end +200 ppm: trim code %0d (max %0d), fill %0d", vco_code, code_max, fifo_fill);
    checks++;
    if (vco_code < 6 || vco_code > 10 || code_max > 12) begin
      failures++; $display("FAIL trim did not settle near +8 steps for a fast far end");
    end
    link.bit_ps = 941.0 / (1.0 - 200.0e-6);
    repeat (120000) #(941 * 1ps);
    $display("INFO after far end -200 ppm: trim code %0d (min %0d), fill %0d", vco_code, code_min, fifo_fill);
    checks++;
    if (vco_code > -6 || vco_code < -10 || code_min < -12) begin
      failures++; $display("FAIL trim did not settle near -8 steps for a slow far end");
    end
    checks++;
    if (n_fault != 0) begin failures++; $display("FAIL %0d underflow/overflow events", n_fault); end
    failures += link.errors;
    checks += link.checked;
    checks++;
    if (link.checked < 235000) begin failures++; $display("FAIL only %0d bits checked", link.checked); end
    $display("INFO %0d bits checked", link.checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
