`timescale 1ps/1fs
// tb_adr_jitter: jitter tolerance of the whole receiver at default
// parameters, against the 1.0625 Gbaud receiver jitter budget (0.70 UI
// peak to peak in total, that is up to +-0.35 UI on each transition).
//
// The far end runs 50 ppm fast and displaces every transition by a random
// amount, uniform in +-J bit periods, independently per transition. A bit is
// read correctly when the transitions around it are displaced by less than
// half a bit period relative to the rising edge that reads it, so the
// design must be error-free while 2*J stays clearly below 0.5 UI. Phases of
// 20,000 bits each:
//   J = 0.10, 0.20, 0.22 : no errors, no underflow or overflow;
//   J = 0.35 (the whole budget as uniform jitter): errors are expected and
//     only counted, and at least one must occur (the limit is real);
//   J = 0.10 again: after 2,000 bits for the checker to find its place,
//     no further errors, so the link recovers on its own.
// Independent uniform jitter is a pessimistic model: measured jitter of
// successive transitions is strongly anti-correlated.
module tb_adr_jitter;
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
  int n_fault = 0;

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

  always @(posedge retx_clk) if (underflow || overflow) n_fault++;

  // one phase of `nbits` bits at jitter j; returns the errors it added
  task automatic run_phase(input real j, input int nbits, output int new_err);
    int e0;
    e0 = link.errors;
    link.jitter_ui = j;
    repeat (nbits) #(941 * 1ps);
    new_err = link.errors - e0;
  endtask

  initial begin
    automatic real clean_j[3] = '{0.10, 0.20, 0.22};
    int e, c0, f0;
    #10 rst_n = 1'b0;
    #2000 rst_n = 1'b1;
    wait (dll_calibrated);
    link.bit_ps = 941.0 / (1.0 + 50.0e-6);
    link.start();
    foreach (clean_j[i]) begin
      c0 = link.checked; f0 = n_fault;
      run_phase(clean_j[i], 20000, e);
      $display("INFO jitter +-%0.2f UI: %0d bits checked, %0d errors, %0d faults",
               clean_j[i], link.checked - c0, e, n_fault - f0);
      checks++;
      if (e != 0 || n_fault != f0 || link.checked - c0 < 19000) begin
        failures++;
        $display("FAIL errors or faults at +-%0.2f UI jitter", clean_j[i]);
      end
    end
    c0 = link.checked;
    link.verbose = 1'b0;                 // errors expected: count, do not print
    run_phase(0.35, 20000, e);
    $display("INFO jitter +-0.35 UI (whole budget): %0d bits matched, %0d bits in error or unmatched, %0d resyncs",
             link.checked - c0, e, link.resyncs);
    checks++;
    if (e == 0) begin failures++; $display("FAIL no error at +-0.35 UI, beyond the expected limit"); end
    run_phase(0.10, 2000, e);
    link.verbose = 1'b1;
    c0 = link.checked;
    run_phase(0.10, 18000, e);
    $display("INFO back at +-0.10 UI: %0d bits checked, %0d errors", link.checked - c0, e);
    checks++;
    if (e != 0 || link.checked - c0 < 17000) begin
      failures++; $display("FAIL link did not recover after heavy jitter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
