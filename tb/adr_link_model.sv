`timescale 1ps/1fs
// adr_link_model: far-end transmitter and bit-stream checker for the
// end-to-end testbenches (not part of the design).
//
// Transmitter: after `start` it sends IDLE_BITS zeros and then random data
// whose runs of equal bits never exceed MAX_RUN (the 8B/10B limit). The bit
// period `bit_ps` can be changed at any time (frequency offset of the far-end
// clock); every transition is displaced by a random jitter uniform in
// +-jitter_ui bit periods. While `stall` is set the line is held low (the far
// end stops sending). Every bit put on the line is recorded.
//
// Checker: every bit the design retransmits (sampled on the falling edge of
// the retransmit clock while valid) must be the next bit of the recorded
// stream. The first retransmitted bit must be the bit NBITS places before the
// first rising transition: the delay line holds that many bits before the
// first read. After an underflow or overflow the design legitimately skips or
// loses bits; for the next RESYNC_WINDOW retransmitted bits a mismatch only
// makes the checker look the last MATCH_LEN retransmitted bits up in the
// record and continue from there. Any other mismatch is an error. The first
// few errors are printed unless `verbose` is cleared.
module adr_link_model #(
  parameter int IDLE_BITS     = 30,
  parameter int MAX_RUN       = 5,
  parameter int NBITS         = 10,
  parameter int MATCH_LEN     = 48,
  parameter int RESYNC_WINDOW = 400
) (
  output logic line,
  input  logic retx_clk,
  input  logic retimed_data,
  input  logic retimed_valid,
  input  logic underflow,
  input  logic overflow
);
  real bit_ps    = 941.0;
  real jitter_ui = 0.0;
  bit  stall     = 1'b0;
  bit  started   = 1'b0;
  bit  verbose   = 1'b1;   // print the first mismatches

  bit  hist[$];            // every bit sent
  int  exp_idx   = -1;     // index of the next expected bit, -1 while searching
  int  checked   = 0;      // bits compared
  int  errors    = 0;      // mismatches outside a resync window
  int  resyncs   = 0;
  int  allow     = 0;      // retransmitted bits left in the resync window
  int  pre_edge  = 0;      // bits checked that were sent before the first rising edge
  bit  recent[$];          // last MATCH_LEN retransmitted bits

  initial line = 1'b0;

  task automatic start();
    started = 1'b1;
  endtask

  // transmitter
  initial begin
    realtime nominal;
    int run;
    bit b, prev;
    wait (started);
    nominal = $realtime;
    prev = 1'b0; run = 0;
    for (int i = 0; ; i++) begin
      real j;
      if (stall) b = 1'b0;
      else if (i < IDLE_BITS) b = 1'b0;
      else if (i == IDLE_BITS) b = 1'b1;
      else if (run >= MAX_RUN || $urandom_range(1) == 1) b = ~prev;
      else b = prev;
      run = (i == 0 || b != prev) ? 1 : run + 1;
      nominal += bit_ps * 1ps;
      j = jitter_ui * bit_ps * (2.0 * real'($urandom_range(10000)) / 10000.0 - 1.0);
      if (b != prev) #(nominal + j * 1ps - $realtime) line = b;
      else #(nominal - $realtime);
      hist.push_back(b);
      prev = b;
    end
  end

  always @(posedge underflow or posedge overflow) allow = RESYNC_WINDOW;

  function automatic int find_match();
    // index just after the unique place in hist where `recent` occurs, or -1
    logic [MATCH_LEN-1:0] pat, win;
    int found, n, lo;
    found = -1; n = 0;
    lo = (hist.size() > 20000) ? hist.size() - 20000 : 0;
    pat = '0; win = '0;
    for (int k = 0; k < MATCH_LEN; k++) pat = {pat[MATCH_LEN-2:0], recent[k]};
    for (int e = lo; e < hist.size(); e++) begin
      win = {win[MATCH_LEN-2:0], hist[e]};
      if (e - lo + 1 >= MATCH_LEN && win == pat) begin found = e + 1; n++; end
    end
    return (n == 1) ? found : -1;
  endfunction

  always @(negedge retx_clk) if (retimed_valid) begin
    recent.push_back(retimed_data);
    if (recent.size() > MATCH_LEN) void'(recent.pop_front());
    if (allow > 0) allow--;
    if (!started) begin
      errors++;
      $display("FAIL data retransmitted before anything was sent");
    end else if (exp_idx < 0 && checked == 0) begin
      exp_idx = IDLE_BITS - NBITS;       // first bit: NBITS before the first rising edge
    end
    if (exp_idx >= 0 && started) begin
      if (exp_idx >= hist.size()) begin
        errors++;
        if (verbose && errors < 10) $display("FAIL bit %0d retransmitted before it was sent", exp_idx);
        exp_idx = -1;
      end else if (hist[exp_idx] == retimed_data) begin
        checked++;
        if (exp_idx < IDLE_BITS) pre_edge++;
        exp_idx++;
      end else begin
        if (allow == 0) begin
          errors++;
          if (verbose && errors < 10) $display("FAIL at %0t: bit %0d is %b, sent %b", $realtime, exp_idx, retimed_data, hist[exp_idx]);
        end
        exp_idx = -1;
        recent.delete();
        recent.push_back(retimed_data);
      end
    end else if (started && recent.size() == MATCH_LEN) begin
      automatic int m = find_match();
      if (m >= 0) begin
        exp_idx = m;
        resyncs++;
      end else if (allow == 0) begin
        errors++;
        if (verbose && errors < 10) $display("FAIL at %0t: retransmitted bits match nothing sent", $realtime);
      end
    end
  end
endmodule
