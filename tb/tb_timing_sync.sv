`timescale 1ps/1fs
// tb_timing_sync: the load side is modelled by a pointer that advances in
// bursts of 2..10 bits at a chosen average bit rate, asynchronously to the
// retransmit clock; the retransmit pointer is modelled here from `run` and
// `retx_load`. Checked:
//  * no transmission before `calibrated`, then start once half the buffer is
//    filled;
//  * every cycle with `run` reads a written location (retransmit pointer
//    behind the true load pointer) that has not been overwritten;
//  * a faster far end raises the oscillator code, a slower one lowers it;
//  * a stalled far end gives an underflow pulse, FAULT for one clock, then
//    IDLE and a restart; a far end much faster than the trim range gives an
//    overflow and a re-centre load of (coarse load - 64).
module tb_timing_sync;
  import adr_pkg::*;
  localparam int DEPTH = 128, PW = 8, SH = 4;
  logic clk = 1'b0, rst_n = 1'b1, calibrated = 1'b0;
  logic [PW-SH-1:0] lgray = '0;
  logic [PW-1:0] retx_ptr = '0;
  logic run, retx_load;
  logic [PW-1:0] retx_load_val;
  logic signed [VCO_CODE_W-1:0] vco_code;
  tx_state_e state;
  logic signed [PW-1:0] fill;
  logic underflow, overflow;
  int checks = 0, failures = 0;
  int true_load = 0;          // unbounded count of bits loaded
  int retx = 0;               // unbounded count of bits read
  real bit_ps = 941.0;
  bit  stall = 1'b0;
  int n_under = 0, n_over = 0, n_start = 0;

  timing_sync #(.DEPTH(DEPTH), .NBITS(10), .GRAN_SH(SH), .ADJ_PERIOD(16)) dut (
    .clk(clk), .rst_n(rst_n), .calibrated(calibrated),
    .load_coarse_gray(lgray), .retx_ptr(retx_ptr),
    .run(run), .retx_load(retx_load), .retx_load_val(retx_load_val),
    .vco_code(vco_code), .state(state), .fill(fill),
    .underflow(underflow), .overflow(overflow));

  always #470.5 clk = ~clk;

  // load side, started with the reset release
  initial begin
    #1020;
    forever begin
      automatic int n = $urandom_range(10, 2);
      #(real'(n) * bit_ps * 1ps);
      if (!stall) begin
        logic [PW-SH-1:0] c;
        true_load += n;
        c = PW'(true_load) >> SH;
        lgray = c ^ (c >> 1);
      end
    end
  end

  // retransmit pointer model and per-cycle safety checks
  always @(posedge clk) begin
    if (run) begin
      checks++;
      if (retx >= true_load || true_load - retx > DEPTH) begin
        failures++;
        if (failures < 10) $display("FAIL unsafe read: retx %0d load %0d", retx, true_load);
      end
    end
    if (retx_load) begin
      automatic logic [PW-1:0] exp_val = PW'(((true_load >> SH) << SH) - 64);
      // the synchronised coarse pointer may lag the true one by one step
      checks++;
      if (retx_load_val !== exp_val && retx_load_val !== PW'(exp_val - 16)) begin
        failures++; $display("FAIL re-centre value %0d, expected about %0d (t=%0t load %0d retx %0d)", retx_load_val, exp_val, $realtime, true_load, retx);
      end
      begin
        automatic int delta = int'(PW'(retx_load_val - PW'(retx)));
        retx += (delta > 127) ? delta - 256 : delta;
      end
    end else if (run) retx++;
    if (underflow) n_under++;
    if (overflow)  n_over++;
    retx_ptr <= PW'(retx);
  end

  initial begin
    int code_before;
    #10 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    // 1: not calibrated, no transmission
    // (about 90 bits arrive: enough to start, were the DLL calibrated)
    repeat (90) begin
      @(posedge clk);
      checks++;
      if (run || state != TX_IDLE) begin failures++; $display("FAIL runs before calibration"); end
    end
    checks++;
    if (true_load < 70) begin failures++; $display("FAIL load side too slow for the test"); end
    // restart load side from zero: leave pointers as they are, calibrate
    calibrated = 1'b1;
    wait (state == TX_RUN);
    n_start++;
    checks++;
    if (true_load - retx < 64) begin failures++; $display("FAIL started with %0d bits", true_load - retx); end
    // 2: far end 1% fast: code must rise
    code_before = int'(vco_code);
    bit_ps = 941.0 / 1.01;
    repeat (3000) @(posedge clk);
    checks++;
    if (int'(vco_code) <= code_before) begin failures++; $display("FAIL code did not rise: %0d", vco_code); end
    $display("INFO code after fast far end: %0d", vco_code);
    // 3: far end 1% slow: code must fall
    code_before = int'(vco_code);
    bit_ps = 941.0 / 0.99;
    repeat (6000) @(posedge clk);
    checks++;
    if (int'(vco_code) >= code_before) begin failures++; $display("FAIL code did not fall: %0d", vco_code); end
    $display("INFO code after slow far end: %0d", vco_code);
    // 4: far end stops: underflow, FAULT one clock, IDLE
    stall = 1'b1;
    wait (underflow);
    @(posedge clk); #1;
    checks++;
    if (state != TX_FAULT) begin failures++; $display("FAIL no FAULT after underflow"); end
    @(posedge clk); #1;
    checks++;
    if (state != TX_IDLE) begin failures++; $display("FAIL no IDLE after FAULT"); end
    repeat (200) @(posedge clk);
    checks++;
    if (run) begin failures++; $display("FAIL runs with empty buffer"); end
    // 5: far end returns 5% fast: restart, then overflow and re-centre
    bit_ps = 941.0 / 1.05;
    stall = 1'b0;
    wait (state == TX_RUN);
    n_start++;
    fork
      wait (overflow);
      repeat (20000) @(posedge clk);
    join_any
    disable fork;
    repeat (10) @(posedge clk);
    checks++;
    if (n_under == 0 || n_over == 0 || n_start < 2) begin
      failures++; $display("FAIL mechanisms: under %0d over %0d starts %0d", n_under, n_over, n_start);
    end
    $display("INFO underflows %0d overflows %0d starts %0d", n_under, n_over, n_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
