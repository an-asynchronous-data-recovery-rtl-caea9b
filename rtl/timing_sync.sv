`timescale 1ps/1fs
// timing_sync: timing control and synchronisation of the retransmit side.
//
// Runs on the retransmit clock. It brings the coarse, Gray-coded load pointer
// and the DLL's "calibrated" flag into this clock domain with two-stage
// synchronisers, and estimates the FIFO fill as
//   fill = load_coarse * 2**GRAN_SH - retransmit_pointer   (signed, modulo)
// which under-reads the true fill by less than 2**GRAN_SH plus the
// synchroniser latency.
//
//  * IDLE: transmission off until the DLL has calibrated and `START` bits have
//    accumulated ("once a sufficient number of bits accumulate").
//  * RUN: one bit per clock. The fill estimate is averaged over ADJ_PERIOD
//    clocks (a power of two), which also smooths out its coarse steps. At
//    the end of every period the oscillator code is set to
//    (average + 2**(GRAN_SH-1) - START) >>> GAIN_SH, clamped to the code
//    range (the added half coarse step cancels the mean under-read of the
//    estimate): a buffer that
//    fills speeds the clock up, one that drains slows it down. This
//    proportional law settles without overshoot; the buffer then sits
//    2**GAIN_SH bits away from START per code step of frequency offset
//    (8 bits for 200 ppm at 25 ppm per step). It adapts the retransmit clock
//    to the far-end transmit clock, the elasticity the description asks for.
//  * FAULT: entered when the fill estimate reaches zero (buffer empty) or
//    above HIGH (buffer about to overflow). On overflow the retransmit pointer
//    is re-centred START bits behind the load pointer; on underflow output
//    stops until START bits are again buffered. One clock, then IDLE.
//
// The description names this block and says the pointers steer the clock
// frequency; the control law, thresholds and fault handling are this design's.
// Asynchronous active-low reset; the oscillator code resets to 0 (nominal)
// and keeps its last value outside RUN.
module timing_sync
  import adr_pkg::*;
#(
  parameter int unsigned DEPTH      = FIFO_DEPTH,
  parameter int unsigned NBITS      = N_BITS,
  parameter int unsigned GRAN_SH    = $clog2(NBITS),
  parameter int unsigned START      = DEPTH / 2,
  parameter int unsigned GAIN_SH    = 0,
  parameter int unsigned HIGH       = DEPTH - 2 * (1 << GRAN_SH),
  parameter int unsigned ADJ_PERIOD = 64,
  parameter int unsigned VW         = VCO_CODE_W,
  localparam int unsigned PW        = $clog2(DEPTH) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   calibrated,
  input  logic [PW-GRAN_SH-1:0]  load_coarse_gray,
  input  logic [PW-1:0]          retx_ptr,
  output logic                   run,
  output logic                   retx_load,
  output logic [PW-1:0]          retx_load_val,
  output logic signed [VW-1:0]   vco_code,
  output tx_state_e              state,
  output logic signed [PW-1:0]   fill,
  output logic                   underflow,   // one-clock pulse
  output logic                   overflow     // one-clock pulse
);
  localparam int CODE_MAX = (1 <<< (VW - 1)) - 1;
  localparam int CODE_MIN = -(1 <<< (VW - 1));

  logic [PW-GRAN_SH-1:0] g_s1, g_s2, coarse_bin;
  logic                  cal_s1, cal_s2;
  logic [PW-1:0]         load_floor;
  localparam int unsigned AS = $clog2(ADJ_PERIOD);
  logic [AS-1:0]         adj_cnt;
  logic                  adj_tick;
  logic signed [PW+AS-1:0] fill_sum, sum_next;
  logic signed [PW:0]    avg_err;
  logic signed [PW:0]    trim;
  logic                  fault_over;

  // Two-stage synchronisers.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      g_s1 <= '0; g_s2 <= '0; cal_s1 <= 1'b0; cal_s2 <= 1'b0;
    end else begin
      g_s1 <= load_coarse_gray; g_s2 <= g_s1;
      cal_s1 <= calibrated;     cal_s2 <= cal_s1;
    end

  always_comb begin
    coarse_bin[PW-GRAN_SH-1] = g_s2[PW-GRAN_SH-1];
    for (int i = int'(PW - GRAN_SH) - 2; i >= 0; i--)
      coarse_bin[i] = coarse_bin[i+1] ^ g_s2[i];
    load_floor    = {coarse_bin, {GRAN_SH{1'b0}}};
    fill          = $signed(load_floor - retx_ptr);
    underflow     = (state == TX_RUN) && (fill <= 0);
    overflow      = (state == TX_RUN) && (fill > $signed(PW'(HIGH)));
    adj_tick      = (adj_cnt == '0);
    sum_next      = fill_sum + (PW+AS)'(fill);
    // the estimate under-reads by half a coarse step on average: add it back
    avg_err       = (PW+1)'(sum_next >>> AS) + $signed((PW+1)'(1 << (GRAN_SH - 1)))
                    - $signed((PW+1)'(START));
    trim          = avg_err >>> GAIN_SH;
    run           = (state == TX_RUN) && !underflow && !overflow;
    retx_load     = (state == TX_FAULT) && fault_over;
    retx_load_val = load_floor - PW'(START);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= TX_IDLE;
      fault_over <= 1'b0;
      adj_cnt    <= '0;
      fill_sum   <= '0;
      vco_code   <= '0;
    end else begin
      unique case (state)
        TX_IDLE:
          if (cal_s2 && fill >= $signed(PW'(START))) begin
            state   <= TX_RUN;
            adj_cnt  <= AS'(ADJ_PERIOD - 1);
            fill_sum <= '0;
          end
        TX_RUN: begin
          adj_cnt <= adj_cnt - 1'b1;
          if (underflow || overflow) begin
            state      <= TX_FAULT;
            fault_over <= overflow;
          end else if (adj_tick) begin
            fill_sum <= '0;
            if (trim > (PW+1)'(CODE_MAX))      vco_code <= VW'(CODE_MAX);
            else if (trim < (PW+1)'(CODE_MIN)) vco_code <= VW'(CODE_MIN);
            else                      vco_code <= VW'(trim);
          end else begin
            fill_sum <= sum_next;
          end
        end
        default: state <= TX_IDLE;   // TX_FAULT lasts one clock
      endcase
    end

  // A fault clears itself through IDLE; RUN never lasts with a bad fill.
  assert property (@(posedge clk) disable iff (!rst_n) state == TX_FAULT |=> state == TX_IDLE);
endmodule
