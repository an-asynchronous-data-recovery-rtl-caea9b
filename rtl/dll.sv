`timescale 1ps/1fs
// dll: delay-locked loop that calibrates the delay cells against the
// reference (crystal) clock, in the foreground, and then sleeps.
//
// A replica line of TPB delay cells, matched to the cells of the data delay
// line, delays the reference clock. At each rising reference edge a bang-bang
// phase detector samples the delayed clock: a 1 means the delayed rising edge
// has already passed, so the line is shorter than one reference period and
// the control code is lowered (longer delay); a 0 means it is too long and the
// code is raised. The sample goes through a second flip-flop against
// metastability, and the code is updated once every UPD_PERIOD reference
// cycles so that each decision sees the effect of the previous one.
//
// Once the decision has reversed LOCK_REV times in a row the loop is taken to
// be locked: the code is frozen, the replica line's clock is gated off (sleep
// mode) and `locked` and `calibrated` go high. `recal` (one reference clock
// or longer) wakes the loop to track a temperature change; `calibrated` stays
// high from the first lock on, while `locked` shows the loop is asleep.
//
// Locking the cell delay to the reference, matching replica and signal-path
// cells and sleeping after lock follow the description. The digital code in
// place of the control voltage, the bang-bang detector and the lock rule are
// this design's choices. Asynchronous active-low reset; the code starts at
// CODE_INIT, whose line delay must lie between half and one and a half
// reference periods for the detector to pull in the right direction.
module dll
  import adr_pkg::*;
#(
  parameter int unsigned TPB        = TAPS_PER_BIT,
  parameter int unsigned CODE_INIT  = 1 << (CODE_W - 1),
  parameter int unsigned UPD_PERIOD = 4,
  parameter int unsigned LOCK_REV   = 8
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  input  logic              recal,
  output logic [CODE_W-1:0] ctrl,
  output logic              locked,
  output logic              calibrated
);
  typedef enum logic {DLL_CAL, DLL_SLEEP} dll_state_e;

  dll_state_e state;
  logic       replica_in;
  logic [TPB:0] chain;
  logic       pd_s1, pd_s2;
  logic       last_up;
  logic [$clog2(UPD_PERIOD)-1:0] upd_cnt;
  logic [$clog2(LOCK_REV+1)-1:0] rev_cnt;
  logic       up;

  // Replica line, clock gated off while asleep.
  assign replica_in = ref_clk & (state == DLL_CAL);
  assign chain[0]   = replica_in;
  for (genvar k = 0; k < int'(TPB); k++) begin : g_rep
    delay_cell u_cell (.in(chain[k]), .ctrl(ctrl), .out(chain[k+1]));
  end

  // Bang-bang phase detector with a metastability flip-flop.
  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      pd_s1 <= 1'b0;
      pd_s2 <= 1'b0;
    end else begin
      pd_s1 <= chain[TPB];
      pd_s2 <= pd_s1;
    end

  assign up = ~pd_s2;   // delayed edge late: raise the code (less delay)

  always_ff @(posedge ref_clk or negedge rst_n)
    if (!rst_n) begin
      state      <= DLL_CAL;
      ctrl       <= CODE_W'(CODE_INIT);
      upd_cnt    <= '0;
      rev_cnt    <= '0;
      last_up    <= 1'b0;
      locked     <= 1'b0;
      calibrated <= 1'b0;
    end else begin
      unique case (state)
        DLL_CAL: begin
          upd_cnt <= upd_cnt + 1'b1;
          if (upd_cnt == $bits(upd_cnt)'(UPD_PERIOD - 1)) begin
            upd_cnt <= '0;
            if (up && ctrl != '1)       ctrl <= ctrl + 1'b1;
            else if (!up && ctrl != '0) ctrl <= ctrl - 1'b1;
            last_up <= up;
            if (up != last_up) begin
              if (rev_cnt == $bits(rev_cnt)'(LOCK_REV - 1)) begin
                state      <= DLL_SLEEP;
                locked     <= 1'b1;
                calibrated <= 1'b1;
                rev_cnt    <= '0;
              end else begin
                rev_cnt <= rev_cnt + 1'b1;
              end
            end else begin
              rev_cnt <= '0;
            end
          end
        end
        DLL_SLEEP:
          if (recal) begin
            state   <= DLL_CAL;
            locked  <= 1'b0;
            upd_cnt <= '0;
          end
        default: state <= DLL_CAL;
      endcase
    end
endmodule
