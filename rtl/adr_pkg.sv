`timescale 1ps/1fs
// adr_pkg: constants and types shared by the asynchronous data recovery /
// retransmission design.
//
// The bit period (941 ps, 1.0625 Gbaud Fibre Channel), the delay-line length of
// ten bit periods and its quarter-bit tap resolution follow the design
// description. The FIFO depth, the control-code widths and the delay-cell
// tuning range are this design's own choices (the delay range is read off the
// delay-versus-bias plot of the cell: about 0.19 ns to 0.39 ns).
package adr_pkg;
  // Nominal bit period in picoseconds.
  localparam real T_BIT_PS = 941.0;
  // Delay-line length in bit periods and taps per bit period (T/4 resolution).
  localparam int unsigned N_BITS       = 10;
  localparam int unsigned TAPS_PER_BIT = 4;
  localparam int unsigned N_TAPS       = N_BITS * TAPS_PER_BIT;
  // Width of the digital delay-control code ("control voltage").
  localparam int unsigned CODE_W = 8;
  // Delay-cell range: delay at code 0 and at the largest code, in ps.
  localparam real CELL_DMAX_PS = 390.0;
  localparam real CELL_DMIN_PS = 190.0;
  // Elastic FIFO.
  localparam int unsigned FIFO_DEPTH = 128;
  // Retransmit-oscillator frequency control: signed code, ppm per step.
  localparam int unsigned VCO_CODE_W  = 5;
  localparam real         VCO_STEP_PPM = 25.0;

  // Status of the retransmit side.
  typedef enum logic [1:0] {
    TX_IDLE  = 2'd0,   // waiting for DLL lock and enough buffered bits
    TX_RUN   = 2'd1,   // clocking bits out
    TX_FAULT = 2'd2    // elastic buffer ran empty or full; restarts from idle
  } tx_state_e;
endpackage
