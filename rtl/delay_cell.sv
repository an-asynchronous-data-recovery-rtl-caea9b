`timescale 1ps/1fs
// delay_cell: BEHAVIOURAL MODEL of the programmable differential delay cell
// (a source-coupled pair with a cross-coupled PMOS load, whose delay is set by
// the tail bias). It is not synthesizable logic: it only reproduces the cell's
// timing for simulation.
//
// The analog bias voltage is represented by the digital code `ctrl`, as
// produced by the DLL. The delay falls linearly from CELL_DMAX_PS at code 0 to
// CELL_DMIN_PS at the largest code; the end points are those of the measured
// delay-versus-bias curves of the cell (about 0.39 ns down to 0.19 ns), the
// linear shape in between is this model's simplification. The delay is the
// same for rising and falling edges, which is the property the cell was
// designed for (low data dependency).
//
// The model is a transport delay for pulses wider than the cell delay; in this
// design every pulse is at least half a bit period, about twice the delay of a
// cell, so nothing narrower reaches a cell.
module delay_cell
  import adr_pkg::*;
(
  input  logic              in,
  input  logic [CODE_W-1:0] ctrl,
  output logic              out
);
  logic    target;
  realtime dly;

  always_comb
    dly = CELL_DMAX_PS - (CELL_DMAX_PS - CELL_DMIN_PS) * real'(ctrl) / real'((1 << CODE_W) - 1);

  initial begin
    target = in;
    out    = in;
    forever begin
      wait (in != target);
      target = in;
      #(dly * 1ps) out = target;
    end
  end
endmodule
