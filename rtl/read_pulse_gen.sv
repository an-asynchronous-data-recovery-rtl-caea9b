`timescale 1ps/1fs
// read_pulse_gen: turns every rising transition of the incoming data into a
// read pulse a quarter bit period wide.
//
// The data is passed through one delay cell biased like the cells of the data
// delay line (T/4 once the DLL has locked). The read pulse is high while the
// data is already high but its delayed copy is still low, so it rises with the
// data transition and is reset T/4 later, as the design description states.
// The sample latches capture on its rising edge; the pointer and memory
// update on its falling edge (`rd_done`).
//
// Interface: `din` data in, `ctrl` DLL control code, `en` allows reads (held
// low until the DLL has calibrated the delays; it should rise while the line
// is idle, or the first pulse may be shortened), `read_pulse` the pulse,
// `rd_done` its complement, used as the write clock of the FIFO side.
// The quarter-period delay is the behavioural delay_cell; the gate is logic.
// The enable is this design's addition.
module read_pulse_gen
  import adr_pkg::*;
(
  input  logic              din,
  input  logic [CODE_W-1:0] ctrl,
  input  logic              en,
  output logic              read_pulse,
  output logic              rd_done
);
  logic din_dly;

  delay_cell u_quarter (.in(din), .ctrl(ctrl), .out(din_dly));

  assign read_pulse = en & din & ~din_dly;
  assign rd_done    = ~read_pulse;
endmodule
