`timescale 1ps/1fs
// vcdl: BEHAVIOURAL MODEL of the voltage-controlled delay line in the incoming
// data path. It is a chain of NTAPS identical delay cells, all biased by the
// same control code from the DLL, so that each cell delays by a quarter of a
// bit period once the DLL has locked. With the default NTAPS = 40 the line is
// ten bit periods long with T/4 resolution, as in the design description.
//
// Interface: `din` is the incoming serial data, `ctrl` the common control
// code. `tap[k-1]` is the output of the k-th cell, i.e. din delayed by k*T/4.
// Since it is built only from delay_cell instances, it carries no clock and no
// reset.
module vcdl
  import adr_pkg::*;
#(
  parameter int unsigned NTAPS = N_TAPS
) (
  input  logic              din,
  input  logic [CODE_W-1:0] ctrl,
  output logic [NTAPS-1:0]  tap
);
  logic [NTAPS:0] chain;
  assign chain[0] = din;

  for (genvar k = 0; k < NTAPS; k++) begin : g_cell
    delay_cell u_cell (.in(chain[k]), .ctrl(ctrl), .out(chain[k+1]));
  end

  assign tap = chain[NTAPS:1];
endmodule
