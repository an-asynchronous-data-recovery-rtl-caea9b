`timescale 1ps/1fs
// fifo_ram: the elastic buffer between the data-driven load side and the
// retransmit clock.
//
// One bit per location, DEPTH locations used as a ring. The write port stores
// up to NBITS bits per read pulse: bit j of `wbits` goes to address
// (waddr + j) mod DEPTH for j < wcount. The read port is combinational: `rbit`
// is the location `raddr`. Write port on the rising edge of `wr_clk`; the
// memory itself is not reset (both pointers start equal, so nothing unwritten
// is read). Depth and width are this design's choices.
module fifo_ram
  import adr_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  parameter int unsigned NBITS = N_BITS,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(NBITS + 1)
) (
  input  logic             wr_clk,
  input  logic [AW-1:0]    waddr,
  input  logic [NBITS-1:0] wbits,
  input  logic [CW-1:0]    wcount,
  input  logic [AW-1:0]    raddr,
  output logic             rbit
);
  logic [DEPTH-1:0] mem;

  always_ff @(posedge wr_clk)
    for (int j = 0; j < int'(NBITS); j++)
      if (j < int'(wcount)) mem[AW'(waddr + AW'(j))] <= wbits[j];

  assign rbit = mem[raddr];
endmodule
