`timescale 1ps/1fs
// retransmit_pointer: address of the bit being clocked out of the FIFO.
//
// It advances by one on every retransmit clock while `en` is high. `load`
// sets it to `load_val`, which the timing control uses to re-centre the
// buffer after it ran empty or full. One bit wider than the FIFO address, like
// the load pointer. Rising edge of the retransmit clock; asynchronous
// active-low reset to zero. The re-centre load is this design's addition.
module retransmit_pointer
  import adr_pkg::*;
#(
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned PW   = $clog2(DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  logic [PW-1:0] load_val,
  output logic [PW-1:0] ptr
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    ptr <= '0;
    else if (load) ptr <= load_val;
    else if (en)   ptr <= ptr + PW'(1);
endmodule
