`timescale 1ps/1fs
// load_pointer: the FIFO load pointer and its adder.
//
// After every read the pointer advances by the number of new bits the purge
// logic found, so it always addresses the location after the last bit
// loaded. The pointer has one bit more than the FIFO address so that a full
// buffer and an empty one differ.
//
// For the retransmit side the pointer is also given coarsely: its value
// divided by 2**GRAN_SH, Gray coded. A read adds at most NBITS <= 2**GRAN_SH,
// so the coarse value steps by at most one per read and its Gray code can be
// taken safely into the retransmit clock domain (the synchroniser itself is in
// timing_sync). The coarse hand-over and the Gray code are this design's
// choice; the description only says the pointer information controls the
// retransmit clock.
//
// Clocked by `wr_clk` (end of the read pulse); asynchronous active-low reset.
module load_pointer
  import adr_pkg::*;
#(
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned NBITS   = N_BITS,
  parameter int unsigned GRAN_SH = $clog2(NBITS),
  localparam int unsigned PW     = $clog2(DEPTH) + 1,
  localparam int unsigned CW     = $clog2(NBITS + 1)
) (
  input  logic                wr_clk,
  input  logic                rst_n,
  input  logic [CW-1:0]       count,
  output logic [PW-1:0]       ptr,
  output logic [PW-GRAN_SH-1:0] coarse_gray
);
  logic [PW-1:0]         ptr_next;
  logic [PW-GRAN_SH-1:0] coarse_next;

  always_comb begin
    ptr_next    = ptr + PW'(count);
    coarse_next = ptr_next[PW-1:GRAN_SH];
  end

  always_ff @(posedge wr_clk or negedge rst_n)
    if (!rst_n) begin
      ptr         <= '0;
      coarse_gray <= '0;
    end else begin
      ptr         <= ptr_next;
      coarse_gray <= coarse_next ^ (coarse_next >> 1);
    end

  initial assert (NBITS <= (1 << GRAN_SH))
    else $error("load_pointer: a read may not add more than 2**GRAN_SH");
endmodule
