`timescale 1ps/1fs
// purge_logic: the combinational logic between the sample latches and the
// FIFO. It drops the samples already stored at the previous read and puts the
// new ones in transmission order.
//
// Reads happen on rising data transitions only, so the samples of one read
// look (oldest to newest) like ...0 | 1..1 0..0, where the "0 | 1" boundary is
// the previous rising transition, already handled by the previous read. The
// encoder finds the newest such boundary: the smallest k with smp[k] = 1 and
// smp[k+1] = 0. The bits smp[k] .. smp[0] are new, count = k+1. When no
// boundary is visible (the previous rising transition is older than the
// line, or this is the first transition) every sample is new, count = NBITS;
// this is how the bits preceding the first transition are recovered.
//
// Outputs: bits[j], j = 0 .. count-1, is the j-th new bit in order of
// arrival (bits[0] the oldest); bits above count-1 are zero. Purely
// combinational.
module purge_logic
  import adr_pkg::*;
#(
  parameter int unsigned NBITS = N_BITS,
  localparam int unsigned CW   = $clog2(NBITS + 1)
) (
  input  logic [NBITS-1:0] smp,
  output logic [NBITS-1:0] bits,
  output logic [CW-1:0]    count
);
  int unsigned n;

  always_comb begin
    n = NBITS;
    for (int k = int'(NBITS) - 2; k >= 0; k--)
      if (smp[k] && !smp[k+1]) n = k + 1;
    count = CW'(n);
    bits  = '0;
    for (int j = 0; j < int'(NBITS); j++)
      if (j < int'(n)) bits[j] = smp[int'(n) - 1 - j];
  end
endmodule
