`timescale 1ps/1fs
// sample_latch: captures the delay line at the instant of a rising data
// transition.
//
// Each bit period spans TAPS_PER_BIT taps of the delay line. At the rising edge
// of the read pulse the tap half a bit period behind each bit boundary sits in
// the middle of a bit, so the taps at delays (m + 1/2)*T, m = 0 .. NBITS-1,
// hold the centres of the NBITS bits that arrived before the transition. This
// is equivalent to sampling every stage T/2 after the transition, as in the
// design description. smp[0] is the newest bit (just before the transition),
// smp[NBITS-1] the oldest.
//
// Clocked by the read pulse; asynchronous active-low reset clears the samples.
module sample_latch
  import adr_pkg::*;
#(
  parameter int unsigned NBITS = N_BITS,
  parameter int unsigned TPB   = TAPS_PER_BIT
) (
  input  logic                read_pulse,
  input  logic                rst_n,
  input  logic [NBITS*TPB-1:0] tap,
  output logic [NBITS-1:0]    smp
);
  // tap[k] is the input delayed by (k+1)*T/TPB; the mid-bit tap of bit m is
  // delay (m*TPB + TPB/2)*T/TPB, i.e. index m*TPB + TPB/2 - 1.
  logic [NBITS-1:0] mid;
  always_comb
    for (int m = 0; m < int'(NBITS); m++)
      mid[m] = tap[m*TPB + TPB/2 - 1];

  always_ff @(posedge read_pulse or negedge rst_n)
    if (!rst_n) smp <= '0;
    else        smp <= mid;
endmodule
