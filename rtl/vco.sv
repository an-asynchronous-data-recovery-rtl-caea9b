`timescale 1ps/1fs
// vco: BEHAVIOURAL MODEL of the retransmit clock oscillator. Not synthesizable
// logic: it stands for the analog oscillator of the retransmit side.
//
// The oscillator runs at the nominal bit rate (period T_PS) and is trimmed by
// the signed code from the timing control: each code step raises the
// frequency by STEP_PPM parts per million. The code is read at every edge, so
// a change takes effect within half a period. `en` low stops the clock low.
// The digital trim code and its step size are this model's choices; the
// description only says the retransmit clock frequency is adapted.
module vco
  import adr_pkg::*;
#(
  parameter real         T_PS     = T_BIT_PS,
  parameter real         STEP_PPM = VCO_STEP_PPM,
  parameter int unsigned VW       = VCO_CODE_W
) (
  input  logic                 en,
  input  logic signed [VW-1:0] code,
  output logic                 clk
);
  realtime half;

  always_comb
    half = 0.5 * T_PS / (1.0 + real'(code) * STEP_PPM * 1.0e-6);

  initial begin
    clk = 1'b0;
    forever begin
      #(half * 1ps);
      clk = en ? ~clk : 1'b0;
    end
  end
endmodule
