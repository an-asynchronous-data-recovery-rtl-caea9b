`timescale 1ps/1fs
// retimer: the output stage that combines the FIFO output with the retransmit
// clock. The bit read from the FIFO is registered on the rising edge of the
// retransmit clock, so the outgoing data carries only the jitter of that
// clock, not the jitter of the incoming data. `valid` marks the bit periods in
// which real data is sent; while the timing control holds transmission off,
// the output is held low. Asynchronous active-low reset. Using a register for
// the combining element is this design's choice.
module retimer (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic din,
  output logic dout,
  output logic valid
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout  <= 1'b0;
      valid <= 1'b0;
    end else begin
      dout  <= en ? din : 1'b0;
      valid <= en;
    end
endmodule
