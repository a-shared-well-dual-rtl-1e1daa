// freq_divider - 2^10 clock divider that brings the on-chip clock frequency out to a pad.
//
// The clock of the test chip comes from a ring oscillator whose frequency is set by its supply
// voltage; near 1 GHz it cannot be observed directly, so a binary counter divides it by
// 2^LOG2_DIV and its most significant bit drives the Fmax pad. The output is a square wave
// with a period of 2^LOG2_DIV input cycles. The ratio 2^10 is the document's; the ripple-free
// counter implementation and the asynchronous reset are this design's.
module freq_divider #(
  parameter int unsigned LOG2_DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic fmax
);
  logic [LOG2_DIV-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;

  assign fmax = cnt[LOG2_DIV-1];
endmodule
