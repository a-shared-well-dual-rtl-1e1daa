// pass_fail_comparator - comparator of the delay measurement.
//
// Compares the contents of the early data register (chip clock) and the late data register
// (clock delayed by a small skew). If the loop result arrived in time both hold the same word
// and the output is pass; if they differ the early register missed the data and the Pass/Fail
// pad shows fail. The measurement raises the clock frequency until this output toggles. The
// function is the document's; the word-wide equality, the registered output (sampled on the
// next rising edge of the chip clock, when both registers hold the word of the same cycle) and
// the sticky flag that keeps a single miss visible at low pad bandwidth are this design's.
//
// Timing: fail is updated on the rising edge of ck; fail_seen stays set until reset.
module pass_fail_comparator #(
  parameter int unsigned W = 64
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic         en,       // delay measurement running
  input  logic [W-1:0] early,
  input  logic [W-1:0] late,
  output logic         fail,
  output logic         fail_seen
);
  logic mismatch;
  assign mismatch = en && (early != late);

  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) begin
      fail      <= 1'b0;
      fail_seen <= 1'b0;
    end else begin
      fail      <= mismatch;
      fail_seen <= fail_seen | mismatch;
    end
endmodule
