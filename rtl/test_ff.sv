// test_ff - data register of the delay measurement (Data Reg 1 / Data Reg 2).
//
// A rising-edge register of W bits that captures the end of the ALU loop (the a-operand
// multiplexer output). In the circuit each bit is a dynamic flip-flop built to present the
// same input load and setup time as the GP generator gate it stands in for, so that the broken
// loop has exactly the timing of the closed one; logically it is a plain D flip-flop. Two of
// them, one clocked by the chip clock and one by a slightly delayed copy, feed the comparator.
// The synchronous behaviour follows the document; the reset is this design's addition.
module test_ff #(
  parameter int unsigned W = 64
) (
  input  logic         ck,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge ck or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
