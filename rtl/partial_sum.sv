// partial_sum - sum precompute of the sparse adder (low-supply domain in the circuit).
//
// For every 4-bit group it computes both possible sums ahead of the carry: s0 assumes a carry
// of 0 into the group, s1 a carry of 1. Inside a group the carries ripple from the bit-level
// generate/propagate (c[i+1] = g[i] | p[i]&c[i]) and each sum bit is p[i] ^ c[i]. The carry
// tree then only has to pick one of the two per group. The block is enabled for ADD/SUB only;
// disabled, both outputs stay 0, like a domino stage that is not evaluated, so that the logic
// unit can drive the shared s0/s1 lines instead. The document gives the function (conditional
// sums precomputed in lookahead fashion, selected by every fourth carry); the ripple inside a
// group and the enable are this design's choice. Purely combinational.
module partial_sum
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic         en,
  output logic [W-1:0] s0,
  output logic [W-1:0] s1
);
  always_comb begin
    logic c0, c1;
    s0 = '0;
    s1 = '0;
    for (int j = 0; j < int'(W / GROUP); j++) begin
      c0 = 1'b0;
      c1 = 1'b1;
      for (int i = GROUP * j; i < int'(GROUP * (j + 1)); i++) begin
        s0[i] = en & (p[i] ^ c0);
        s1[i] = en & (p[i] ^ c1);
        c0 = g[i] | (p[i] & c0);
        c1 = g[i] | (p[i] & c1);
      end
    end
  end
endmodule
