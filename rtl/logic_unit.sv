// logic_unit - logic functions of the ALU (low-supply domain in the circuit).
//
// Computes AND, OR or XOR of the captured operands from the generate/propagate vectors of the
// GP generator: a & b = g, a ^ b = p, a | b = g | p. The result is driven onto both s0 and s1,
// shared with the partial-sum precompute, so that the sum selector passes it through whatever
// the carries are. Disabled (during ADD/SUB) the outputs are 0. The functions follow the
// document; deriving them from g/p and sharing the s0/s1 lines is this design's reading of
// the block diagram. Purely combinational.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic         en,
  input  logic_fn_e    fn,
  output logic [W-1:0] y
);
  always_comb begin
    unique case (fn)
      LF_AND:  y = g;
      LF_OR:   y = g | p;
      LF_XOR:  y = p;
      default: y = '0;
    endcase
    if (!en) y = '0;
  end
endmodule
