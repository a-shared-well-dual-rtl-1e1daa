// gp_gen - generate/propagate generator, the first hard clock edge of the ALU loop.
//
// At the rising clock edge it captures the two operands and the control word of the
// operation; from the captured operands it drives, for every bit, the generate g = a & b and
// the propagate p = a ^ b. These two vectors feed the carry tree, the partial-sum
// precompute and the logic unit, which need nothing else of the operands (the logic unit
// forms a | b as g | p). In the circuit this is a clocked domino gate whose input is the
// timing boundary of the single-cycle bypass loop; here it is a register followed by gates.
// The active-low asynchronous reset clears the captured state and is this design's addition.
// With en = 0 the register holds, which models an ALU whose clock is stopped: the test chip
// measures power by clocking n or n+1 of its ALUs.
//
// Timing: operands and op presented before a rising edge with en = 1; g, p and ctrl valid
// after it, until the next enabled edge.
module gp_gen
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // clock enable of this ALU
  input  logic [W-1:0] ain,
  input  logic [W-1:0] bin,     // already complemented for SUB
  input  alu_op_e      op,
  output logic [W-1:0] g,
  output logic [W-1:0] p,
  output alu_ctrl_t    ctrl
);
  logic [W-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q  <= '0;
      b_q  <= '0;
      ctrl <= '0;
    end else if (en) begin
      a_q  <= ain;
      b_q  <= bin;
      ctrl <= decode_op(op);
    end
  end

  assign g = a_q & b_q;
  assign p = a_q ^ b_q;
endmodule
