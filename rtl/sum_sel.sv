// sum_sel - sum selector of the sparse adder, the second hard clock edge of the ALU.
//
// Each sum bit takes s1 if the carry into its 4-bit group is 1 and s0 otherwise:
// sum[i] = carry[i/4] ? s1[i] : s0[i]. In the circuit this gate also converts the low-supply
// s0/s1 signals back to the high supply and produces the carry complement the single-rail
// carry tree does not provide; neither has a logic function of its own. Purely combinational.
module sum_sel
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [W-1:0]       s0,
  input  logic [W-1:0]       s1,
  input  logic [W/GROUP-1:0] carry,
  output logic [W-1:0]       sum
);
  always_comb
    for (int i = 0; i < int'(W); i++)
      sum[i] = carry[i / GROUP] ? s1[i] : s0[i];
endmodule
