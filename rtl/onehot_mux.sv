// onehot_mux - N-leg multiplexer with one-hot select, the logic function of the clocked
// (domino) multiplexers of the operand selector.
//
// Each leg is a select transistor stacked on its data input; the legs share one dynamic node,
// so the output is the OR over all legs of (sel[i] AND d[i]). With no select asserted the node
// stays precharged and the output is 0. At most one select may be asserted at a time; the
// clocked assertion that checks this sits in the ALU module, which has the clock. Purely
// combinational; no latency.
module onehot_mux #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 64
) (
  input  logic [N-1:0]        sel,
  input  logic [N-1:0][W-1:0] d,
  output logic [W-1:0]        y
);
  always_comb begin
    y = '0;
    for (int i = 0; i < N; i++)
      y |= d[i] & {W{sel[i]}};
  end
endmodule
