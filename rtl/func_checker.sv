// func_checker - checker of the on-chip functional test.
//
// Compares the ALU result with the precomputed result of each hardwired vector. The expected
// word travels with the vector: it is captured at the same rising edge at which the GP
// generator captures the operands, and the ALU sum of that vector is valid during the cycle
// that follows, so the comparison is made at the next edge. The test runs from a slow external
// clock, so the comparison has no timing of its own. Counts the mismatching vectors, and raises
// done after the final vector has been checked; pass = done with no error. The comparison
// against hardwired results is the document's; the error counter, done and pass are this
// design's.
module func_checker #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,        // a vector is presented to the ALU this cycle
  input  logic         last,      // it is the final one
  input  logic [W-1:0] expected,  // its result
  input  logic [W-1:0] sum,       // ALU result of the vector captured at the previous edge
  output logic [7:0]   errors,
  output logic         done,
  output logic         pass
);
  logic [W-1:0] exp_q;
  logic         vld_q, last_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      exp_q  <= '0;
      vld_q  <= 1'b0;
      last_q <= 1'b0;
      errors <= '0;
      done   <= 1'b0;
    end else begin
      exp_q  <= expected;
      vld_q  <= en;
      last_q <= en & last;
      if (vld_q && sum != exp_q && errors != 8'hFF) errors <= errors + 1'b1;
      if (vld_q && last_q) done <= 1'b1;
    end

  assign pass = done && (errors == '0);
endmodule
