// operand_selector - input operand selector of one ALU module.
//
// Operand a: a 9:1 multiplexer (ain0) followed by a 5:1 multiplexer (ain). Operand b: a 9:1
// multiplexer followed by a 2:1 multiplexer that passes either the selected value or its
// complement, the complement being used for subtraction. Six legs of each 9:1 multiplexer
// receive the loop-back buses sumb of the six ALU modules; since sumb carries the inverted
// sum, each leg first passes an inverter (INV2, the bus receiver) and the multiplexer sees the
// true sum. The three other 9:1 legs and the four other 5:1 legs come from the register files
// and the cache. This chain, the receiver and the complementing 2:1 stage follow the
// document's block diagram; the assignment of sources to legs is this design's choice.
//
// For the delay measurement the loop can be broken at the GP input: with brk = 1 the GP
// generator receives tst_a and tst_b (tst_b still passing the complementing stage) while
// ain_loop, the multiplexer output that normally closes the loop, remains observable.
//
// Selects are one-hot (or all zero, which gives 0 on that multiplexer). Purely combinational:
// all of this settles within the cycle that ends at the GP register.
module operand_selector
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic [N_ALU-1:0][W-1:0]  fwd_sumb,  // loop-back buses of ALU 0..5 (inverted sums)
  input  logic [N_EXT9-1:0][W-1:0] ext_a9,    // register file / cache legs, a-side 9:1
  input  logic [N_EXT5-1:0][W-1:0] ext_a5,    // register file / cache legs, 5:1
  input  logic [N_EXT9-1:0][W-1:0] ext_b9,    // register file / cache legs, b-side 9:1
  input  logic [N_MUX9-1:0]        sel_a9,    // one-hot: legs 0..5 forwarded, 6..8 external
  input  logic [N_MUX5-1:0]        sel_a5,    // one-hot: leg 0 = ain0, 1..4 external
  input  logic [N_MUX9-1:0]        sel_b9,
  input  logic                     b_inv,     // 2:1 stage: 1 selects the complement
  input  logic                     brk,       // break the loop at the GP input
  input  logic [W-1:0]             tst_a,
  input  logic [W-1:0]             tst_b,
  output logic [W-1:0]             ain,       // to the GP generator
  output logic [W-1:0]             bin,       // to the GP generator
  output logic [W-1:0]             ain_loop   // 5:1 output, end of the loop-back path
);
  logic [N_MUX9-1:0][W-1:0] legs_a9, legs_b9;
  logic [N_MUX5-1:0][W-1:0] legs_a5;
  logic [W-1:0] ain0, b9, b_src;

  always_comb begin
    for (int i = 0; i < int'(N_ALU); i++) begin
      legs_a9[i] = ~fwd_sumb[i];  // INV2 receiver
      legs_b9[i] = ~fwd_sumb[i];
    end
    for (int i = 0; i < int'(N_EXT9); i++) begin
      legs_a9[N_ALU+i] = ext_a9[i];
      legs_b9[N_ALU+i] = ext_b9[i];
    end
    legs_a5[0] = ain0;
    for (int i = 0; i < int'(N_EXT5); i++)
      legs_a5[1+i] = ext_a5[i];
  end

  onehot_mux #(.N(N_MUX9), .W(W)) u_mux9_a (.sel(sel_a9), .d(legs_a9), .y(ain0));
  onehot_mux #(.N(N_MUX5), .W(W)) u_mux5_a (.sel(sel_a5), .d(legs_a5), .y(ain_loop));
  onehot_mux #(.N(N_MUX9), .W(W)) u_mux9_b (.sel(sel_b9), .d(legs_b9), .y(b9));

  assign ain   = brk ? tst_a : ain_loop;
  assign b_src = brk ? tst_b : b9;
  assign bin   = b_inv ? ~b_src : b_src;  // 2:1 true/complement stage
endmodule
