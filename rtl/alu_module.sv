// alu_module - one 64-bit ALU module with its operand selector and loop-back bus driver.
//
// Executes ADD, SUB, AND, OR and XOR in a single cycle. Dataflow per cycle:
//   operand_selector -> gp_gen (clock edge) -> carry_gen (sparse radix-4, every 4th carry)
//                                            -> partial_sum / logic_unit -> s0/s1
//                    -> sum_sel -> INV1 -> sumb (long loop-back bus to all six ALUs)
// SUB is a + ~b + 1: the operand selector complements b and the carry-in is 1. The partial
// sum and the logic unit share the s0/s1 lines; only one of them is enabled, so the lines are
// the OR of both. The output buffer INV1 drives sumb = ~sum, which is received by INV2 inside
// the operand selectors of every ALU, closing the single-cycle bypass loop: a result is on
// sumb in the cycle after its operands were captured, and a dependent operation in any ALU
// can select it and be captured at the next edge (one operation per cycle, latency 1).
// With clk_en = 0 the module is not clocked and its result stays on sumb.
//
// In the circuit the carry path (GP generator, carry tree, sum selector, multiplexers) runs
// from the high supply and the partial sum, logic unit and bus driver from the low supply;
// that split has no logic function and appears here only in comments. The structure follows
// the document's block diagram; the ports for breaking the loop (brk, tst_*, ain_loop) serve
// the on-chip delay measurement and functional test.
module alu_module
  import alu_pkg::*;
#(
  parameter int unsigned W = WIDTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clk_en,    // 0: clock of this ALU stopped, result held
  input  alu_op_e                  op,
  input  logic [N_ALU-1:0][W-1:0]  fwd_sumb,
  input  logic [N_EXT9-1:0][W-1:0] ext_a9,
  input  logic [N_EXT5-1:0][W-1:0] ext_a5,
  input  logic [N_EXT9-1:0][W-1:0] ext_b9,
  input  logic [N_MUX9-1:0]        sel_a9,
  input  logic [N_MUX5-1:0]        sel_a5,
  input  logic [N_MUX9-1:0]        sel_b9,
  input  logic                     brk,
  input  logic [W-1:0]             tst_a,
  input  logic [W-1:0]             tst_b,
  output logic [W-1:0]             ain_loop,
  output logic [W-1:0]             sum,
  output logic [W-1:0]             sumb
);
  logic [W-1:0]       ain, bin, g, p, ps0, ps1, lu, s0, s1;
  logic [W/GROUP-1:0] carry;
  alu_ctrl_t          ctrl;

  operand_selector #(.W(W)) u_opsel (
    .fwd_sumb, .ext_a9, .ext_a5, .ext_b9, .sel_a9, .sel_a5, .sel_b9,
    .b_inv(op == OP_SUB), .brk, .tst_a, .tst_b, .ain, .bin, .ain_loop
  );

  gp_gen #(.W(W)) u_gp (.clk, .rst_n, .en(clk_en), .ain, .bin, .op, .g, .p, .ctrl);

  carry_gen #(.W(W)) u_carry (.g, .p, .cin(ctrl.cin), .carry);

  partial_sum #(.W(W)) u_psum (.g, .p, .en(ctrl.arith), .s0(ps0), .s1(ps1));

  logic_unit #(.W(W)) u_lu (.g, .p, .en(!ctrl.arith), .fn(ctrl.lfn), .y(lu));

  assign s0 = ps0 | lu;
  assign s1 = ps1 | lu;

  sum_sel #(.W(W)) u_sel (.s0, .s1, .carry, .sum);

  assign sumb = ~sum;  // INV1, output buffer driving the loop-back bus

  // The clocked multiplexers allow at most one active leg.
  a_sel_onehot : assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(sel_a9) && $onehot0(sel_a5) && $onehot0(sel_b9));
endmodule
