// alu_testchip - six dual-supply 64-bit ALU modules on a shared forwarding network, with the
// on-chip delay-measurement and functional-test circuitry.
//
// The six ALUs model a six-issue integer execution unit. Every ALU drives its result onto its
// own loop-back bus sumb (inverted sum); every bus reaches legs 0..5 of the 9:1 operand
// multiplexers of all six ALUs, so any result can be used by any ALU in the next cycle. Legs
// 6..8 of the 9:1 multiplexers and legs 1..4 of the 5:1 multiplexer come from outside (register
// files and cache) through the ext_* ports.
//
// Test circuitry around ALU 0:
//   TM_DELAY - the loop of ALU 0 is broken at its GP input, which the data generator now
//              drives; the loop end (a-operand multiplexer output, selected as in normal
//              operation) is captured by Data Reg 1 on clk and Data Reg 2 on clk_late, a copy
//              of clk delayed by a small skew, and the comparator reports on delay_fail whether
//              the two differ, i.e. whether the early register missed the data;
//   TM_FUNC  - the hardwired vectors of the data generator run through ALU 0 and func_checker
//              compares each result with its precomputed value (meant for a slow clock).
// The frequency divider brings clk / 2^10 out on fmax in every mode. alu_clk_en stops the
// clock of individual ALUs, so that power can be compared with n and n+1 ALUs clocked.
//
// The ring oscillator that produces clk, the clock driver, the small delay that makes clk_late,
// the load capacitance and the control circuitry are not logic; their clocks enter as ports.
// Six ALUs, the test structure and the 2^10 divider follow the document; the port layout, the
// use of ALU 0 as the unit under test and the mode encoding are this design's.
//
// Timing: one operation per ALU per clock; results appear on sumb in the cycle after their
// operands and op were presented.
module alu_testchip
  import alu_pkg::*;
#(
  parameter int unsigned W        = WIDTH,
  parameter int unsigned LOG2_DIV = 10
) (
  input  logic                                 clk,
  input  logic                                 clk_late,
  input  logic                                 rst_n,
  input  test_mode_e                           test_mode,
  input  logic [N_ALU-1:0]                     alu_clk_en,  // clock each ALU (power measurement)
  input  pattern_e                             pattern,     // data generator, TM_DELAY only
  input  alu_op_e                              op     [N_ALU],
  input  logic [N_ALU-1:0][N_MUX9-1:0]         sel_a9,
  input  logic [N_ALU-1:0][N_MUX5-1:0]         sel_a5,
  input  logic [N_ALU-1:0][N_MUX9-1:0]         sel_b9,
  input  logic [N_ALU-1:0][N_EXT9-1:0][W-1:0]  ext_a9,
  input  logic [N_ALU-1:0][N_EXT5-1:0][W-1:0]  ext_a5,
  input  logic [N_ALU-1:0][N_EXT9-1:0][W-1:0]  ext_b9,
  output logic [N_ALU-1:0][W-1:0]              sumb,        // loop-back buses (inverted sums)
  output logic                                 fmax,        // clk / 2^LOG2_DIV
  output logic                                 delay_fail,
  output logic                                 delay_fail_seen,
  output logic [7:0]                           func_errors,
  output logic                                 func_done,
  output logic                                 func_pass
);
  logic                      brk;
  pattern_e                  dg_pattern;
  logic [W-1:0]              dg_a, dg_b, dg_exp;
  alu_op_e                   dg_op;
  logic                      dg_last;
  logic [N_ALU-1:0][W-1:0]   sum, ain_loop;
  logic [W-1:0]              reg1_q, reg2_q;

  assign brk        = (test_mode != TM_NORMAL);
  assign dg_pattern = (test_mode == TM_FUNC) ? PAT_ROM : pattern;

  for (genvar i = 0; i < N_ALU; i++) begin : g_alu
    alu_op_e alu_op;
    if (i == 0) begin : g_dut
      assign alu_op = brk ? dg_op : op[0];
    end else begin : g_plain
      assign alu_op = op[i];
    end

    alu_module #(.W(W)) u_alu (
      .clk, .rst_n,
      .clk_en   (alu_clk_en[i]),
      .op       (alu_op),
      .fwd_sumb (sumb),
      .ext_a9   (ext_a9[i]),
      .ext_a5   (ext_a5[i]),
      .ext_b9   (ext_b9[i]),
      .sel_a9   (sel_a9[i]),
      .sel_a5   (sel_a5[i]),
      .sel_b9   (sel_b9[i]),
      .brk      (i == 0 ? brk : 1'b0),
      .tst_a    (dg_a[W-1:0]),
      .tst_b    (dg_b[W-1:0]),
      .ain_loop (ain_loop[i]),
      .sum      (sum[i]),
      .sumb     (sumb[i])
    );
  end

  data_gen u_dgen (
    .clk, .rst_n, .en(brk), .pattern(dg_pattern),
    .a(dg_a), .b(dg_b), .op(dg_op), .expected(dg_exp), .last(dg_last)
  );

  test_ff #(.W(W)) u_reg1 (.ck(clk),      .rst_n, .d(ain_loop[0]), .q(reg1_q));
  test_ff #(.W(W)) u_reg2 (.ck(clk_late), .rst_n, .d(ain_loop[0]), .q(reg2_q));

  pass_fail_comparator #(.W(W)) u_comp (
    .ck(clk), .rst_n, .en(test_mode == TM_DELAY), .early(reg1_q), .late(reg2_q),
    .fail(delay_fail), .fail_seen(delay_fail_seen)
  );

  func_checker #(.W(W)) u_fchk (
    .clk, .rst_n, .en(test_mode == TM_FUNC), .last(dg_last), .expected(dg_exp), .sum(sum[0]),
    .errors(func_errors), .done(func_done), .pass(func_pass)
  );

  freq_divider #(.LOG2_DIV(LOG2_DIV)) u_div (.clk, .rst_n, .fmax);
endmodule
