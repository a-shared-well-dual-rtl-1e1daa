// tb_gp_gen - checks the GP generator: after reset g, p and the control word are 0; after each
// rising edge g = a & b and p = a ^ b of the operands presented before it, and the control
// word decodes the op presented before it (arith for ADD/SUB, carry-in for SUB, the logic
// function otherwise). Also checks that the outputs hold while the inputs change mid-cycle,
// and that an edge with en = 0 (clock of the ALU stopped) leaves the outputs unchanged.
module tb_gp_gen;
  import alu_pkg::*;
  localparam int W = 64;
  logic         clk = 1'b0, rst_n = 1'b1, en = 1'b1;
  logic [W-1:0] ain = '0, bin = '0, g, p;
  alu_op_e      op = OP_ADD;
  alu_ctrl_t    ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gp_gen #(.W(W)) dut (.clk, .rst_n, .en, .ain, .bin, .op, .g, .p, .ctrl);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, na, nb;
    alu_op_e      o, no;
    int           n_hold = 0;
    ain = '1; bin = '1;
    #1 rst_n = 1'b0;  // asynchronous reset, before any clock edge
    #1;
    check(g == '0 && p == '0 && ctrl == '0, "reset state");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      na = {$urandom, $urandom};
      nb = {$urandom, $urandom};
      no = alu_op_e'($urandom_range(0, 4));
      en = (i < 2) || ($urandom_range(0, 4) != 0);
      ain = na; bin = nb; op = no;
      if (en) begin a = na; b = nb; o = no; end
      else n_hold++;
      @(posedge clk);
      #1;
      ain = ~na; bin = ~nb;  // must not reach the outputs before the next edge
      #1;
      check(g == (a & b), "g");
      check(p == (a ^ b), "p");
      check(ctrl.arith == (o == OP_ADD || o == OP_SUB), "arith");
      check(ctrl.cin == (o == OP_SUB), "cin");
      if (o == OP_OR)       check(ctrl.lfn == LF_OR, "lfn or");
      else if (o == OP_XOR) check(ctrl.lfn == LF_XOR, "lfn xor");
      else if (o == OP_AND) check(ctrl.lfn == LF_AND, "lfn and");
    end
    check(n_hold > 0, "held edges occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
