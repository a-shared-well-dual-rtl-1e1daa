// tb_alu_module - end-to-end check of one ALU module against a reference model built from the
// SystemVerilog operators. The module's own loop-back bus is fed back to forwarded leg 0, the
// five other forwarded legs carry random buses, and the external legs random operands. Each
// cycle a random op (ADD, SUB, AND, OR, XOR) and random one-hot selects are applied; right after
// the next rising edge sum must equal the reference result and sumb its complement (latency of
// one cycle, one operation per cycle). Dependent back-to-back operations, which take the
// previous result from the loop-back bus, are counted and must occur. Directed: the
// critical-path addition, the all-ones addition, a stopped clock (clk_en = 0) and the
// loop-break (brk) path.
module tb_alu_module;
  import alu_pkg::*;
  localparam int W = 64;
  logic                     clk = 1'b0, rst_n = 1'b1, clk_en = 1'b1;
  alu_op_e                  op = OP_ADD;
  logic [N_ALU-1:0][W-1:0]  fwd_sumb;
  logic [N_EXT9-1:0][W-1:0] ext_a9 = '0, ext_b9 = '0;
  logic [N_EXT5-1:0][W-1:0] ext_a5 = '0;
  logic [N_MUX9-1:0]        sel_a9 = '0, sel_b9 = '0;
  logic [N_MUX5-1:0]        sel_a5 = '0;
  logic                     brk = 1'b0;
  logic [W-1:0]             tst_a = '0, tst_b = '0, ain_loop, sum, sumb;
  logic [N_ALU-1:1][W-1:0]  other = '0;
  int checks = 0, failures = 0, n_dep = 0, n_brk = 0;
  int n_op[5] = '{default: 0};

  always #5 clk = ~clk;

  assign fwd_sumb = {other, sumb};  // leg 0: own loop-back bus

  alu_module #(.W(W)) dut (.*);

  function automatic logic [W-1:0] f(alu_op_e o, logic [W-1:0] a, logic [W-1:0] b);
    unique case (o)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      default: return a ^ b;
    endcase
  endfunction

  task automatic check_result(logic [W-1:0] exp, string what);
    checks++;
    if (sum !== exp || sumb !== ~exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: sum=%h exp=%h", what, sum, exp);
    end
  endtask

  // one operation with both operands from external legs 6 (9:1) via 5:1 leg 0
  task automatic ext_op(alu_op_e o, logic [W-1:0] a, logic [W-1:0] b);
    @(negedge clk);
    op = o; ext_a9[0] = a; ext_b9[0] = b;
    sel_a9 = N_MUX9'(1) << N_ALU; sel_a5 = 5'b00001; sel_b9 = N_MUX9'(1) << N_ALU;
    @(posedge clk); #1;
    check_result(f(o, a, b), o.name());
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev, a, b;
    int ka, kb, k5;
    alu_op_e o;
    #1 rst_n = 1'b0;  // asynchronous reset, before any clock edge
    #1;
    check_result('0, "reset");
    @(negedge clk) rst_n = 1'b1;
    ext_op(OP_ADD, 64'h00FFFFFFFFF80000, 64'h0000000000080000);
    check_result(64'h0100000000000000, "critical path");
    ext_op(OP_ADD, '1, '1);
    check_result(64'hFFFFFFFFFFFFFFFE, "all ones");
    prev = sum;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int k = 1; k < N_ALU; k++) other[k] = {$urandom, $urandom};
      for (int k = 0; k < N_EXT9; k++) begin ext_a9[k] = {$urandom, $urandom}; ext_b9[k] = {$urandom, $urandom}; end
      for (int k = 0; k < N_EXT5; k++) ext_a5[k] = {$urandom, $urandom};
      o  = alu_op_e'($urandom_range(0, 4));
      ka = $urandom_range(0, N_MUX9 - 1);
      kb = $urandom_range(0, N_MUX9 - 1);
      k5 = ($urandom_range(0, 3) == 0) ? $urandom_range(1, N_MUX5 - 1) : 0;
      if (i % 4 == 0) ka = 0;  // make dependency chains frequent
      op = o;
      sel_a9 = N_MUX9'(1) << ka;
      sel_b9 = N_MUX9'(1) << kb;
      sel_a5 = N_MUX5'(1) << k5;
      a = (k5 != 0) ? ext_a5[k5-1] : (ka == 0) ? prev : (ka < N_ALU) ? ~other[ka] : ext_a9[ka - N_ALU];
      b = (kb == 0) ? prev : (kb < N_ALU) ? ~other[kb] : ext_b9[kb - N_ALU];
      if ((k5 == 0 && ka == 0) || kb == 0) n_dep++;
      n_op[int'(o)]++;
      @(posedge clk); #1;
      prev = f(o, a, b);
      check_result(prev, o.name());
    end
    // clock stopped: the result must stay on the bus whatever is presented
    @(negedge clk);
    clk_en = 1'b0;
    sel_a9 = 9'b000000001; sel_b9 = 9'b000000001; sel_a5 = 5'b00001; op = OP_ADD;
    repeat (5) begin
      @(posedge clk); #1;
      check_result(prev, "clock stopped");
    end
    @(negedge clk) clk_en = 1'b1;
    @(posedge clk); #1;
    prev = prev + prev;
    check_result(prev, "clock restarted");
    // loop broken at the GP input: operands from tst_a/tst_b, ain_loop still observable
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      brk = 1'b1;
      tst_a = {$urandom, $urandom};
      tst_b = {$urandom, $urandom};
      o = (i % 2) ? OP_SUB : OP_XOR;
      op = o;
      sel_a9 = 9'b000000001; sel_a5 = 5'b00001;
      #1;
      checks++;
      if (ain_loop !== prev) begin failures++; $display("FAIL ain_loop"); end
      @(posedge clk); #1;
      prev = f(o, tst_a, tst_b);
      check_result(prev, "brk");
      n_brk++;
    end
    $display("dependent back-to-back ops %0d, loop-break ops %0d, op mix %0d %0d %0d %0d %0d",
             n_dep, n_brk, n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    checks++;
    if (n_dep == 0 || n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_op[4] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
