// tb_alu_testchip - end-to-end test of the six-ALU test chip at its default size (64 bits, six
// ALUs, 2^10 divider), with no parameter overrides.
//
// Phase 1, normal operation: every cycle each ALU gets a random op and random one-hot selects;
// operands come from the loop-back buses of any ALU (forwarding, including its own bus) or from
// the external legs. A reference model built from the SystemVerilog operators tracks every
// ALU's result; right after each rising edge every sumb bus must hold the complement of the
// model's result. Directed: the critical-path and the all-ones additions.
// Phase 2, functional self-test: the hardwired vectors run through ALU 0; func_done and
// func_pass must rise with no error, and the two documented results must appear on ALU 0.
// Phase 3, delay measurement: the loop of ALU 0 is broken and driven by the critical-path and
// the worst-case-power patterns. With clk_late equal to clk the comparator must report pass;
// with clk_late 2 ns behind clk the late register sees the next result (in a zero-delay
// simulation the data arrives immediately) and the comparator must report fail.
// In normal operation each ALU's clock is stopped in about one cycle in ten (as when only some
// ALUs are clocked for the power measurement); its result must then stay on its bus.
// Throughout, fmax must toggle every 512 cycles. Each mechanism is counted and must occur.
module tb_alu_testchip;
  import alu_pkg::*;
  localparam int W = WIDTH;

  logic clk = 1'b0, clk_d = 1'b0, clk_late, rst_n = 1'b1, skew_on = 1'b0;
  test_mode_e test_mode = TM_NORMAL;
  logic [N_ALU-1:0] alu_clk_en = '1;
  pattern_e   pattern   = PAT_CRIT;
  alu_op_e    op [N_ALU];
  logic [N_ALU-1:0][N_MUX9-1:0]        sel_a9 = '0, sel_b9 = '0;
  logic [N_ALU-1:0][N_MUX5-1:0]        sel_a5 = '0;
  logic [N_ALU-1:0][N_EXT9-1:0][W-1:0] ext_a9 = '0, ext_b9 = '0;
  logic [N_ALU-1:0][N_EXT5-1:0][W-1:0] ext_a5 = '0;
  logic [N_ALU-1:0][W-1:0]             sumb;
  logic fmax, delay_fail, delay_fail_seen, func_done, func_pass;
  logic [7:0] func_errors;

  int checks = 0, failures = 0;
  int n_fwd_other = 0, n_fwd_self = 0, n_ext = 0, n_ext5 = 0, n_crit = 0, n_power = 0;
  int n_gated = 0;
  int n_func_pass = 0, n_delay_pass = 0, n_delay_fail = 0, n_fmax = 0;
  int n_op[5] = '{default: 0};
  logic [N_ALU-1:0][W-1:0] res = '0;  // model of every ALU's current result

  always #5 clk = ~clk;
  always @(clk) begin #2; clk_d = clk; end
  assign clk_late = skew_on ? clk_d : clk;

  alu_testchip dut (.*);

  function automatic logic [W-1:0] f(alu_op_e o, logic [W-1:0] a, logic [W-1:0] b);
    unique case (o)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      default: return a ^ b;
    endcase
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // random normal-mode cycle for ALUs first..N_ALU-1; leg 0..5 forwarding, 6..8 external
  task automatic normal_cycle(int first, int no_fwd_from_0);
    logic [N_ALU-1:0][W-1:0] nxt;
    int ka, kb, k5;
    logic [W-1:0] a, b;
    @(negedge clk);
    rst_n = 1'b1;  // a reset requested by the caller ends with the first new operation
    nxt = res;
    for (int i = first; i < N_ALU; i++) begin
      for (int k = 0; k < N_EXT9; k++) begin ext_a9[i][k] = {$urandom, $urandom}; ext_b9[i][k] = {$urandom, $urandom}; end
      for (int k = 0; k < N_EXT5; k++) ext_a5[i][k] = {$urandom, $urandom};
      op[i] = alu_op_e'($urandom_range(0, 4));
      do ka = $urandom_range(0, N_MUX9 - 1); while (no_fwd_from_0 != 0 && ka == 0);
      do kb = $urandom_range(0, N_MUX9 - 1); while (no_fwd_from_0 != 0 && kb == 0);
      k5 = ($urandom_range(0, 4) == 0) ? $urandom_range(1, N_MUX5 - 1) : 0;
      sel_a9[i] = N_MUX9'(1) << ka;
      sel_b9[i] = N_MUX9'(1) << kb;
      sel_a5[i] = N_MUX5'(1) << k5;
      a = (k5 != 0) ? ext_a5[i][k5-1] : (ka < N_ALU) ? res[ka] : ext_a9[i][ka - N_ALU];
      b = (kb < N_ALU) ? res[kb] : ext_b9[i][kb - N_ALU];
      if (k5 != 0) n_ext5++;
      if ((k5 == 0 && ka < N_ALU && ka != i) || (kb < N_ALU && kb != i)) n_fwd_other++;
      if ((k5 == 0 && ka == i) || kb == i) n_fwd_self++;
      if ((k5 == 0 && ka >= N_ALU) || kb >= N_ALU) n_ext++;
      alu_clk_en[i] = ($urandom_range(0, 9) != 0);
      if (alu_clk_en[i]) begin
        n_op[int'(op[i])]++;
        nxt[i] = f(op[i], a, b);
      end else begin
        n_gated++;  // clock of this ALU stopped: its result stays
      end
    end
    res = nxt;
    @(posedge clk); #1;
    for (int i = first; i < N_ALU; i++) begin
      check(sumb[i] === ~res[i], $sformatf("ALU %0d result", i));
      if (sumb[i] !== ~res[i] && failures < 4) $display("  op=%s sel_a9=%b sel_a5=%b sel_b9=%b got=%h exp=%h", op[i].name(), sel_a9[i], sel_a5[i], sel_b9[i], ~sumb[i], res[i]);
    end
  endtask

  task automatic directed(int i, alu_op_e o, logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] exp);
    @(negedge clk);
    op[i] = o; ext_a9[i][0] = a; ext_b9[i][0] = b;
    sel_a9[i] = N_MUX9'(1) << N_ALU; sel_b9[i] = N_MUX9'(1) << N_ALU; sel_a5[i] = 5'b00001;
    @(posedge clk); #1;
    res[i] = exp;
    check(sumb[i] === ~exp && exp == f(o, a, b), "directed");
  endtask

  // fmax toggles exactly every 512 cycles
  initial begin
    static int since = 0;
    logic last;
    @(posedge rst_n);
    last = fmax;
    forever begin
      @(posedge clk); #1;
      if (!rst_n) begin
        since = 0;
        last  = 1'b0;
        continue;
      end
      since++;
      if (fmax != last) begin
        check(since == 512, "fmax period");
        n_fmax++;
        since = 0;
        last = fmax;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen_crit, seen_power;
    for (int i = 0; i < N_ALU; i++) op[i] = OP_ADD;
    #1 rst_n = 1'b0;  // asynchronous reset, before any clock edge
    #1;
    check(sumb == '1, "reset: all results 0");
    @(negedge clk) rst_n = 1'b1;

    // phase 1: normal operation
    directed(3, OP_ADD, 64'h00FFFFFFFFF80000, 64'h0000000000080000, 64'h0100000000000000);
    n_crit++;
    directed(5, OP_ADD, '1, '1, 64'hFFFFFFFFFFFFFFFE);
    n_power++;
    repeat (1500) normal_cycle(0, 0);

    // phase 2: functional self-test through ALU 0, others keep running without ALU 0's bus
    @(negedge clk);
    rst_n = 1'b0;
    res = '0;
    test_mode = TM_FUNC;
    alu_clk_en = '1;
    seen_crit = 0; seen_power = 0;
    for (int c = 0; c < 12; c++) begin
      normal_cycle(1, 1);
      if (sumb[0] == ~64'h0100000000000000) seen_crit = 1;
      if (sumb[0] == ~64'hFFFFFFFFFFFFFFFE) seen_power = 1;
    end
    check(func_done && func_pass && func_errors == 0, "functional self-test");
    check(seen_crit && seen_power, "documented vectors on ALU 0");
    if (func_done && func_pass) n_func_pass++;

    // phase 3: delay measurement, loop end = ALU 0's own bus through 9:1 leg 0 and 5:1 leg 0
    @(negedge clk);
    rst_n = 1'b0;
    res = '0;
    test_mode = TM_DELAY;
    alu_clk_en = '1;
    sel_a9[0] = 9'b000000001; sel_a5[0] = 5'b00001;
    for (int p = 0; p < 2; p++) begin
      pattern = (p != 0) ? PAT_POWER : PAT_CRIT;
      for (int c = 0; c < 20; c++) begin
        normal_cycle(1, 1);
        if (sumb[0] == ~64'h0100000000000000) n_crit++;
        if (sumb[0] == ~64'hFFFFFFFFFFFFFFFE) n_power++;
        check(sumb[0] == '1 || sumb[0] == ~((p != 0) ? 64'hFFFFFFFFFFFFFFFE : 64'h0100000000000000), "delay pattern result");
        check(!delay_fail, "no skew: pass");
      end
    end
    check(!delay_fail_seen, "no skew: never failed");
    if (!delay_fail_seen) n_delay_pass++;
    pattern = PAT_CRIT;
    skew_on = 1'b1;
    repeat (10) normal_cycle(1, 1);
    check(delay_fail_seen, "skewed clock: comparator flags the miss");
    if (delay_fail_seen) n_delay_fail++;
    skew_on = 1'b0;

    // back to normal operation until fmax has toggled a few times
    @(negedge clk);
    rst_n = 1'b0;
    res = '0;
    test_mode = TM_NORMAL;
    repeat (1000) normal_cycle(0, 0);

    $display("forward-other %0d forward-self %0d ext9 %0d ext5 %0d crit %0d power %0d clock-stopped %0d",
             n_fwd_other, n_fwd_self, n_ext, n_ext5, n_crit, n_power, n_gated);
    check(n_gated > 0, "ALU clocks stopped");
    $display("ops add %0d sub %0d and %0d or %0d xor %0d; func-pass %0d delay-pass %0d delay-fail %0d fmax-toggles %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_func_pass, n_delay_pass, n_delay_fail, n_fmax);
    check(n_fwd_other > 0 && n_fwd_self > 0 && n_ext > 0 && n_ext5 > 0, "forwarding and external legs used");
    check(n_crit > 1 && n_power > 1, "critical and worst-case vectors");
    check(n_op[0] > 0 && n_op[1] > 0 && n_op[2] > 0 && n_op[3] > 0 && n_op[4] > 0, "all ops");
    check(n_func_pass > 0 && n_delay_pass > 0 && n_delay_fail > 0 && n_fmax > 0, "test modes and divider");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
