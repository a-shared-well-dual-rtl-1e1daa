// tb_data_gen - checks the data generator. PAT_CRIT and PAT_POWER must alternate 0 + 0 with
// their addition, and the expected result of every vector must equal the result computed here
// with the SystemVerilog operators. PAT_ROM must run through eight vectors whose expected
// results agree with the operators, raise last on the eighth and wrap to the first; the
// generator must hold its state while en = 0.
module tb_data_gen;
  import alu_pkg::*;
  localparam int W = WIDTH;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, last;
  pattern_e pattern = PAT_CRIT;
  logic [W-1:0] a, b, expected;
  alu_op_e op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  data_gen dut (.*);

  function automatic logic [W-1:0] f(alu_op_e o, logic [W-1:0] x, logic [W-1:0] y);
    unique case (o)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      default: return x ^ y;
    endcase
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] first_a;
    int n_ops[5] = '{default: 0};
    @(negedge clk) rst_n = 1'b1;
    en = 1'b1;
    pattern = PAT_CRIT;
    for (int i = 0; i < 6; i++) begin
      #1;
      check(expected == f(op, a, b), "crit expected");
      if (i % 2 == 0) check(a == '0 && b == '0, "crit zero phase");
      else check(op == OP_ADD && a == 64'h00FFFFFFFFF80000 && b == 64'h0000000000080000 &&
                 expected == 64'h0100000000000000, "crit vector");
      @(negedge clk);
    end
    pattern = PAT_POWER;
    for (int i = 0; i < 6; i++) begin
      #1;
      check(expected == f(op, a, b), "power expected");
      if (a != '0) check(a == '1 && b == '1 && expected == 64'hFFFFFFFFFFFFFFFE, "power vector");
      @(negedge clk);
    end
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    pattern = PAT_ROM;
    #1;
    first_a = a;
    for (int i = 0; i < 16; i++) begin
      #1;
      check(expected == f(op, a, b), "rom expected");
      check(last == ((i % 8) == 7), "last");
      if (i == 8) check(a == first_a, "wrap");
      n_ops[int'(op)]++;
      @(negedge clk);
    end
    check(n_ops[0] > 0 && n_ops[1] > 0 && n_ops[2] > 0 && n_ops[3] > 0 && n_ops[4] > 0, "op coverage");
    en = 1'b0;
    first_a = a;
    repeat (3) @(negedge clk);
    check(a == first_a, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
