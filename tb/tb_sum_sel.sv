// tb_sum_sel - checks that every sum bit comes from s1 when the carry into its 4-bit group is
// 1 and from s0 otherwise, for random s0, s1 and carries and for single-carry patterns.
module tb_sum_sel;
  import alu_pkg::*;
  localparam int W = 64, NG = W / GROUP;
  logic [W-1:0]  s0, s1, sum, exp;
  logic [NG-1:0] carry;
  int checks = 0, failures = 0;

  sum_sel #(.W(W)) dut (.s0, .s1, .carry, .sum);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      s0 = {$urandom, $urandom};
      s1 = {$urandom, $urandom};
      carry = (i < NG) ? NG'(1) << i : NG'($urandom);
      #1;
      for (int j = 0; j < NG; j++)
        exp[4*j +: 4] = carry[j] ? s1[4*j +: 4] : s0[4*j +: 4];
      checks++;
      if (sum !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL carry=%h sum=%h exp=%h", carry, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
