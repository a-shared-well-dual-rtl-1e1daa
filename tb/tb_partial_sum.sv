// tb_partial_sum - checks the conditional group sums: for every 4-bit group, s0 must equal the
// low four bits of a_grp + b_grp and s1 those of a_grp + b_grp + 1; with the block disabled
// both must be 0. 2000 random operand pairs plus all-ones operands.
module tb_partial_sum;
  import alu_pkg::*;
  localparam int W = 64;
  logic [W-1:0] a, b, g, p, s0, s1;
  logic         en;
  int checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;
  partial_sum #(.W(W)) dut (.g, .p, .en, .s0, .s1);

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic e);
    logic [W-1:0] e0, e1;
    logic [4:0] t;
    a = x; b = y; en = e;
    for (int j = 0; j < W / GROUP; j++) begin
      t = 5'(x[4*j +: 4]) + 5'(y[4*j +: 4]);
      e0[4*j +: 4] = t[3:0];
      t = t + 5'd1;
      e1[4*j +: 4] = t[3:0];
    end
    if (!e) begin e0 = '0; e1 = '0; end
    #1;
    checks++;
    if (s0 !== e0 || s1 !== e1) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h en=%b s0=%h/%h s1=%h/%h", x, y, e, s0, e0, s1, e1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '1, 1'b1);
    apply('1, '0, 1'b1);
    for (int i = 0; i < 2000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, (i % 5) != 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
