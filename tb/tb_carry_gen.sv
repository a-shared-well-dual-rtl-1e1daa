// tb_carry_gen - checks the sparse radix-4 carry tree against carries computed by plain
// addition: the carry into bit 4j of a + b + cin is bit 4j of (a mod 2^4j) + (b mod 2^4j) + cin.
// Directed vectors (the critical-path addition, all ones, cin rippling through all-propagate
// operands) and 3000 random ones, with random carry-in.
module tb_carry_gen;
  import alu_pkg::*;
  localparam int W = 64, NG = W / GROUP;
  logic [W-1:0]  a, b, g, p;
  logic          cin;
  logic [NG-1:0] carry;
  int checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;
  carry_gen #(.W(W)) dut (.g, .p, .cin, .carry);

  function automatic logic [NG-1:0] ref_carry(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    logic [NG-1:0] c;
    logic [W:0] s, m;
    for (int j = 0; j < NG; j++) begin
      m = (j == 0) ? '0 : ((65'd1 << (GROUP * j)) - 65'd1);
      s = ({1'b0, x} & m) + ({1'b0, y} & m) + 65'(ci);
      c[j] = s[GROUP * j];
    end
    return c;
  endfunction

  task automatic apply(logic [W-1:0] x, logic [W-1:0] y, logic ci);
    a = x; b = y; cin = ci;
    #1;
    checks++;
    if (carry !== ref_carry(x, y, ci)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b carry=%h exp=%h", x, y, ci, carry, ref_carry(x, y, ci));
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
    apply(64'h00FFFFFFFFF80000, 64'h0000000000080000, 1'b0);
    if (carry != 16'h7FE0) begin failures++; $display("FAIL critical-path carries %h", carry); end
    checks++;
    apply('1, '1, 1'b0);
    apply('1, '0, 1'b1);
    apply('0, '0, 1'b1);
    apply(64'h5555555555555555, 64'hAAAAAAAAAAAAAAAA, 1'b1);
    for (int i = 0; i < 3000; i++)
      apply({$urandom, $urandom}, (i % 3 == 0) ? ~{$urandom, $urandom} & {$urandom, $urandom} : {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
