// tb_logic_unit - checks AND, OR and XOR of random operands (given to the block as g = a & b
// and p = a ^ b) against the operators, and that the disabled unit outputs 0.
module tb_logic_unit;
  import alu_pkg::*;
  localparam int W = 64;
  logic [W-1:0] a, b, g, p, y;
  logic         en;
  logic_fn_e    fn;
  int checks = 0, failures = 0;

  assign g = a & b;
  assign p = a ^ b;
  logic_unit #(.W(W)) dut (.g, .p, .en, .fn, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp;
    for (int i = 0; i < 1500; i++) begin
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      fn = logic_fn_e'(i % 3);
      en = (i % 7) != 0;
      #1;
      unique case (fn)
        LF_AND:  exp = a & b;
        LF_OR:   exp = a | b;
        default: exp = a ^ b;
      endcase
      if (!en) exp = '0;
      checks++;
      if (y !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL fn=%s a=%h b=%h y=%h exp=%h", fn.name(), a, b, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
