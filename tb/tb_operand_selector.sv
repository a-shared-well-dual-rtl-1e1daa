// tb_operand_selector - checks the operand selector with random sources and random one-hot
// selects: a forwarded leg must deliver the complement of its loop-back bus, an external leg
// its value, an all-zero select 0; the 5:1 stage picks ain0 or an external leg; the b path
// is complemented when b_inv is set; with brk the GP inputs take tst_a/tst_b (tst_b still
// through the complementing stage) while ain_loop keeps the multiplexer result.
module tb_operand_selector;
  import alu_pkg::*;
  localparam int W = 64;
  logic [N_ALU-1:0][W-1:0]  fwd_sumb;
  logic [N_EXT9-1:0][W-1:0] ext_a9, ext_b9;
  logic [N_EXT5-1:0][W-1:0] ext_a5;
  logic [N_MUX9-1:0]        sel_a9, sel_b9;
  logic [N_MUX5-1:0]        sel_a5;
  logic                     b_inv, brk;
  logic [W-1:0]             tst_a, tst_b, ain, bin, ain_loop;
  int checks = 0, failures = 0;

  operand_selector #(.W(W)) dut (.*);

  function automatic logic [W-1:0] leg9(int k, logic [N_ALU-1:0][W-1:0] f, logic [N_EXT9-1:0][W-1:0] e);
    if (k < 0) return '0;
    if (k < N_ALU) return ~f[k];
    return e[k - N_ALU];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ka9, ka5, kb9;
    logic [W-1:0] ea0, ea, eb;
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < N_ALU; k++) fwd_sumb[k] = {$urandom, $urandom};
      for (int k = 0; k < N_EXT9; k++) begin ext_a9[k] = {$urandom, $urandom}; ext_b9[k] = {$urandom, $urandom}; end
      for (int k = 0; k < N_EXT5; k++) ext_a5[k] = {$urandom, $urandom};
      tst_a = {$urandom, $urandom};
      tst_b = {$urandom, $urandom};
      ka9 = $urandom_range(0, N_MUX9) - 1;  // -1: no leg selected
      kb9 = $urandom_range(0, N_MUX9) - 1;
      ka5 = (i % 3 == 0) ? $urandom_range(0, N_MUX5 - 1) : 0;
      sel_a9 = (ka9 < 0) ? '0 : N_MUX9'(1) << ka9;
      sel_b9 = (kb9 < 0) ? '0 : N_MUX9'(1) << kb9;
      sel_a5 = N_MUX5'(1) << ka5;
      b_inv = 1'($urandom);
      brk   = (i % 4 == 3);
      #1;
      ea0 = leg9(ka9, fwd_sumb, ext_a9);
      ea  = (ka5 == 0) ? ea0 : ext_a5[ka5 - 1];
      eb  = brk ? tst_b : leg9(kb9, fwd_sumb, ext_b9);
      if (b_inv) eb = ~eb;
      checks++;
      if (ain_loop !== ea || ain !== (brk ? tst_a : ea) || bin !== eb) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d ka9=%0d ka5=%0d kb9=%0d binv=%b brk=%b", i, ka9, ka5, kb9, b_inv, brk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
