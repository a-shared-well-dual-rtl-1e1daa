// tb_pass_fail_comparator - checks the comparator: equal words give fail = 0, a word differing
// in one random bit gives fail = 1 after the next edge, nothing is flagged while disabled, and
// fail_seen stays set once a mismatch has been seen until reset.
module tb_pass_fail_comparator;
  localparam int W = 64;
  logic ck = 1'b0, rst_n = 1'b0, en = 1'b0, fail, fail_seen;
  logic [W-1:0] early = '0, late = '0;
  int checks = 0, failures = 0;

  always #5 ck = ~ck;

  pass_fail_comparator #(.W(W)) dut (.ck, .rst_n, .en, .early, .late, .fail, .fail_seen);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    logic m;
    @(negedge ck) rst_n = 1'b1;
    // disabled: mismatches are ignored
    early = '1; late = '0;
    @(posedge ck); #1;
    check(!fail && !fail_seen, "disabled");
    en = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge ck);
      v = {$urandom, $urandom};
      m = (i % 3 == 1);
      early = v;
      late  = m ? v ^ (W'(1) << $urandom_range(0, W - 1)) : v;
      @(posedge ck); #1;
      check(fail == m, "fail");
      check(fail_seen == (i >= 1), "fail_seen");
    end
    @(negedge ck) rst_n = 1'b0;
    #1;
    check(!fail_seen, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
