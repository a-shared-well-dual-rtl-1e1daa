// tb_func_checker - checks the functional-test checker with a model of the ALU timing: the
// result of the vector presented in one cycle is offered in the next. A run with all results
// correct must end with done and pass and no error; a run with two corrupted results must count
// exactly two errors and not pass.
module tb_func_checker;
  localparam int W = 64, N = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, last = 1'b0, done, pass;
  logic [W-1:0] expected = '0, sum = '0;
  logic [7:0] errors;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  func_checker #(.W(W)) dut (.*);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: errors=%0d done=%b pass=%b", what, errors, done, pass); end
  endtask

  task automatic run(int n_bad);
    logic [W-1:0] res [N];
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < N; i++) res[i] = {$urandom, $urandom};
    for (int i = 0; i <= N; i++) begin
      @(negedge clk);
      // result of vector i-1 appears one cycle after it was presented
      if (i > 0) sum = (i - 1 < n_bad) ? ~res[i-1] : res[i-1];
      en = (i < N);
      last = (i == N - 1);
      expected = (i < N) ? res[i] : '0;
      if (i < N) check(!done, "done early");
    end
    @(negedge clk) en = 1'b0;
    check(done, "done");
    check(errors == 8'(n_bad), "error count");
    check(pass == (n_bad == 0), "pass");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(0);
    run(2);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
