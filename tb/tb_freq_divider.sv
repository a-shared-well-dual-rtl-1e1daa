// tb_freq_divider - checks the 2^10 divider: fmax is 0 after reset, stays constant for 512
// input cycles at a time and toggles after each 512, i.e. a period of 1024 input cycles.
module tb_freq_divider;
  logic clk = 1'b0, rst_n = 1'b1, fmax;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  freq_divider dut (.clk, .rst_n, .fmax);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic last;
    int   since, edges;
    #1 rst_n = 1'b0;  // asynchronous reset, before any clock edge
    #1;
    checks++;
    if (fmax !== 1'b0) failures++;
    @(negedge clk) rst_n = 1'b1;
    last = fmax; since = 0; edges = 0;
    for (int i = 0; i < 5 * 1024; i++) begin
      @(posedge clk); #1;
      since++;
      if (fmax != last) begin
        checks++;
        if (since != 512) begin
          failures++;
          $display("FAIL toggle after %0d cycles", since);
        end
        since = 0; edges++;
        last = fmax;
      end
    end
    checks++;
    if (edges != 10) begin failures++; $display("FAIL %0d toggles", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
