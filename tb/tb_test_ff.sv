// tb_test_ff - checks the data register: 0 after reset, captures d at each rising edge and
// holds it while d changes between edges.
module tb_test_ff;
  localparam int W = 64;
  logic ck = 1'b0, rst_n = 1'b1;
  logic [W-1:0] d = '1, q;
  int checks = 0, failures = 0;

  always #5 ck = ~ck;

  test_ff #(.W(W)) dut (.ck, .rst_n, .d, .q);

  initial begin
    repeat (5000) @(posedge ck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    #1 rst_n = 1'b0;  // asynchronous reset, before any clock edge
    #1;
    checks++;
    if (q !== '0) failures++;
    @(negedge ck) rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge ck);
      v = {$urandom, $urandom};
      d = v;
      @(posedge ck); #1;
      d = ~v;
      #2;
      checks++;
      if (q !== v) begin failures++; if (failures < 10) $display("FAIL q=%h exp=%h", q, v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
