// tb_aes_clock_gate: checks that the gated clock follows clk_aes while
// start_in is high and stays high while it is low, and that the number of
// rising edges seen downstream equals the number of enabled cycles. start_in
// changes 1 ns after a rising edge of clk_aes, while it is high.
module tb_aes_clock_gate;
  logic clk_aes = 1'b0, start_in, clk;
  int checks = 0, failures = 0, edges = 0, enabled = 0;

  aes_clock_gate dut (.clk_aes(clk_aes), .start_in(start_in), .clk(clk));

  always #5 clk_aes = ~clk_aes;
  always @(posedge clk) edges++;

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    start_in = 1'b0;
    @(posedge clk_aes);
    edges = 0;
    for (int n = 0; n < 200; n++) begin
      #1 start_in = 1'($urandom);
      // a rising edge of clk_aes at the end of this cycle reaches clk only if enabled
      if (start_in) enabled++;
      #2 check(clk == 1'b1, "clk high in the first half");
      #4 check(clk == (start_in ? clk_aes : 1'b1), "clk low half follows start_in");
      check(start_in || clk == 1'b1, "clk held high when gated");
      @(posedge clk_aes);
      #0;
    end
    #1;
    check(edges == enabled, $sformatf("edges %0d, enabled cycles %0d", edges, enabled));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
