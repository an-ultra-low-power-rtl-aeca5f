// tb_aes_p2s: loads random 4-byte columns every fourth cycle and checks that
// rows 0..3 come out in the four following cycles when select is high, and
// that data_in is passed through when select is low.
module tb_aes_p2s;
  import aes_model_pkg::*;

  logic clk = 1'b0, load, select;
  byte_t col_in [4];
  byte_t data_in, out_byte;
  byte_t cur [4];
  int checks = 0, failures = 0;

  aes_p2s dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    load = 1'b0; select = 1'b0; data_in = '0;
    for (int k = 0; k < 4; k++) col_in[k] = '0;
    // first column load
    for (int k = 0; k < 4; k++) col_in[k] = 8'($urandom);
    load = 1'b1;
    #1 @(posedge clk); #1;
    cur = col_in;
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 4; i++) begin
        select = 1'b1;
        data_in = 8'($urandom);
        load = (i == 3);
        if (i == 3) for (int k = 0; k < 4; k++) col_in[k] = 8'($urandom);
        #1 check(out_byte == cur[i], $sformatf("row %0d of column %0d", i, n));
        select = 1'b0;
        #1 check(out_byte == data_in, "data_in passed through");
        select = 1'b1;
        @(posedge clk); #1;
      end
      cur = col_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
