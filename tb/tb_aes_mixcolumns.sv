// tb_aes_mixcolumns: streams random columns back to back, a byte per cycle
// with shift low on row 0, and checks col_out in the cycle of each column's
// fourth byte against MixColumns computed with GF(2^8) multiplication in the
// reference model. Idle cycles with enable low are mixed in.
module tb_aes_mixcolumns;
  import aes_model_pkg::*;

  logic clk = 1'b0, enable, shift;
  byte_t in_byte;
  byte_t col_out [4];
  byte_t b [4];
  int checks = 0, failures = 0;

  aes_mixcolumns dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b0; shift = 1'b0; in_byte = '0;
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++) b[i] = 8'($urandom);
      if (n % 7 == 3) begin
        enable = 1'b0; shift = 1'b1; in_byte = 8'($urandom);
        @(posedge clk); #1;
      end
      for (int i = 0; i < 4; i++) begin
        enable = 1'b1; shift = (i != 0); in_byte = b[i];
        #1;
        if (i == 3)
          for (int m = 0; m < 4; m++) begin
            byte_t e;
            e = gmul(b[m], 8'h02) ^ gmul(b[(m+1)%4], 8'h03) ^ b[(m+2)%4] ^ b[(m+3)%4];
            checks++;
            if (col_out[m] != e) begin
              failures++;
              $display("FAIL column %0d row %0d: %02x expected %02x", n, m, col_out[m], e);
            end
          end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
