// tb_aes_byte_permutation: feeds the unit with the write pattern of the
// core's cycle plan (state 0 written at counter 4k+i in column-major order,
// state r >= 1 written byte n at counter 16r+4+n, random contents) and
// checks that the read at counter 16r + 4c + i (r = 1..10) returns row i,
// column (c+i) mod 4 of state r-1, i.e. the ShiftRows order. This includes
// the byte that must be passed straight through in the cycle it is written.
module tb_aes_byte_permutation;
  import aes_model_pkg::*;

  logic clk = 1'b0;
  byte_t in_byte, out_byte;
  logic [3:0] r_in, step;
  int checks = 0, failures = 0, bypassed = 0;
  block_t st [10];

  aes_byte_permutation dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10; n++) begin
      for (int r = 0; r < 10; r++)
        for (int k = 0; k < 16; k++) st[r][k] = 8'($urandom);
      for (int cnt = 0; cnt < 176; cnt++) begin
        if (cnt < 16) in_byte = st[0][cnt];
        else if (cnt >= 20 && cnt < 164) in_byte = st[(cnt-4)/16][(cnt-4)%16];
        else in_byte = 8'($urandom);
        r_in = cnt < 16 ? 4'd0 : 4'(cnt / 16);
        step = 4'(cnt % 16);
        #1;
        if (cnt >= 16) begin
          int r, c, i;
          r = cnt / 16; c = (cnt % 16) / 4; i = cnt % 4;
          checks++;
          if (out_byte != st[r-1][4*((c+i)%4)+i]) begin
            failures++;
            $display("FAIL round %0d col %0d row %0d", r, c, i);
          end
          if (r >= 2 && c == 0 && i == 3) bypassed++;
        end
        @(posedge clk);
        #1;
      end
    end
    checks++;
    if (bypassed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
