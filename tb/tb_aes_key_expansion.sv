// tb_aes_key_expansion: loads random keys byte by byte and runs the key
// schedule with the round index and step sequence the controller produces
// (counter 16..175). Checks new_key against round key r byte j of the
// reference key expansion in the cycle with counter 16r+j, and round_key
// against the same byte four cycles later (rounds 1..9) and against key_in
// while loading.
module tb_aes_key_expansion;
  import aes_model_pkg::*;

  logic clk = 1'b0, key_shift_in;
  byte_t key_in, new_key, round_key;
  logic [3:0] r_in, step;
  int checks = 0, failures = 0;
  block_t key;
  block_t rk [11];

  aes_key_expansion dut (.*);

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
    for (int n = 0; n < 20; n++) begin
      for (int k = 0; k < 16; k++) key[k] = 8'(n == 0 ? k : $urandom);
      expand_key(key, rk);
      for (int cnt = 0; cnt < 176; cnt++) begin
        key_shift_in = cnt >= 16;
        key_in = cnt < 16 ? key[cnt] : 8'($urandom);
        r_in = cnt < 16 ? 4'd0 : 4'(cnt / 16);
        step = 4'(cnt % 16);
        #1;
        if (cnt < 16) check(round_key == key_in, "round_key is key_in while loading");
        else check(new_key == rk[cnt/16][cnt%16],
                   $sformatf("new_key K%0d[%0d] = %02x expected %02x", cnt/16, cnt%16,
                             new_key, rk[cnt/16][cnt%16]));
        if (cnt >= 20 && cnt < 164)
          check(round_key == rk[(cnt-4)/16][(cnt-4)%16], $sformatf("round_key at counter %0d", cnt));
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
