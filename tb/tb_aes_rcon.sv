// tb_aes_rcon: checks the round constant for round indices 1..10 against
// x^(r-1) in GF(2^8), computed by repeated doubling in the reference model.
module tb_aes_rcon;
  import aes_model_pkg::*;

  logic [3:0] r_in;
  byte_t rcon, expected;
  int checks = 0, failures = 0;

  aes_rcon dut (.r_in(r_in), .rcon(rcon));

  initial begin
    #10_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      r_in = 4'(r);
      #1;
      checks++;
      if (rcon != expected) begin
        failures++;
        $display("FAIL Rcon(%0d) = %02x, expected %02x", r, rcon, expected);
      end
      expected = gmul(expected, 8'h02);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
