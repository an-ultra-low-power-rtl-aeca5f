// tb_aes_sbox: exhaustive test of the tower-field S-box. All 256 inputs are
// compared with the reference S-box of aes_model_pkg (inverse by search,
// then the affine map), plus a few published values (S(00)=63, S(53)=ED).
module tb_aes_sbox;
  import aes_model_pkg::*;

  byte_t in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

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
    for (int a = 0; a < 256; a++) begin
      in_byte = 8'(a);
      #1;
      check(out_byte == sbox(8'(a)), $sformatf("S(%02x) = %02x, expected %02x", a, out_byte, sbox(8'(a))));
    end
    in_byte = 8'h00; #1 check(out_byte == 8'h63, "S(00) = 63");
    in_byte = 8'h53; #1 check(out_byte == 8'hed, "S(53) = ED");
    in_byte = 8'hff; #1 check(out_byte == 8'h16, "S(FF) = 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
