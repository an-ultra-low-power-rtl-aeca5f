// aes_key_expansion: byte-serial, on-the-fly AES-128 key schedule.
//
// The key lives in a 16-byte shift register kr[] that advances one byte per
// clock; kr[d-1] holds the byte written d cycles ago. While key_shift_in is
// low the register takes key_in (loading, one key byte per cycle in FIPS-197
// order). Otherwise it appends the next round-key byte, so that byte j of
// round key r is produced in the cycle with round index r_in = r and step
// j (counter = 16r + j):
//   K_r[j] = K_{r-1}[j] ^ K_r[j-4]                                  j >= 4
//   K_r[j] = K_{r-1}[j] ^ S(K_{r-1}[12 + (j+1) mod 4]) ^ (j==0 ? Rcon(r) : 0)
// K_{r-1}[j] is 16 cycles old (kr[15]), K_r[j-4] four (kr[3]); the byte fed
// to S-box 2 is 3 cycles old for j = 0..2 (kr[2]) and 7 for j = 3 (kr[6]),
// which performs RotWord without moving any data.
//
// Outputs (combinational):
//   new_key   the byte being produced now, K_r[j]; the core adds it to the
//             final-round output, so round key 10 reaches data_out directly
//   round_key key_in while loading (round key 0), otherwise kr[3], i.e.
//             K_r[j] four cycles after it was made, which is when the
//             MixColumns output of round r for that byte position arrives.
// S-box 2 and the Rcon block as sub-blocks follow the document; the
// register organisation and its taps are this design's own.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       key_shift_in,
  input  byte_t      key_in,
  input  logic [3:0] r_in,
  input  logic [3:0] step,
  output byte_t      new_key,
  output byte_t      round_key
);

  byte_t kr [KEY_BYTES];
  byte_t sbox_in, sbox_out, rcon;

  assign sbox_in = (step == 4'd3) ? kr[6] : kr[2];

  aes_sbox u_sbox2 (.in_byte(sbox_in), .out_byte(sbox_out));
  aes_rcon u_rcon  (.r_in(r_in), .rcon(rcon));

  always_comb begin
    if (step >= 4'd4) new_key = kr[15] ^ kr[3];
    else              new_key = kr[15] ^ sbox_out ^ ((step == 4'd0) ? rcon : 8'h00);
  end

  assign round_key = key_shift_in ? kr[3] : key_in;

  always_ff @(posedge clk) begin
    kr[0] <= key_shift_in ? new_key : key_in;
    for (int k = 1; k < KEY_BYTES; k++) kr[k] <= kr[k-1];
  end

endmodule
