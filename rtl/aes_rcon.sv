// aes_rcon: AES-128 round constant as two-level logic.
//
// Input is the 4-bit round index r of the round key being derived
// (1..10 in this core, where round key r is produced while the controller's
// counter[7:4] equals r). Output is the byte Rcon = x^(r-1) in GF(2^8):
// 01 02 04 08 10 20 40 80 1B 36. Indices 0 and 11..15 never occur and were
// used as don't-cares when the sum-of-products for each bit was minimised on
// a Karnaugh map, so they give arbitrary values. Combinational.
//
// Replacing the constant table (or multiplexer) by minimised logic follows
// the document; the index range 1..10 and the equations are this design's.
module aes_rcon
  import aes_pkg::*;
(
  input  logic [3:0] r_in,
  output byte_t      rcon
);

  logic r3, r2, r1, r0;
  assign {r3, r2, r1, r0} = r_in;

  always_comb begin
    rcon[0] = ~r2 & ~r1 &  r0;                          // r = 1, 9
    rcon[1] = ( r1 & ~r2 & ~r0) | (r3 & r0);            // r = 2, 9, 10
    rcon[2] = ( r1 &  r0 & ~r2) | (r3 & r1);            // r = 3, 10
    rcon[3] = ( r2 & ~r1 & ~r0) | (r3 & r0);            // r = 4, 9
    rcon[4] = ( r2 & ~r1 &  r0) | (r3 & r0) | (r3 & r1);// r = 5, 9, 10
    rcon[5] = ( r2 &  r1 & ~r0) | (r3 & r1);            // r = 6, 10
    rcon[6] =   r2 &  r1 &  r0;                         // r = 7
    rcon[7] =   r3 & ~r1 & ~r0;                         // r = 8
  end

endmodule
