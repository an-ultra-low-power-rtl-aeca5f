// aes_mixcolumns: byte-serial MixColumns.
//
// The four bytes b0..b3 of a column arrive one per cycle, row 0 first. Each
// byte's contribution to all four outputs is added at once into four
// accumulator registers acc[0..3] that rotate by one place per byte, so the
// coefficient each register applies is fixed:
//   acc'[q] = acc[(q+3) mod 4] ^ C[q]*b,  C = {2, 3, 1, 1}
// After byte i, acc[q] holds the partial sum of output row (i - q) mod 4.
// When shift is low (first byte of a column) the rotated-in value is taken
// as zero, which starts a new column without a separate clear cycle.
//
// col_out is combinational and gives the complete column (row 0 in
// col_out[0]) in the cycle in which the fourth byte is on in_byte; the
// parallel-to-serial converter captures it at that clock edge. So a column
// costs 4 cycles and there is no gap between columns. Multiplications by
// 2 and 3 are xtime and xtime^identity. The enable and shift controls come
// from the document's controller; the rotating accumulator is this design's
// own.
module aes_mixcolumns
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  enable,
  input  logic  shift,
  input  byte_t in_byte,
  output byte_t col_out [4]
);

  byte_t acc [4];
  byte_t acc_next [4];
  byte_t contrib [4];

  always_comb begin
    contrib[0] = xtime(in_byte);
    contrib[1] = mul3(in_byte);
    contrib[2] = in_byte;
    contrib[3] = in_byte;
    for (int q = 0; q < 4; q++)
      acc_next[q] = (shift ? acc[(q+3)%4] : 8'h00) ^ contrib[q];
    for (int m = 0; m < 4; m++)
      col_out[m] = acc_next[3-m];
  end

  always_ff @(posedge clk) begin
    if (enable)
      for (int q = 0; q < 4; q++) acc[q] <= acc_next[q];
  end

endmodule
