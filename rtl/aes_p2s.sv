// aes_p2s: parallel-to-serial converter between MixColumns and the state.
//
// Four byte registers. When load is high the complete MixColumns column is
// taken in parallel (row 0 in position 0); on every other clock the
// registers shift by one byte toward position 0. The serial output is
// position 0 when select is high; when select is low (loading and the first
// four cycles of round 1, before any MixColumns result exists) data_in is
// passed through instead, so plaintext enters the state through the same
// AddRoundKey XOR as round results. A loaded column therefore leaves as
// row 0, 1, 2, 3 in the four cycles after the load edge.
// The converter and the data_in connection follow the document; its
// register-level organisation is this design's own.
module aes_p2s
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  load,
  input  logic  select,
  input  byte_t col_in [4],
  input  byte_t data_in,
  output byte_t out_byte
);

  byte_t r [4];

  always_ff @(posedge clk) begin
    if (load) r <= col_in;
    else begin
      r[0] <= r[1];
      r[1] <= r[2];
      r[2] <= r[3];
      r[3] <= 8'h00;
    end
  end

  assign out_byte = select ? r[0] : data_in;

endmodule
