// aes_byte_permutation: 16-byte state store that hands out bytes in
// ShiftRows order.
//
// Every clock one byte enters (the new state byte after AddRoundKey) and one
// byte leaves towards S-box 1. In a round the output for column c
// (step[3:2]) and row i (step[1:0]) must be the previous state's byte at
// row i, column (c+i) mod 4. Rounds overlap: the result of a byte read at
// counter t comes back at t+4 (MixColumns and the parallel-to-serial
// converter), so round r+1 starts reading while round r still writes. The
// byte wanted at counter t = 16r + 4c + i was written d(t) cycles earlier,
//   d(t) = base - 4i + (c+i >= 4 ? 16 : 0),  base = 16 in round 1, else 12
// (round 1 reads the loaded state, written without the 4-cycle delay).
// d = 0 happens once per round from round 2 on (column 0, row 3): that
// byte is passed from in_byte straight to out_byte in the cycle it arrives.
//
// Storage is 16 byte slots, renamed rather than shifted: while loading,
// byte k goes to slot k; in a round the arriving byte goes into the slot
// that is read in the same cycle (read before write). The slot read at
// counter t is therefore the slot that was read at t - d(t), or, for a
// byte of the loaded state, slot t - d(t) itself. This recursion is
// evaluated at elaboration into SCHED, indexed by {round, step}; nothing
// of it is entered by hand. From round 2 on it repeats every three rounds
// and uses 12 of the slots (4 bytes are in flight through MixColumns).
//
// Interface: in_byte is stored at the rising clock; out_byte is
// combinational from the slots, in_byte, r_in (the round index from the
// controller, 0 while loading) and step. The document names the unit and
// places S-box 1 behind it; this organisation is this design's own.
module aes_byte_permutation
  import aes_pkg::*;
(
  input  logic       clk,
  input  byte_t      in_byte,
  input  logic [3:0] r_in,
  input  logic [3:0] step,
  output byte_t      out_byte
);

  localparam int unsigned SLOTS = 16;

  // entry: {pass_through, slot}
  typedef logic [4:0] entry_t;

  function automatic logic [255:0][4:0] build_schedule();
    logic [255:0][4:0] s;
    int r, c, i, d;
    s = '0;
    for (int t = 16; t < 176; t++) begin
      r = t / 16;
      c = (t % 16) / 4;
      i = t % 4;
      d = ((r == 1) ? 16 : 12) - 4 * i + ((c + i >= 4) ? 16 : 0);
      if (d == 0)          s[t] = 5'b1_0000;
      else if (t - d < 16) s[t] = 5'(t - d);
      else                 s[t] = s[t - d];
    end
    return s;
  endfunction

  localparam logic [255:0][4:0] SCHED = build_schedule();

  byte_t  slot [SLOTS];
  entry_t e;

  assign e        = SCHED[{r_in, step}];
  assign out_byte = e[4] ? in_byte : slot[e[3:0]];

  always_ff @(posedge clk) begin
    if (r_in == 4'd0)  slot[step]     <= in_byte;   // loading
    else if (!e[4])    slot[e[3:0]]   <= in_byte;   // reuse the slot just read
  end

endmodule
