// aes_core: 8-bit iterative AES-128 encryption core with a gated clock.
//
// The datapath is one byte wide. Per clock one state byte leaves the byte
// permutation unit in ShiftRows order, goes through S-box 1 and into the
// byte-serial MixColumns unit; the finished column comes back through the
// parallel-to-serial converter, has its round-key byte added and re-enters
// the byte permutation unit. The key expansion unit produces the round keys
// a byte at a time alongside, with its own S-box 2. The last round skips
// MixColumns: S-box 1's output plus the last round-key byte is data_out.
//
// Host protocol (all inputs change while clk_aes is high, e.g. just after
// its rising edge, so that the clock gate does not glitch):
//   1. Hold start_in high. Raise load_in for 16 cycles, giving plaintext
//      byte k on data_in and key byte k on key_in in cycle k (FIPS-197 byte
//      order). Dropping load_in early restarts the load.
//   2. busy_out rises after the 16th byte. 144 cycles later (counter 159,
//      160 cycles after the first load cycle) comp rises.
//   3. With unload_in high in the cycle comp is high and in the 15 that
//      follow, the 16 ciphertext bytes appear on data_out in order in the
//      16 cycles after comp's first cycle. unload_in may be raised in advance;
//      it must be low in the 16th unload cycle, which returns the core to
//      idle. Without unload_in at completion the result is discarded.
//   start_in low stops the clock at any point; the operation resumes where
//   it stopped when start_in returns high.
// The block structure, the port names, the clock gate and the 160-cycle
// budget follow the document. The cycle plan (rounds overlapping by four
// cycles, round 10 during unloading) is this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic       clk_aes,
  input  logic       rst_n,
  input  logic       start_in,
  input  logic       load_in,
  input  logic       unload_in,
  input  byte_t      data_in,
  input  byte_t      key_in,
  output logic       busy_out,
  output logic       comp,
  output byte_t      data_out
);

  logic       clk;
  logic       key_shift_in, enable_input_mixcolumn, shift_mixcolumn;
  logic       shift_pa2ser, load_pa2ser;
  logic [3:0] seq_in, step;

  byte_t p2s_out, round_key, new_key, state_in, state_out, sub_byte;
  byte_t mc_col [4];

  aes_clock_gate u_cg (.clk_aes(clk_aes), .start_in(start_in), .clk(clk));

  aes_controller u_ctrl (
    .clk(clk), .rst_n(rst_n), .start_in(start_in), .load_in(load_in),
    .unload_in(unload_in), .counter(), .busy_out(busy_out), .comp(comp),
    .key_shift_in(key_shift_in), .enable_input_mixcolumn(enable_input_mixcolumn),
    .shift_mixcolumn(shift_mixcolumn), .shift_pa2ser(shift_pa2ser),
    .load_pa2ser(load_pa2ser), .seq_in(seq_in), .step(step)
  );

  aes_key_expansion u_key (
    .clk(clk), .key_shift_in(key_shift_in), .key_in(key_in), .r_in(seq_in),
    .step(step), .new_key(new_key), .round_key(round_key)
  );

  // AddRoundKey on the way into the state
  assign state_in = p2s_out ^ round_key;

  aes_byte_permutation u_perm (
    .clk(clk), .in_byte(state_in), .r_in(seq_in), .step(step),
    .out_byte(state_out)
  );

  aes_sbox u_sbox1 (.in_byte(state_out), .out_byte(sub_byte));

  aes_mixcolumns u_mc (
    .clk(clk), .enable(enable_input_mixcolumn), .shift(shift_mixcolumn),
    .in_byte(sub_byte), .col_out(mc_col)
  );

  aes_p2s u_p2s (
    .clk(clk), .load(load_pa2ser), .select(shift_pa2ser), .col_in(mc_col),
    .data_in(data_in), .out_byte(p2s_out)
  );

  // final round: SubBytes + ShiftRows + AddRoundKey with round key 10
  assign data_out = sub_byte ^ new_key;

  // host rule: load_in low once the rounds run, since it also switches the
  // key register from running the schedule to taking key_in
  a_no_load_while_busy: assert property (
    @(posedge clk) disable iff (!rst_n) busy_out |-> !load_in
  ) else $error("load_in raised while the core is busy");

endmodule
