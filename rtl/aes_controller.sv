// aes_controller: counter-based controller of the 8-bit AES core.
//
// The whole schedule comes from one 8-bit counter. counter[7:4] is the round
// index (r_in, 0 while loading) and counter[3:0] the byte step inside a
// round: step[3:2] is the state column and step[1:0] the row. The counter
// value moves as follows:
//   counter < 16   (loading)   : +1 while load_in & start_in, else back to 0
//   counter > 158  (done)      : +1 while unload_in,          else back to 0
//   otherwise      (rounds)    : +1 while start_in,           else back to 0
// Since the clock itself stops while start_in is low, the rounds never lose
// their place during a pause. Counter values 0..15 load plaintext and key,
// 16..159 run rounds 1..9, 159 raises comp, and 160..175 (unload_in high)
// run round 10 and put the ciphertext bytes on data_out.
//
// Decoded outputs, all combinational from the counter:
//   busy_out               counter > 15
//   comp                   counter > 158
//   enable_input_mixcolumn busy_out
//   shift_mixcolumn        counter[1:0] > 0   (0: a new column)
//   shift_pa2ser           counter > 19 (MixColumns results are on the path)
//   seq_in                 busy_out ? counter[7:4] : 0     (round index)
//   key_shift_in           ~load_in (key register runs the schedule)
// The counter, the comparator constants, the multiplexer inputs and these
// decodes follow the document. Which comparator drives which bit of the
// mode multiplexer select is not labelled there; it is read here as loading
// -> load_in & start_in and done -> unload_in. Also this design's own: the
// step output, load_pa2ser (busy_out and step row 3, when a MixColumns
// column is complete), an asynchronous active-low reset, and a counter
// that returns to 0 (not 1) when not counting.
module aes_controller
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_in,
  input  logic       load_in,
  input  logic       unload_in,
  output logic [7:0] counter,
  output logic       busy_out,
  output logic       comp,
  output logic       key_shift_in,
  output logic       enable_input_mixcolumn,
  output logic       shift_mixcolumn,
  output logic       shift_pa2ser,
  output logic       load_pa2ser,
  output logic [3:0] seq_in,
  output logic [3:0] step
);

  logic lt16, gt158, count_en;

  assign lt16  = counter < 8'b0001_0000;
  assign gt158 = counter > 8'b1001_1110;

  always_comb begin
    unique case ({lt16, gt158})
      2'b10:   count_en = load_in & start_in;
      2'b01:   count_en = unload_in;
      default: count_en = start_in;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        counter <= 8'h00;
    else if (count_en) counter <= counter + 8'd1;
    else               counter <= 8'h00;
  end

  assign comp                   = gt158;
  assign busy_out               = counter > 8'b0000_1111;
  assign enable_input_mixcolumn = busy_out;
  assign shift_mixcolumn        = counter[1:0] > 2'b00;
  assign shift_pa2ser           = counter > 8'b0001_0011;
  assign load_pa2ser            = busy_out && (counter[1:0] == 2'b11);
  assign seq_in                 = busy_out ? counter[7:4] : 4'b0000;
  assign key_shift_in           = ~load_in;
  assign step                   = counter[3:0];

endmodule
