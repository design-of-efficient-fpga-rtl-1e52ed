// char_decoder: the shared 8-to-256 character decoder.
//
// Instead of comparing all eight bits of the input character inside every
// character match unit, the comparison is made once here: line c of `dec`
// is high when the current character equals code c. Every match unit that
// looks for character c connects to line c. The decoded lines are registered
// (one pipeline stage) and held while `en` is low; with `valid` low all
// lines are low, so the decoder advances in
// step with the rest of the character pipeline.
module char_decoder
  import hids_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,    // load a new character
  input  logic  valid, // `ch` holds a character; all lines low otherwise
  input  char_t ch,
  output dec_t  dec    // one-hot, valid the cycle after `en`
);
  dec_t dec_d;

  always_comb begin
    dec_d = '0;
    dec_d[ch] = valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dec <= '0;
    else if (en) dec <= dec_d;
  end
endmodule
