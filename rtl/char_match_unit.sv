// char_match_unit: one stage of an NFA pattern matching pipeline.
//
// A flip-flop stores the previous unit's output from the previous character
// (the match state so far); the unit's output is that stored bit ANDed with
// the unit's match line for the current character. The flip-flop advances
// only on `adv` (one step per character). At the first character of a packet
// (`clr`) the stored state belongs to the previous packet and is ignored, so
// matches never span two packets.
module char_match_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,   // a character is consumed this cycle
  input  logic clr,   // current character is the first of a packet
  input  logic d,     // previous unit's output for the current character
  input  logic m,     // match line for the current character
  output logic q      // this unit's output for the current character
);
  logic s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s <= 1'b0;
    else if (adv) s <= d;
  end

  assign q = s & ~clr & m;
endmodule
