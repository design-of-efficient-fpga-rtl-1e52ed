// char_counter: argument length counter of the protocol analyzer.
//
// Counts the characters consumed while `en` is high and restarts from zero
// whenever `en` is low, so it measures the length of the current argument.
// `overflow` is high for the character that makes the length exceed MAX_ARG
// characters and for every later character of the same argument. The count
// saturates at MAX_ARG + 1. Combinational from `en` to `overflow`.
module char_counter #(
  parameter int unsigned MAX_ARG = 16,
  parameter int unsigned CW      = $clog2(MAX_ARG + 2)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic sop,
  input  logic en,       // current character belongs to the argument
  output logic overflow
);
  logic [CW-1:0] cnt, cnt_now;

  // Length of the argument including the current character.
  always_comb begin
    cnt_now = '0;
    if (en) begin
      cnt_now = sop ? CW'(1) : cnt + CW'(1);
      if (!sop && cnt == CW'(MAX_ARG + 1)) cnt_now = cnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   cnt <= '0;
    else if (adv) cnt <= cnt_now;
  end

  assign overflow = en && (cnt_now > CW'(MAX_ARG));
endmodule
