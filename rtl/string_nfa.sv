// string_nfa: NFA matcher for one fixed string, built on the shared decoder.
//
// The pattern P0..P(LEN-1) is a pipeline of character match units. Unit 0's
// output is the start enable `en_in` ANDed with the match line of P0; unit j
// (j >= 1) stores unit j-1's output from the previous character and ANDs it
// with the match line of Pj. `hit` is high in the cycle of the character that
// completes the pattern. Several partial matches can be in flight at once,
// one per active unit, so overlapping occurrences are all found.
//
// `en_in` high means "a match may start at the current character": tie it
// high for an unanchored search, or drive it from wildcard logic for position
// constraints. NOCASE makes letter comparisons case-insensitive.
// Timing: combinational from `dec`/`en_in` to `hit`; state advances on `adv`.
module string_nfa
  import hids_pkg::*;
#(
  parameter int unsigned LEN    = 5,
  parameter pat_t        PAT    = "snort",
  parameter bit          NOCASE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,     // a character is consumed this cycle
  input  logic sop,     // current character is the first of a packet
  input  logic en_in,   // a match may begin at the current character
  input  dec_t dec,     // decoder lines for the current character
  output logic hit      // the pattern ends at the current character
);
  logic [LEN-1:0] m;
  logic [LEN-1:0] q;

  for (genvar j = 0; j < LEN; j++) begin : g_unit
    nocase_select #(.CH(pat_char(PAT, LEN, j)), .NOCASE(NOCASE)) u_sel (
      .dec(dec), .m(m[j]));
    if (j == 0) begin : g_first
      assign q[0] = en_in & m[0];
    end else begin : g_next
      char_match_unit u_cmu (
        .clk(clk), .rst_n(rst_n), .adv(adv), .clr(sop),
        .d(q[j-1]), .m(m[j]), .q(q[j]));
    end
  end

  assign hit = q[LEN-1];
endmodule
