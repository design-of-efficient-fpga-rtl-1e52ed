// comparator_nfa: NFA string matcher in which every character match unit
// has its own 8-bit comparator (the distributed comparator style).
//
// Each string is a chain of character match units as in string_nfa, but a
// unit's match input comes from a local comparison of the broadcast 8-bit
// character with the unit's pattern character instead of from one line of a
// shared decoder. Every unit therefore needs all 8 character bits routed to
// it. This is the NFA design the shared decoder improves on, kept as the
// baseline it is measured against; its match results are identical.
//
// Interface and timing: the same as brute_force_matcher. `ch` is the current
// character, valid when `adv` is high; `sop` marks the first character of a
// packet, at which stored state is ignored. hit[p] is combinational and high
// in the cycle of the last character of an occurrence of string p. A
// case-insensitive string (NOCASE[p]) compares letters with bit 5 ignored,
// which is what a comparator table with both codes marked does.
//
// Following the published design: one comparator per unit made of two
// 4-input look-up functions, one per half of the character, ANDed; a
// case-insensitive letter marks both high halves in its table; chained
// match units, one hit per string. Own choice: the tables are written as
// equality tests, which a synthesis tool maps to look-up tables.
module comparator_nfa
  import hids_pkg::*;
#(
  parameter int unsigned N_PAT           = 2,
  // string list and lengths, string 0 first (leftmost in the '{...} list)
  parameter pat_t [N_PAT-1:0]       PATS = '{"snort", "stat "},
  parameter logic [N_PAT-1:0][7:0]  LENS = '{5, 5},
  parameter logic [N_PAT-1:0] NOCASE     = 2'b10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic             sop,
  input  char_t            ch,
  output logic [N_PAT-1:0] hit
);
  function automatic pat_t pat(int unsigned p);
    return PATS[N_PAT-1-p];
  endfunction
  function automatic int unsigned len(int unsigned p);
    return int'(LENS[N_PAT-1-p]);
  endfunction

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    localparam int unsigned L = len(p);
    initial assert (L >= 1 && L <= MAX_PAT) else $error("bad string length");
    logic [L-1:0] m, q;
    for (genvar j = 0; j < L; j++) begin : g_ch
      localparam char_t C = pat_char(pat(p), L, j);
      // the unit's own comparator: one 4-input table per half of the
      // character, ANDed; a case-insensitive letter's high table also
      // accepts the high half with bit 5 (bit 1 of the half) flipped
      logic hi_ok, lo_ok;
      if (NOCASE[p] && is_alpha(C)) begin : g_nc
        assign hi_ok = (ch[7:4] | 4'h2) == (C[7:4] | 4'h2);
      end else begin : g_cs
        assign hi_ok = ch[7:4] == C[7:4];
      end
      assign lo_ok = ch[3:0] == C[3:0];
      assign m[j]  = adv & hi_ok & lo_ok;
      if (j == 0) begin : g_root
        assign q[0] = m[0];
      end else begin : g_unit
        char_match_unit u_cmu (
          .clk(clk), .rst_n(rst_n), .adv(adv), .clr(sop),
          .d(q[j-1]), .m(m[j]), .q(q[j]));
      end
    end
    assign hit[p] = q[L-1];
  end
endmodule
