// brute_force_matcher: multi-string matcher that compares every string in
// full against the most recent characters at every character step.
//
// No match state is kept between characters. A shift register holds the last
// MAXL-1 characters of the packet (MAXL = longest string) with a valid bit
// each; together with the current character it forms a window of MAXL
// characters. For string p of length L, L 8-bit comparators check the L
// newest window characters against the string, and hit[p] is the AND of
// those comparators. This is the brute-force style of hardware matcher: m
// comparators and an m-character buffer per string, one character per clock.
// It is the baseline against which the NFA matchers are measured, and it
// takes the same character stream (ch/adv/sop) and gives the same hit
// timing as they do, so the two can be compared directly.
//
// Interface and timing: `ch` is the current character, valid when `adv` is
// high; `sop` marks the first character of a packet and empties the window,
// so no match spans two packets. hit[p] is combinational and high in the
// cycle of the last character of an occurrence of string p. A case-
// insensitive string (NOCASE[p]) compares letters with bit 5 ignored, like a
// comparator whose table accepts both codes.
//
// Following the published comparisons: the register-plus-comparators
// structure and one character per clock. Own choices: the valid bits (so
// that a string cannot match across a packet start) and the shared window
// for all strings instead of one buffer per string; since every string reads
// the newest characters, one buffer as long as the longest string carries
// the same values.
module brute_force_matcher
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
  function automatic int unsigned max_len();
    int unsigned m = 1;
    for (int unsigned p = 0; p < N_PAT; p++) if (len(p) > m) m = len(p);
    return m;
  endfunction
  localparam int unsigned MAXL = max_len();
  // at least one history slot, so the register exists for one-character sets
  localparam int unsigned H = (MAXL > 1) ? MAXL - 1 : 1;

  // hist[0] is the previous character, hist[H-1] the oldest
  char_t [H-1:0]  hist;
  logic  [H-1:0]  hvld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
      hvld <= '0;
    end else if (adv) begin
      hist[0] <= ch;
      hvld[0] <= 1'b1;
      for (int unsigned k = 1; k < H; k++) begin
        hist[k] <= hist[k-1];
        hvld[k] <= hvld[k-1] & ~sop;
      end
    end
  end

  // window position k: 0 = current character, k = hist[k-1]
  char_t [MAXL-1:0] win;
  logic  [MAXL-1:0] wvld;
  always_comb begin
    win[0]  = ch;
    wvld[0] = adv;
    for (int unsigned k = 1; k < MAXL; k++) begin
      win[k]  = hist[k-1];
      wvld[k] = hvld[k-1] & ~sop;
    end
  end

  function automatic logic char_eq(char_t a, char_t b, logic nc);
    if (nc && is_alpha(b)) return (a | 8'h20) == (b | 8'h20);
    return a == b;
  endfunction

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    localparam int unsigned L = len(p);
    initial assert (L >= 1 && L <= MAX_PAT) else $error("bad string length");
    logic [L-1:0] eq;
    // comparator k checks window position k against string character L-1-k
    for (genvar k = 0; k < L; k++) begin : g_cmp
      assign eq[k] = wvld[k] & char_eq(win[k], pat_char(pat(p), L, L-1-k), NOCASE[p]);
    end
    assign hit[p] = &eq;
  end
endmodule
