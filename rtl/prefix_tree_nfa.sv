// prefix_tree_nfa: NFA for a set of unanchored strings in which strings that
// begin with the same characters share the cells of that common beginning.
//
// Each string is a chain of character match cells as in string_nfa. When two
// strings start with the same k characters, the first k cells of their chains
// compute identical values, so only one copy is built: cell (p, j) of string
// p exists only if no earlier string has the same first j+1 characters (and
// the same case rule); otherwise it is a wire to that string's cell. The
// chains thus merge into a tree rooted at the first character, and a string
// set such as {"abc", "abd", "ab"} needs 4 cells instead of 8. Which cells
// are shared is worked out at elaboration from the PATS/LENS parameters.
//
// Every string may start at any character (the root is always enabled).
// hit[p] is combinational and high in the cycle of the last character of an
// occurrence of string p, like string_nfa. adv/sop behave as in
// char_match_unit: state moves only on adv and is ignored at a packet start.
module prefix_tree_nfa
  import hids_pkg::*;
#(
  parameter int unsigned N_PAT           = 4,
  // string list and lengths, string 0 first (leftmost in the '{...} list)
  parameter pat_t [N_PAT-1:0]       PATS = '{"abc", "abd", "ab", "cd"},
  parameter logic [N_PAT-1:0][7:0]  LENS = '{3, 3, 2, 2},
  parameter logic [N_PAT-1:0] NOCASE     = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adv,
  input  logic             sop,
  input  dec_t             dec,
  output logic [N_PAT-1:0] hit
);
  // String p of the list and its length (the list fills the highest index first).
  function automatic pat_t pat(int unsigned p);
    return PATS[N_PAT-1-p];
  endfunction
  function automatic int unsigned len(int unsigned p);
    return int'(LENS[N_PAT-1-p]);
  endfunction

  // Index of the first string that shares string p's first j+1 characters.
  function automatic int unsigned owner(int unsigned p, int unsigned j);
    for (int unsigned q = 0; q < p; q++) begin
      if (len(q) > j && NOCASE[q] == NOCASE[p]) begin
        bit same = 1'b1;
        for (int unsigned k = 0; k <= j; k++)
          if (pat_char(pat(q), len(q), k) != pat_char(pat(p), len(p), k)) same = 1'b0;
        if (same) return q;
      end
    end
    return p;
  endfunction

  // Number of cells actually built (for reference by users of the module).
  function automatic int unsigned count_cells();
    int unsigned n = 0;
    for (int unsigned p = 0; p < N_PAT; p++)
      for (int unsigned j = 0; j < len(p); j++)
        if (owner(p, j) == p) n++;
    return n;
  endfunction
  localparam int unsigned N_CELLS = count_cells();

  // q[p*MAX_PAT + j]: output of cell j of string p (or of the cell it shares)
  logic [N_PAT*MAX_PAT-1:0] q;

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    initial assert (len(p) >= 1 && len(p) <= MAX_PAT) else $error("bad string length");
    for (genvar j = 0; j < MAX_PAT; j++) begin : g_ch
      localparam int unsigned L = len(p);
      localparam int unsigned O = (j < L) ? owner(p, j) : p;
      if (j >= L) begin : g_none
        assign q[p*MAX_PAT + j] = 1'b0;
      end else if (O != p) begin : g_shared
        assign q[p*MAX_PAT + j] = q[O*MAX_PAT + j];
      end else begin : g_cell
        logic m;
        nocase_select #(.CH(pat_char(pat(p), L, j)), .NOCASE(NOCASE[p])) u_sel (
          .dec(dec), .m(m));
        if (j == 0) begin : g_root
          assign q[p*MAX_PAT] = m;
        end else begin : g_unit
          char_match_unit u_cmu (
            .clk(clk), .rst_n(rst_n), .adv(adv), .clr(sop),
            .d(q[p*MAX_PAT + j - 1]), .m(m), .q(q[p*MAX_PAT + j]));
        end
      end
    end
    assign hit[p] = q[p*MAX_PAT + len(p) - 1];
  end
endmodule
