// hids_pkg: constants, helper functions and the example rule set shared by
// the pattern matching processor.
//
// Characters are 8-bit codes and the shared decoder has one match line per
// code (256 lines). Patterns are held as string literals, first character in
// the most significant byte, right-aligned in a MAX_PAT-byte field, with a
// separate length. The example rule set lives in hids_rules_pkg.
package hids_pkg;

  localparam int unsigned CHAR_BITS = 8;
  localparam int unsigned N_CODES   = 1 << CHAR_BITS;
  localparam int unsigned MAX_PAT   = 16;

  typedef logic [CHAR_BITS-1:0] char_t;
  typedef logic [N_CODES-1:0]   dec_t;
  typedef logic [8*MAX_PAT-1:0] pat_t;

  // ASCII letters differ between upper and lower case only in bit 5.
  function automatic logic is_alpha(char_t c);
    return (c >= "a" && c <= "z") || (c >= "A" && c <= "Z");
  endfunction

  // Whitespace that separates a command from its argument.
  function automatic logic is_ws(char_t c);
    return c == " " || c == 8'h09 || c == 8'h0d || c == 8'h0a;
  endfunction

  // Character j (0 = first) of a right-aligned pattern of length len.
  function automatic char_t pat_char(pat_t p, int unsigned len, int unsigned j);
    return p[8*(len-1-j) +: 8];
  endfunction

endpackage
