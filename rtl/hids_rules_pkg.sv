// hids_rules_pkg: the example rule set built into hids_matcher_top.
//
// The set is chosen to exercise every mechanism of the design: a rule with
// two contents, case insensitivity, offset and depth, distance and within,
// approximate matching and protocol analysis. A real deployment regenerates
// this package, and the matcher instances of the top, from its rule file.
// Rule numbers are bit positions in the match vector.
package hids_rules_pkg;
  import hids_pkg::*;

  localparam int unsigned N_RULES = 8;

  // Rule 0: two independent contents (both must occur in the packet).
  localparam pat_t R0_P0 = "abc";   localparam int unsigned R0_L0 = 3;
  localparam pat_t R0_P1 = "cd";    localparam int unsigned R0_L1 = 2;
  // Rule 1: a single content that shares its first two characters with
  // rule 0's "abc" (the two share cells in the prefix tree).
  localparam pat_t R1_P0 = "abd";   localparam int unsigned R1_L0 = 3;
  // Rule 2: case-insensitive content ("nocase").
  localparam pat_t R2_P0 = "stat "; localparam int unsigned R2_L0 = 5;
  // Rule 3: content with offset and depth relative to the packet start.
  localparam pat_t R3_P0 = "snort"; localparam int unsigned R3_L0 = 5;
  localparam int unsigned R3_OFFSET = 2;
  localparam int unsigned R3_DEPTH  = 8;
  // Rule 4: second content relative to the end of the first (distance, within).
  localparam pat_t R4_P0 = "USER";  localparam int unsigned R4_L0 = 4;
  localparam pat_t R4_P1 = "root";  localparam int unsigned R4_L1 = 4;
  localparam int unsigned R4_DISTANCE = 1;
  localparam int unsigned R4_WITHIN   = 10;
  // Rule 5: approximate match with at most K_APPROX differences.
  localparam pat_t R5_P0 = "abcd";  localparam int unsigned R5_L0 = 4;
  localparam int unsigned K_APPROX = 2;
  localparam int unsigned K_BITS   = $clog2(K_APPROX + 1);
  // Rule 6: uricontent (searched only inside a request argument).
  localparam pat_t R6_P0 = "/bin/sh"; localparam int unsigned R6_L0 = 7;
  // Rule 7: argument longer than MAX_ARG characters (buffer overflow attempt).
  localparam int unsigned MAX_ARG = 16;

  // Request methods recognised by the protocol analyzer.
  localparam int unsigned N_CMD = 3;
  localparam pat_t        CMD_PAT [N_CMD] = '{"GET", "POST", "HEAD"};
  localparam int unsigned CMD_LEN [N_CMD] = '{3, 4, 4};

endpackage
