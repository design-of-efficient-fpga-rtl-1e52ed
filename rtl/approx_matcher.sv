// approx_matcher: NFA circuit for approximate matching (k-differences).
//
// Finds any piece of text that differs from the pattern P1..PLEN by at most K
// substituted, inserted or deleted characters. State (i,j) means "the first j
// pattern characters have been matched using i differences"; there are K+1
// rows of LEN flip-flops. For each character the next state is
//   (i,j) <- (i,j-1) and Pj matches            (match, along a row)
//          | (i-1,j)                            (insertion of this character)
//          | (i-1,j-1)                          (substitution)
//          | next (i-1,j-1)                     (deletion: no character used)
// where the states read are those before the character. Column j = 0 is not
// stored: state (0,0) is the start enable `en_in`, and the states (i,0),
// i > 0, are ignored because any text may precede a pattern. The deletions
// that leave (0,0) put (i,i) into the state before each character where
// `en_in` is high.
//
// Output i (final state (i,LEN)) signals a match with i differences. `out_next`
// is the value being written for the current character (the pattern ends at
// this character); `out_q` is the registered copy, one character later.
// Only the lowest active output is meaningful; see priority_encoder.
module approx_matcher
  import hids_pkg::*;
#(
  parameter int unsigned LEN    = 4,
  parameter pat_t        PAT    = "abcd",
  parameter bit          NOCASE = 1'b0,
  parameter int unsigned K      = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       adv,
  input  logic       sop,
  input  logic       en_in,
  input  dec_t       dec,
  output logic [K:0] out_next,
  output logic [K:0] out_q
);
  logic [LEN:1] m;
  logic [LEN:1] r  [K+1];   // stored states (i, 1..LEN)
  logic [LEN:0] s  [K+1];   // states before the current character
  logic [LEN:1] rn [K+1];   // states after the current character

  for (genvar j = 1; j <= LEN; j++) begin : g_sel
    nocase_select #(.CH(pat_char(PAT, LEN, j - 1)), .NOCASE(NOCASE)) u_sel (
      .dec(dec), .m(m[j]));
  end

  always_comb begin
    for (int i = 0; i <= K; i++) begin
      s[i][0] = (i == 0) ? en_in : 1'b0;
      for (int j = 1; j <= LEN; j++) begin
        s[i][j] = (r[i][j] & ~sop) | (en_in && (i == j));
      end
    end
    for (int i = 0; i <= K; i++) begin
      for (int j = 1; j <= LEN; j++) begin
        rn[i][j] = s[i][j-1] & m[j];
        if (i > 0) begin
          rn[i][j] = rn[i][j] | s[i-1][j] | s[i-1][j-1];
          if (j > 1) rn[i][j] = rn[i][j] | rn[i-1][j-1];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= K; i++) r[i] <= '0;
    end else if (adv) begin
      for (int i = 0; i <= K; i++) r[i] <= rn[i];
    end
  end

  for (genvar i = 0; i <= K; i++) begin : g_out
    assign out_next[i] = rn[i][LEN];
    assign out_q[i]    = r[i][LEN] & ~sop;
  end
endmodule
