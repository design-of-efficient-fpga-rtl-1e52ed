// parallel_string_nfa: string NFA that consumes W characters per clock cycle.
//
// Each cycle brings a word of W characters, decoded by W shared decoders
// (lane i of `dec` is character i of the word). A pattern occurrence can
// start at any of the W lanes, so the circuit has W rows; row r matches the
// pattern starting at lane r. Pattern character j of row r sits at absolute
// position r+j, i.e. in word (r+j)/W, lane (r+j)%W. For each word a row ANDs
// the match lines of all its characters that fall into that word; between
// words the partial result is kept in a pipeline flip-flop. The OR of all
// rows is the pattern's match signal.
//
// Every row's first AND also takes `en_in` (tie high for an unanchored
// search). `hit` is high in the cycle of the word that completes the pattern
// in any row (combinational from `dec`); pipeline state advances on `adv` and
// is ignored in the first word of a packet.
module parallel_string_nfa
  import hids_pkg::*;
#(
  parameter int unsigned W      = 4,
  parameter int unsigned LEN    = 5,
  parameter pat_t        PAT    = "snort",
  parameter bit          NOCASE = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic sop,
  input  logic en_in,
  input  dec_t dec [W],
  output logic hit
);
  logic [W-1:0] row_hit;

  for (genvar r = 0; r < W; r++) begin : g_row
    localparam int unsigned RS = (r + LEN - 1) / W + 1;     // stages of row r
    logic [RS-1:0] term;   // AND of this word's match lines, per stage
    logic [RS-1:0] so;     // stage outputs
    logic [RS-1:0] st;     // pipeline registers (st[0] unused)

    for (genvar w = 0; w < RS; w++) begin : g_stage
      logic [LEN-1:0] in_w;
      for (genvar j = 0; j < LEN; j++) begin : g_ch
        if ((r + j) / W == w) begin : g_in
          nocase_select #(.CH(pat_char(PAT, LEN, j)), .NOCASE(NOCASE)) u_sel (
            .dec(dec[(r + j) % W]), .m(in_w[j]));
        end else begin : g_out
          assign in_w[j] = 1'b1;
        end
      end
      assign term[w] = &in_w;
      if (w == 0) begin : g_first
        assign st[0] = 1'b0;
        assign so[0] = en_in & term[0];
      end else begin : g_next
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)   st[w] <= 1'b0;
          else if (adv) st[w] <= so[w-1];
        end
        assign so[w] = st[w] & ~sop & term[w];
      end
    end
    assign row_hit[r] = so[RS-1];
  end

  assign hit = |row_hit;
endmodule
