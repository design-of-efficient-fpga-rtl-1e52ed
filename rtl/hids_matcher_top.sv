// hids_matcher_top: FPGA pattern matching processor for intrusion detection.
//
// Packet payloads arrive as 32-bit words; every stored pattern is searched
// for in every packet, in parallel, at one character per clock cycle, and
// after each packet a result record is sent as 32-bit words.
//
// Pipeline (one character per cycle):
//   input_buffer   32-bit words -> 8-bit characters with packet flags
//   char_decoder   shared 8-to-256 decoder, registered (stage 1)
//   matchers       NFA circuits for the patterns, all fed by the decoder lines:
//                  a prefix tree for the plain contents (strings that begin
//                  alike share cells), case-insensitive contents, offset/depth and
//                  distance/within windows, an approximate matcher with its
//                  priority encoder, and the protocol analyzer (method
//                  detection, argument patterns, argument length overflow)
//   match_vector   ANDs each rule's patterns and keeps per-packet results
//   output_encoder at the packet's last character the results are handed
//                  over and sent as words while the next packet is matched
// If the encoder is still sending the previous record when a packet ends, the
// whole character pipeline stalls (`in_ready` stays low) until it is free.
//
// The matchers instantiated here implement the example rule set of hids_rules_pkg;
// a different rule file gives a different set of instances (the circuit is
// generated per rule set).
//
// Result record, two words per packet:
//   word 0, bits N_RULES-1:0  rule r matched in the packet
//   word 1, bits K_BITS-1:0   fewest differences of the approximate rule
//                             (rule 5), bit 8 set when it matched
//
// The stage structure, the shared decoder, the per-rule AND and the overlap of
// result output with the next packet follow the published design of this
// matcher; the record layout, the handshakes and the stall are choices of
// this implementation.
//
// Side by side, an independent four-characters-per-cycle datapath
// (parallel_datapath) searches its own word stream for a plain content set;
// its ports carry the prefix `w_`.
module hids_matcher_top
  import hids_pkg::*;
  import hids_rules_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // packet words in
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_last,
  input  logic [1:0]  in_nbytes,
  // result words out
  output logic [31:0] out_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        out_last,
  // four-characters-per-cycle datapath
  input  logic [31:0] w_in_data,
  input  logic        w_in_valid,
  input  logic        w_in_sop,
  input  logic        w_in_eop,
  input  logic [2:0]  w_in_nvalid,
  output logic [3:0]  w_match,
  output logic        w_match_valid
);
  localparam int unsigned N_BITS = 64;

  // ---------------- character pipeline ----------------
  char_t ch, ch1;
  logic  ch_valid, ch_sop, ch_eop;
  logic  v1, sop1, eop1;
  logic  stall, adv, enc_busy;
  dec_t  dec;

  input_buffer u_in (
    .clk(clk), .rst_n(rst_n),
    .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .in_last(in_last), .in_nbytes(in_nbytes),
    .ch(ch), .ch_valid(ch_valid), .ch_sop(ch_sop), .ch_eop(ch_eop),
    .ch_ready(!stall));

  char_decoder u_dec (
    .clk(clk), .rst_n(rst_n), .en(!stall), .valid(ch_valid), .ch(ch), .dec(dec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sop1 <= 1'b0; eop1 <= 1'b0; ch1 <= '0;
    end else if (!stall) begin
      v1 <= ch_valid; sop1 <= ch_sop; eop1 <= ch_eop; ch1 <= ch;
    end
  end

  assign stall = v1 && eop1 && enc_busy;
  assign adv   = v1 && !stall;

  // ---------------- pattern matchers ----------------
  logic [N_RULES-1:0] hit0, hit1;
  logic               h0a, h0b, h4a, h4b;

  // Unanchored plain contents in one prefix tree: rule 0's "abc" and "cd",
  // rule 1's "abd" (sharing "ab" with "abc") and rule 4's "USER".
  localparam int unsigned           N_TREE    = 4;
  localparam pat_t [N_TREE-1:0]     TREE_PATS = '{R0_P0, R0_P1, R1_P0, R4_P0};
  localparam logic [N_TREE-1:0][7:0] TREE_LENS = '{8'(R0_L0), 8'(R0_L1), 8'(R1_L0), 8'(R4_L0)};
  logic [N_TREE-1:0] tree_hit;
  prefix_tree_nfa #(.N_PAT(N_TREE), .PATS(TREE_PATS), .LENS(TREE_LENS), .NOCASE('0)) u_tree (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .dec(dec), .hit(tree_hit));
  assign h0a     = tree_hit[0];
  assign h0b     = tree_hit[1];
  assign hit0[1] = tree_hit[2];
  assign h4a     = tree_hit[3];
  // Rule 2: "stat " in any letter case.
  content_matcher #(.LEN(R2_L0), .PAT(R2_P0), .NOCASE(1'b1)) u_r2 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .x(1'b1), .dec(dec), .hit(hit0[2]));
  // Rule 3: "snort" inside characters offset .. offset+depth-1.
  content_matcher #(.LEN(R3_L0), .PAT(R3_P0), .MIN_GAP(R3_OFFSET), .HAS_MAX(1'b1),
                    .MAX_GAP(R3_DEPTH - R3_L0)) u_r3 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .x(sop1), .dec(dec), .hit(hit0[3]));
  // Rule 4: "USER", then "root" starting at least `distance` characters after
  // its end; like offset/depth, `within` counts from that point, so "root"
  // must lie within the `within` characters that follow the distance gap.
  content_matcher #(.LEN(R4_L1), .PAT(R4_P1), .MIN_GAP(R4_DISTANCE), .HAS_MAX(1'b1),
                    .MAX_GAP(R4_WITHIN - R4_L1), .AFTER_HIT(1'b1)) u_r4b (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .x(h4a), .dec(dec), .hit(h4b));

  // Rule 5: "abcd" with at most K_APPROX differences.
  logic [K_APPROX:0] apx_next, apx_q;
  logic              apx_valid;
  logic [K_BITS-1:0] apx_k [1];
  approx_matcher #(.LEN(R5_L0), .PAT(R5_P0), .K(K_APPROX)) u_r5 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .en_in(1'b1), .dec(dec),
    .out_next(apx_next), .out_q(apx_q));
  priority_encoder #(.K(K_APPROX), .KW(K_BITS)) u_pe (
    .req(apx_next), .valid(apx_valid), .k(apx_k[0]));

  // Rules 6 and 7: protocol analysis.
  logic       cmd_hit, en_args, overflow;
  logic [0:0] arg_hit;
  protocol_analyzer #(.N_CMD(N_CMD), .CMD_PAT(CMD_PAT), .CMD_LEN(CMD_LEN),
                      .N_ARG(1), .ARG_PAT('{R6_P0}), .ARG_LEN('{R6_L0}),
                      .MAX_ARG(MAX_ARG)) u_proto (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1), .ch(ch1), .dec(dec),
    .cmd_hit(cmd_hit), .en_args(en_args), .arg_hit(arg_hit), .overflow(overflow));

  assign hit0[0] = h0a;
  assign hit1[0] = h0b;
  assign hit0[4] = h4b;
  assign hit0[5] = apx_valid;
  assign hit0[6] = arg_hit[0];
  assign hit0[7] = overflow;
  assign hit1[N_RULES-1:1] = '0;

  // ---------------- match vector and output ----------------
  logic [N_RULES-1:0] rules_now;
  logic [0:0]         kvalid_now;
  logic [K_BITS-1:0]  k_now [1];
  logic [N_BITS-1:0]  result;

  match_vector #(.N_RULES(N_RULES), .TWO_PAT(N_RULES'(1)), .N_APX(1), .KW(K_BITS)) u_mv (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop1),
    .hit0(hit0), .hit1(hit1), .apx_valid(apx_valid), .apx_k(apx_k),
    .rules_now(rules_now), .kvalid_now(kvalid_now), .k_now(k_now));

  always_comb begin
    result = '0;
    result[N_RULES-1:0]     = rules_now;
    result[32 +: K_BITS]    = k_now[0];
    result[40]              = kvalid_now[0];
  end

  output_encoder #(.N_BITS(N_BITS)) u_enc (
    .clk(clk), .rst_n(rst_n), .load(adv && eop1), .data(result), .busy(enc_busy),
    .out_data(out_data), .out_valid(out_valid), .out_ready(out_ready), .out_last(out_last));

  // ---------------- four characters per cycle ----------------
  parallel_datapath u_x4 (
    .clk(clk), .rst_n(rst_n),
    .in_data(w_in_data), .in_valid(w_in_valid), .in_sop(w_in_sop), .in_eop(w_in_eop), .in_nvalid(w_in_nvalid),
    .match(w_match), .match_valid(w_match_valid));
endmodule
