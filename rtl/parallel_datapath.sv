// parallel_datapath: pattern matching at four characters per clock cycle.
//
// A 32-bit word (four characters, first in bits 31:24) enters per cycle with
// packet start/end flags and the number of valid characters in the last word.
// Four shared decoders (parallel_decoder) turn the word into four sets of 256
// match lines, one register stage later. Each pattern is matched by a
// parallel_string_nfa, which tries all four start lanes at once. Per-packet
// results are kept in sticky flags; at the packet's last word `match` gives,
// one bit per pattern, whether the pattern occurred in the packet, and
// `match_valid` pulses (two cycles after the last word was presented).
//
// The patterns are this datapath's own example set (N_PAT contents, the
// first being the "snort" pattern of the four-way example circuit).
module parallel_datapath
  import hids_pkg::*;
#(
  parameter int unsigned W      = 4,
  parameter int unsigned N_PAT  = 4,
  parameter pat_t        PATS   [N_PAT] = '{"snort", "abc", "stat ", "root"},
  parameter int unsigned LENS   [N_PAT] = '{5, 3, 5, 4},
  parameter logic [N_PAT-1:0] NOCASE = 4'b0100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [8*W-1:0]   in_data,
  input  logic             in_valid,
  input  logic             in_sop,
  input  logic             in_eop,
  input  logic [$clog2(W+1)-1:0] in_nvalid,   // valid characters, used on the last word
  output logic [N_PAT-1:0] match,
  output logic             match_valid
);
  localparam int unsigned NVW = $clog2(W + 1);

  dec_t             dec [W];
  logic             v1, sop1, eop1;
  logic [N_PAT-1:0] hit, sticky, now;
  logic [NVW-1:0]   nv;

  assign nv = in_eop ? in_nvalid : NVW'(W);

  parallel_decoder #(.W(W)) u_dec (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .word(in_data),
    .nvalid(in_valid ? nv : '0), .dec(dec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; sop1 <= 1'b0; eop1 <= 1'b0;
    end else begin
      v1 <= in_valid; sop1 <= in_sop; eop1 <= in_eop;
    end
  end

  for (genvar p = 0; p < N_PAT; p++) begin : g_pat
    parallel_string_nfa #(.W(W), .LEN(LENS[p]), .PAT(PATS[p]), .NOCASE(NOCASE[p])) u_nfa (
      .clk(clk), .rst_n(rst_n), .adv(v1), .sop(sop1), .en_in(1'b1),
      .dec(dec), .hit(hit[p]));
  end

  assign now = (sop1 ? '0 : sticky) | hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sticky      <= '0;
      match       <= '0;
      match_valid <= 1'b0;
    end else begin
      match_valid <= v1 && eop1;
      if (v1) sticky <= now;
      if (v1 && eop1) match <= now;
    end
  end
endmodule
