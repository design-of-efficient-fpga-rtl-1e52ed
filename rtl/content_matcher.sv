// content_matcher: one content pattern with its position options.
//
// Builds the regular expression (*>=MIN_GAP)(*<=MAX_GAP)(P0..P(LEN-1)) in
// front of a string NFA:
//   * offset/depth (relative to the packet start): drive `x` with the packet
//     start pulse, MIN_GAP = offset, HAS_MAX = 1, MAX_GAP = depth - LEN;
//     an offset without a depth uses HAS_MAX = 0 (gap unbounded above);
//   * distance/within (relative to the previous content of the rule): drive
//     `x` with the previous pattern's `hit` and set AFTER_HIT, which registers
//     it so the gap counts from the character after the previous match;
//     MIN_GAP = distance, MAX_GAP = within - LEN;
//   * no position option: tie `x` high, MIN_GAP = 0, HAS_MAX = 0.
// `hit` is high at the character that completes the pattern inside the
// allowed window. Combinational from `dec` to `hit`.
module content_matcher
  import hids_pkg::*;
#(
  parameter int unsigned LEN       = 4,
  parameter pat_t        PAT       = "abcd",
  parameter bit          NOCASE    = 1'b0,
  parameter int unsigned MIN_GAP   = 0,
  parameter bit          HAS_MAX   = 1'b0,
  parameter int unsigned MAX_GAP   = 0,
  parameter bit          AFTER_HIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic sop,
  input  logic x,      // start condition (see above)
  input  dec_t dec,
  output logic hit
);
  logic x0, w_min, w_max;

  if (AFTER_HIT) begin : g_after
    logic xr;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   xr <= 1'b0;
      else if (adv) xr <= x;
    end
    assign x0 = xr & ~sop;
  end else begin : g_direct
    assign x0 = x;
  end

  wildcard_min #(.N(MIN_GAP), .HOLD(!HAS_MAX)) u_min (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(x0), .y(w_min));

  if (HAS_MAX) begin : g_max
    wildcard_max #(.N(MAX_GAP)) u_max (
      .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(w_min), .y(w_max));
  end else begin : g_nomax
    assign w_max = w_min;
  end

  string_nfa #(.LEN(LEN), .PAT(PAT), .NOCASE(NOCASE)) u_nfa (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(w_max),
    .dec(dec), .hit(hit));
endmodule
