// match_vector: per-packet rule match register.
//
// Each rule has up to two content patterns; a rule matches when all of its
// patterns have been found in the packet (the patterns' outputs are ANDed).
// Pattern outputs are pulses at the character that completes a pattern, so
// each pattern has a sticky flag that is set by its pulse and cleared at the
// next packet start. TWO_PAT bit r says rule r has a second pattern (`hit1`);
// otherwise `hit1[r]` is ignored.
//
// For approximate rules the closest match seen in the packet is kept: the
// smallest k reported by the priority encoders.
//
// `rules_now` and `k_now` are the results including the current character,
// so at the packet's last character they are the packet's final results.
module match_vector #(
  parameter int unsigned    N_RULES = 8,
  parameter logic [N_RULES-1:0] TWO_PAT = '0,
  parameter int unsigned    N_APX   = 1,
  parameter int unsigned    KW      = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adv,
  input  logic                sop,
  input  logic [N_RULES-1:0]  hit0,
  input  logic [N_RULES-1:0]  hit1,
  input  logic [N_APX-1:0]    apx_valid,
  input  logic [KW-1:0]       apx_k [N_APX],
  output logic [N_RULES-1:0]  rules_now,
  output logic [N_APX-1:0]    kvalid_now,
  output logic [KW-1:0]       k_now [N_APX]
);
  logic [N_RULES-1:0] s0, s1, f0, f1;
  logic [N_APX-1:0]   kv;
  logic [KW-1:0]      kb [N_APX];

  assign f0 = (sop ? '0 : s0) | hit0;
  assign f1 = (sop ? '0 : s1) | hit1;
  assign rules_now = f0 & (f1 | ~TWO_PAT);

  always_comb begin
    for (int a = 0; a < N_APX; a++) begin
      kvalid_now[a] = (kv[a] & ~sop) | apx_valid[a];
      if (kv[a] && !sop && (!apx_valid[a] || kb[a] <= apx_k[a])) k_now[a] = kb[a];
      else if (apx_valid[a])                                      k_now[a] = apx_k[a];
      else                                                        k_now[a] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0 <= '0;
      s1 <= '0;
      kv <= '0;
      for (int a = 0; a < N_APX; a++) kb[a] <= '0;
    end else if (adv) begin
      s0 <= f0;
      s1 <= f1;
      kv <= kvalid_now;
      kb <= k_now;
    end
  end
endmodule
