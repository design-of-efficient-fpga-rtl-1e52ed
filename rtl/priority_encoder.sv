// priority_encoder: reports the closest approximate match.
//
// An approximate matcher can signal a match on several of its K+1 outputs at
// once; only the one with the fewest differences is kept. Input bit i means
// "match with i differences"; `k` is the lowest set index (bit 0 has the
// highest priority) and `valid` is high when any bit is set. Combinational.
module priority_encoder #(
  parameter int unsigned K  = 2,
  parameter int unsigned KW = (K > 0) ? $clog2(K + 1) : 1
) (
  input  logic [K:0]    req,
  output logic          valid,
  output logic [KW-1:0] k
);
  always_comb begin
    k = '0;
    for (int i = K; i >= 0; i--) begin
      if (req[i]) k = KW'(i);
    end
  end
  assign valid = |req;
endmodule
