// wildcard_max: wildcard sequence with an upper-bounded length, (*<=N).
//
// Input `x` high at character p means "the part before the wildcard ended
// just before p". Output `y` is high at p, p+1, ..., p+N: the part after the
// wildcard may begin after skipping between 0 and N arbitrary characters.
// A chain of N flip-flops carries x forward one character per stage and the
// stage outputs are ORed with x. State is ignored at the first character of a
// packet.
module wildcard_max #(
  parameter int unsigned N = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic sop,
  input  logic x,
  output logic y
);
  if (N == 0) begin : g_none
    assign y = x;
  end else begin : g_chain
    logic [N-1:0] d;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) d <= '0;
      else if (adv) begin
        d[0] <= x;
        for (int i = 1; i < N; i++) d[i] <= d[i-1] & ~sop;
      end
    end
    assign y = x | ((|d) & ~sop);
  end
endmodule
