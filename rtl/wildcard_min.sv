// wildcard_min: wildcard sequence with a lower-bounded length, (*>=N).
//
// Input `x` high at character p means "the part of the expression before the
// wildcard ended just before p". Output `y` is high at the characters where
// the part after the wildcard may begin: x is delayed by a chain of N
// flip-flops (each skips exactly one arbitrary character) and, with HOLD set,
// the state is then kept for the rest of the packet, which makes the length
// unbounded above. With HOLD clear the block is an exact N-character gap, used
// in front of an upper-bounded wildcard to build an offset/depth window.
// All stored state is ignored at the first character of a packet.
module wildcard_min #(
  parameter int unsigned N    = 3,
  parameter bit          HOLD = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic adv,
  input  logic sop,
  input  logic x,
  output logic y
);
  logic delayed;

  if (N == 0) begin : g_nodelay
    assign delayed = x;
  end else begin : g_delay
    logic [N-1:0] d;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) d <= '0;
      else if (adv) begin
        d[0] <= x;
        for (int i = 1; i < N; i++) d[i] <= d[i-1] & ~sop;
      end
    end
    assign delayed = d[N-1] & ~sop;
  end

  if (HOLD) begin : g_hold
    logic h;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   h <= 1'b0;
      else if (adv) h <= y;
    end
    assign y = delayed | (h & ~sop);
  end else begin : g_nohold
    assign y = delayed;
  end
endmodule
