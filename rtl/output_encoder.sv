// output_encoder: packs a packet's match results into 32-bit words.
//
// When `load` is pulsed (at the end of a packet) the N_BITS-bit result
// vector is captured and sent as NW = ceil(N_BITS/32) words, bits 31:0 first,
// on a valid/ready handshake; `out_last` marks the final word. While words
// are pending `busy` is high and a new `load` must wait: the matching pipeline
// holds its last character until the encoder is free, so matching of the next
// packet overlaps the sending of the previous packet's results.
module output_encoder #(
  parameter int unsigned N_BITS = 64,
  parameter int unsigned NW     = (N_BITS + 31) / 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [N_BITS-1:0] data,
  output logic              busy,
  output logic [31:0]       out_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_last
);
  localparam int unsigned IW = (NW > 1) ? $clog2(NW) : 1;

  logic [32*NW-1:0] buf_q;
  logic [IW-1:0]    idx;

  assign busy      = out_valid;
  assign out_data  = buf_q[32*idx +: 32];
  assign out_last  = (idx == IW'(NW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q     <= '0;
      idx       <= '0;
      out_valid <= 1'b0;
    end else if (load && !out_valid) begin
      buf_q     <= (32*NW)'(data);
      idx       <= '0;
      out_valid <= 1'b1;
    end else if (out_valid && out_ready) begin
      if (out_last) out_valid <= 1'b0;
      else          idx <= idx + IW'(1);
    end
  end

  // A load is only issued while the encoder is idle.
  assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy);
endmodule
