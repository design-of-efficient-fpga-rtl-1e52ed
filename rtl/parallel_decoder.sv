// parallel_decoder: W shared character decoders for a W-character word.
//
// Lane i (character i of the word, taken from bits 31-8i:24-8i for W = 4) is
// decoded into 256 one-hot match lines, exactly as char_decoder does for one
// character. Lanes at or beyond `nvalid` (the valid characters of a packet's
// last word) decode to all zeros so they match nothing. Outputs are
// registered and load when `en` is high.
module parallel_decoder
  import hids_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [8*W-1:0]            word,
  input  logic [$clog2(W+1)-1:0]    nvalid,
  output dec_t                      dec [W]
);
  for (genvar i = 0; i < W; i++) begin : g_lane
    logic lane_ok;
    assign lane_ok = (i < nvalid);
    char_decoder u_dec (
      .clk(clk), .rst_n(rst_n), .en(en),
      .ch(word[8*(W-1-i) +: 8]), .valid(lane_ok), .dec(dec[i]));
  end
endmodule
