// input_buffer: serializes 32-bit packet words into 8-bit characters.
//
// Packets arrive as 32-bit words with a valid/ready handshake; the first
// character of a word is in bits 31:24. `in_last` marks the final word of a
// packet and `in_nbytes` gives how many of its bytes are valid (0 means all
// four). One character leaves per cycle on a valid/ready handshake, tagged
// with start-of-packet and end-of-packet flags. A new word is accepted in the
// same cycle the previous word's last character leaves, so a continuous
// stream of words gives one character every clock cycle without gaps.
module input_buffer
  import hids_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        in_last,
  input  logic [1:0]  in_nbytes,
  output char_t       ch,
  output logic        ch_valid,
  output logic        ch_sop,
  output logic        ch_eop,
  input  logic        ch_ready
);
  logic [31:0] word;
  logic [2:0]  left;      // characters of `word` not yet sent
  logic        last_w;    // `word` is the packet's last word
  logic        first;     // next character sent starts a packet
  logic        take_ch;

  assign ch       = word[31:24];
  assign ch_valid = (left != 3'd0);
  assign ch_eop   = last_w && (left == 3'd1);
  assign ch_sop   = first;
  assign take_ch  = ch_valid && ch_ready;
  assign in_ready = (left == 3'd0) || (take_ch && left == 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word   <= '0;
      left   <= '0;
      last_w <= 1'b0;
      first  <= 1'b1;
    end else begin
      if (take_ch) begin
        word  <= {word[23:0], 8'h00};
        left  <= left - 3'd1;
        first <= ch_eop;
      end
      if (in_valid && in_ready) begin
        word   <= in_data;
        left   <= (in_last && in_nbytes != 2'd0) ? {1'b0, in_nbytes} : 3'd4;
        last_w <= in_last;
      end
    end
  end
endmodule
