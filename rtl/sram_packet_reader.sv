// sram_packet_reader: fetches packets from the downstream SRAM banks and
// streams them, as 32-bit words, into the pattern matching processor.
//
// The network processor fills the downstream banks with packets and the
// FPGA empties them; the two sides take turns on a bank through a lock, so
// the FPGA reads packets from one bank while the other bank is being filled.
// This reader works the banks in a fixed ping-pong order: it requests the
// lock of bank b, reads the packet count stored in word 0, and, if the bank
// holds packets, reads every packet into a small on-chip word buffer. It then
// writes 0 to word 0 (the bank is consumed), drops the lock and moves on to
// the other bank. An empty bank is released and polled again.
//
// Bank layout (this design's own choice; the banks' format is a convention
// between FPGA and network processor software):
//   word 0          number of packets P in the bank (0 = empty)
//   then per packet a header word, bits 15:0 = length in bytes (L), followed
//                   by ceil(L/4) payload words, first character in bits 31:24.
// A packet of length 0 is skipped.
//
// SRAM port: synchronous single-ported banks sharing one address/write bus,
// selected by a one-hot chip select; read data of bank b appears on
// bank_rdata[b] one cycle after the read. lock_req[b] is held while the bank
// is used; the bank may only be accessed while lock_gnt[b] is high. The
// reader's only write clears the count word, so bank_wdata is always zero; it
// is kept as a port so that the bank bus is complete.
//
// Output: the word stream of input_buffer (valid/ready, last word flag and
// the byte count of a partial last word, 0 meaning 4). Reads are issued only
// while the buffer has room for the returning word, so a full buffer simply
// pauses the bank reads. With the buffer drained, payload words are read one
// per cycle, four times the rate at which characters are consumed.
module sram_packet_reader #(
  parameter int unsigned N_BANKS   = 2,   // downstream banks
  parameter int unsigned AW        = 16,  // word address width of a bank
  parameter int unsigned BUF_DEPTH = 8    // on-chip buffer, words
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // downstream SRAM banks
  output logic [N_BANKS-1:0]      lock_req,
  input  logic [N_BANKS-1:0]      lock_gnt,
  output logic [N_BANKS-1:0]      bank_cs,
  output logic                    bank_we,
  output logic [AW-1:0]           bank_addr,
  output logic [31:0]             bank_wdata,
  input  logic [N_BANKS-1:0][31:0] bank_rdata,
  // packet words to the matcher
  output logic [31:0]             out_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic                    out_last,
  output logic [1:0]              out_nbytes
);
  localparam int unsigned BW = (N_BANKS > 1) ? $clog2(N_BANKS) : 1;
  localparam int unsigned DW = $clog2(BUF_DEPTH);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  typedef enum logic [2:0] {S_LOCK, S_COUNT, S_HDR, S_PAY, S_CLEAR, S_RELEASE} state_t;
  typedef enum logic [1:0] {R_NONE, R_COUNT, R_HDR, R_PAY} rd_t;

  state_t        state;
  rd_t           pend;        // kind of the read whose data arrives now
  logic [BW-1:0] bank;
  logic [AW-1:0] addr;
  logic [15:0]   pkts_left;   // packets still to read, including the current one
  logic [15:0]   words_left;  // payload words still to read
  logic [1:0]    last_nb;     // byte count of the packet's last word
  logic          pend_last;   // the pending payload word is the packet's last

  // ---------------- on-chip word buffer ----------------
  typedef struct packed {
    logic [31:0] data;
    logic        last;
    logic [1:0]  nb;
  } entry_t;
  entry_t        buf_q [BUF_DEPTH];
  logic [DW-1:0] wp, rp;
  logic [CW-1:0] cnt;
  logic          push, pop;
  entry_t        push_e;

  assign pop       = out_valid && out_ready;
  assign out_valid = (cnt != 0);
  assign out_data  = buf_q[rp].data;
  assign out_last  = buf_q[rp].last;
  assign out_nbytes = buf_q[rp].nb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (wp == DW'(BUF_DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == DW'(BUF_DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + CW'(push) - CW'(pop);
    end
  end
  always_ff @(posedge clk) if (push) buf_q[wp] <= push_e;

  // ---------------- bank access ----------------
  logic [31:0] rdata;
  logic        granted, issue_rd, room;
  assign rdata   = bank_rdata[bank];
  assign granted = lock_gnt[bank];
  // room for a word that is read now, counting one already on its way
  assign room    = (cnt + CW'(pend == R_PAY)) < CW'(BUF_DEPTH);

  assign push   = (pend == R_PAY);
  assign push_e = '{data: rdata, last: pend_last, nb: pend_last ? last_nb : 2'd0};

  always_comb begin
    lock_req   = '0;
    lock_req[bank] = (state != S_RELEASE);
    issue_rd   = 1'b0;
    bank_we    = 1'b0;
    bank_wdata = '0;
    case (state)
      S_COUNT: issue_rd = granted && (pend == R_NONE);
      S_HDR:   issue_rd = (pend == R_NONE);
      S_PAY:   issue_rd = room;
      S_CLEAR: bank_we  = 1'b1;
      default: ;
    endcase
    bank_cs       = '0;
    bank_cs[bank] = issue_rd || bank_we;
    bank_addr     = addr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOCK; pend <= R_NONE; bank <= '0; addr <= '0;
      pkts_left <= '0; words_left <= '0; last_nb <= '0; pend_last <= 1'b0;
    end else begin
      pend <= R_NONE;
      pend_last <= 1'b0;
      case (state)
        S_LOCK: if (granted) begin
          addr  <= '0;
          state <= S_COUNT;
        end
        S_COUNT: begin
          if (issue_rd) pend <= R_COUNT;
          if (pend == R_COUNT) begin
            pkts_left <= rdata[15:0];
            addr      <= AW'(1);
            state     <= (rdata[15:0] == 0) ? S_RELEASE : S_HDR;
          end
        end
        S_HDR: begin
          if (issue_rd) begin
            pend <= R_HDR;
            addr <= addr + 1'b1;
          end
          if (pend == R_HDR) begin
            words_left <= 16'(({1'b0, rdata[15:0]} + 17'd3) >> 2);
            last_nb    <= rdata[1:0];
            if (rdata[15:0] != 0) begin
              state <= S_PAY;
            end else if (pkts_left == 1) begin
              addr  <= '0;
              state <= S_CLEAR;
            end else begin
              pkts_left <= pkts_left - 1'b1;
            end
          end
        end
        S_PAY: if (issue_rd) begin
          pend       <= R_PAY;
          pend_last  <= (words_left == 1);
          addr       <= addr + 1'b1;
          words_left <= words_left - 1'b1;
          if (words_left == 1) begin
            if (pkts_left == 1) begin
              addr  <= '0;
              state <= S_CLEAR;
            end else begin
              pkts_left <= pkts_left - 1'b1;
              state     <= S_HDR;
            end
          end
        end
        S_CLEAR: state <= S_RELEASE;   // word 0 <= 0: bank consumed
        S_RELEASE: begin
          // lock dropped for a cycle; an empty bank is polled again,
          // a consumed one hands over to the next bank
          if (pkts_left != 0) bank <= (bank == BW'(N_BANKS - 1)) ? '0 : bank + 1'b1;
          pkts_left <= '0;
          state     <= S_LOCK;
        end
        default: state <= S_LOCK;
      endcase
    end
  end

  // A bank is only touched while its lock is granted.
  a_locked: assert property (@(posedge clk) disable iff (!rst_n)
    (|bank_cs) |-> |(bank_cs & lock_gnt));
  // The buffer never overflows.
  a_room: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (cnt < CW'(BUF_DEPTH)) || pop);
endmodule
