// sram_result_writer: stores the match result records of the pattern
// matching processor in the upstream SRAM bank, where the network processor
// picks them up.
//
// The upstream bank is shared with the network processor through a lock.
// When a record starts to arrive, the writer requests the lock, reads the
// number of result words already in the bank (word 0), appends the record's
// words behind them and writes the new count back to word 0 before it drops
// the lock. The network processor consumes records by locking the bank,
// reading them and writing 0 to word 0. If the record would not fit, the
// writer releases the lock, waits HOLDOFF cycles and tries again, and the
// matcher's output stage is held meanwhile (which in turn stalls the matcher).
//
// Bank layout (this design's own choice): word 0 = number of result words N
// that follow; words 1..N = result records, oldest first, each REC_WORDS
// words in the order the output encoder sends them.
//
// SRAM port: synchronous single-ported bank, read data one cycle after the
// read; accessed only while lock_gnt is high. Record input: the output
// encoder's word stream (valid/ready, last word flag). A record of
// REC_WORDS words takes about REC_WORDS + 4 cycles once the lock is granted.
module sram_result_writer #(
  parameter int unsigned AW        = 16,  // word address width of the bank
  parameter int unsigned REC_WORDS = 2,   // words per result record
  parameter int unsigned HOLDOFF   = 16   // retry delay when the bank is full
) (
  input  logic          clk,
  input  logic          rst_n,
  // result words from the output encoder
  input  logic [31:0]   res_data,
  input  logic          res_valid,
  output logic          res_ready,
  input  logic          res_last,
  // upstream SRAM bank
  output logic          lock_req,
  input  logic          lock_gnt,
  output logic          bank_cs,
  output logic          bank_we,
  output logic [AW-1:0] bank_addr,
  output logic [31:0]   bank_wdata,
  input  logic [31:0]   bank_rdata
);
  localparam logic [AW:0] CAP = (AW+1)'((1 << AW) - 1);   // words after word 0

  typedef enum logic [2:0] {S_IDLE, S_LOCK, S_READ, S_WAIT, S_DATA, S_COUNT, S_BACKOFF} state_t;

  state_t        state;
  logic [AW-1:0] n_words;    // words in the bank, including this record so far
  logic [7:0]    wait_cnt;

  always_comb begin
    lock_req   = (state == S_LOCK) || (state == S_READ) || (state == S_WAIT) ||
                 (state == S_DATA) || (state == S_COUNT);
    res_ready  = (state == S_DATA);
    bank_cs    = 1'b0;
    bank_we    = 1'b0;
    bank_addr  = '0;
    bank_wdata = '0;
    case (state)
      S_READ:  bank_cs = 1'b1;
      S_DATA: begin
        bank_cs    = res_valid;
        bank_we    = res_valid;
        bank_addr  = n_words + 1'b1;
        bank_wdata = res_data;
      end
      S_COUNT: begin
        bank_cs    = 1'b1;
        bank_we    = 1'b1;
        bank_wdata = 32'(n_words);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; n_words <= '0; wait_cnt <= '0;
    end else begin
      case (state)
        S_IDLE:  if (res_valid) state <= S_LOCK;
        S_LOCK:  if (lock_gnt) state <= S_READ;
        S_READ:  state <= S_WAIT;
        S_WAIT: begin
          n_words <= bank_rdata[AW-1:0];
          if ({1'b0, bank_rdata[AW-1:0]} + (AW+1)'(REC_WORDS) > CAP) begin
            wait_cnt <= 8'(HOLDOFF);
            state    <= S_BACKOFF;
          end else begin
            state <= S_DATA;
          end
        end
        S_DATA: if (res_valid) begin
          n_words <= n_words + 1'b1;
          if (res_last) state <= S_COUNT;
        end
        S_COUNT: state <= S_IDLE;
        S_BACKOFF: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt == 0) state <= S_LOCK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The bank is only touched while the lock is granted.
  a_locked: assert property (@(posedge clk) disable iff (!rst_n) bank_cs |-> lock_gnt);
endmodule
