// tb_sram_packet_reader: self-checking test of the downstream bank reader.
//
// Two single-ported bank models with a lock each are shared with a model of
// the network processor, which waits until a bank is unlocked and empty,
// locks it, writes a random batch of packets (count in word 0, then a length
// header and the payload words per packet, some packets of length 0) and
// unlocks it, alternating between the banks. The word stream the reader
// produces is compared word by word (data, last flag, byte count) with the
// packets that were written, under random back-pressure. Also checked: a
// bank is only accessed while its lock is granted, every consumed bank has
// word 0 cleared, empty banks are polled, and with the sink always ready a
// 40-word packet leaves the reader in 40 consecutive cycles.
module tb_sram_packet_reader;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] lock_req, lock_gnt = '0, bank_cs;
  logic bank_we;
  logic [AW-1:0] bank_addr;
  logic [31:0] bank_wdata, out_data;
  logic [1:0][31:0] bank_rdata = '0;
  logic out_valid, out_ready = 0, out_last;
  logic [1:0] out_nbytes;

  sram_packet_reader #(.N_BANKS(2), .AW(AW), .BUF_DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [2][1 << AW];
  bit ixp_hold [2] = '{0, 0};
  bit ixp_want [2] = '{0, 0};
  typedef struct { logic [31:0] d; bit last; logic [1:0] nb; } wexp_t;
  wexp_t exp_q [$];
  int n_words = 0, n_zero = 0, n_polls = 0, n_switch = 0;
  bit fast_mode = 0;
  int fast_first = -1, fast_last = -1, cyc = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // banks and lock arbitration
  always @(posedge clk) begin
    cyc++;
    for (int b = 0; b < 2; b++) begin
      if (bank_cs[b]) begin
        checks++;
        if (!lock_gnt[b]) failures++;
        if (bank_we) mem[b][bank_addr] <= bank_wdata;
        else bank_rdata[b] <= mem[b][bank_addr];
        if (!bank_we && bank_addr == 0 && lock_gnt[b]) n_polls++;
      end
      // the network processor gets a bank it asks for as soon as the FPGA
      // does not hold it; otherwise the FPGA gets it on request
      if (ixp_want[b] && !ixp_hold[b] && !lock_gnt[b]) ixp_hold[b] <= 1;
      lock_gnt[b] <= lock_req[b] && !ixp_hold[b] && !(ixp_want[b] && !lock_gnt[b]);
    end
  end

  // output sink
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        automatic wexp_t e = exp_q.pop_front();
        if (out_data !== e.d || out_last !== e.last || out_nbytes !== e.nb) begin
          failures++;
          if (failures < 5) $display("word %0d: got %h %b %0d exp %h %b %0d", n_words,
                                     out_data, out_last, out_nbytes, e.d, e.last, e.nb);
        end
      end
      n_words++;
      if (fast_mode) begin
        if (fast_first < 0) fast_first = cyc;
        fast_last = cyc;
      end
    end
  end

  // network processor: fill bank b with n packets
  task automatic fill(int b, int n, int fixed_len = -1);
    int a = 1;
    // wait until the FPGA has released the bank, then lock it
    ixp_want[b] = 1;
    while (!ixp_hold[b]) @(negedge clk);
    ixp_want[b] = 0;
    checks++;
    if (mem[b][0] != 0) failures++;      // previous batch consumed and cleared
    for (int p = 0; p < n; p++) begin
      int len = (fixed_len >= 0) ? fixed_len : (($urandom % 6 == 0) ? 0 : 1 + $urandom % 40);
      int nw = (len + 3) / 4;
      mem[b][a++] = 32'(len);
      if (len == 0) n_zero++;
      for (int w = 0; w < nw; w++) begin
        wexp_t e;
        logic [31:0] d = $urandom;
        mem[b][a++] = d;
        e.d = d; e.last = (w == nw - 1); e.nb = e.last ? 2'(len % 4) : 2'd0;
        exp_q.push_back(e);
      end
    end
    mem[b][0] = 32'(n);
    ixp_hold[b] = 0;
  endtask

  initial begin
    mem[0][0] = 0; mem[1][0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        if (!fast_mode) out_ready = ($urandom % 4 != 0);
      end
    join_none
    repeat (30) @(posedge clk);           // both banks empty: reader polls
    for (int r = 0; r < 40; r++) begin
      fill(r % 2, 1 + $urandom % 5);
      n_switch++;
      repeat ($urandom % 30) @(posedge clk);
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    // rate: one 40-word packet, sink always ready
    @(negedge clk); fast_mode = 1; out_ready = 1;
    fill(0, 1, 160);
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks += 4;
    if (fast_last - fast_first != 39) begin
      failures++;
      $display("40 words took %0d cycles", fast_last - fast_first + 1);
    end
    if (n_zero == 0) failures++;
    if (n_polls < 10) failures++;
    if (mem[0][0] != 0 || mem[1][0] != 0) failures++;
    $display("words=%0d zero_len=%0d polls=%0d batches=%0d", n_words, n_zero, n_polls, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
