// tb_sram_result_writer: self-checking test of the upstream bank writer.
//
// A small bank (AW=4: 15 result words after the count word) makes the
// bank-full case frequent. A source sends two-word result records with
// random gaps; a model of the network processor locks the bank at random
// times, reads the count in word 0 and the records behind it, compares them
// with the records that were sent, in order, and empties the bank by writing
// 0 to word 0. Checked as well: the bank is only accessed under the lock, a
// record is never split across two lock periods, and both the full-bank
// retry and lock contention happen.
module tb_sram_result_writer;
  localparam int AW = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] res_data = '0, bank_wdata, bank_rdata = '0;
  logic res_valid = 0, res_ready, res_last = 0;
  logic lock_req, lock_gnt = 0, bank_cs, bank_we;
  logic [AW-1:0] bank_addr;

  sram_result_writer #(.AW(AW), .REC_WORDS(2), .HOLDOFF(3)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [1 << AW];
  logic [31:0] exp_q [$];
  bit ixp_want = 0, ixp_hold = 0, mid_rec = 0;
  int n_full = 0, n_contend = 0, n_recs = 0, n_read = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (bank_cs) begin
      checks++;
      if (!lock_gnt) failures++;
      if (bank_we) mem[bank_addr] <= bank_wdata;
      else bank_rdata <= mem[bank_addr];
    end
    if (ixp_want && !ixp_hold && !lock_gnt) ixp_hold <= 1;
    if (lock_req && !lock_gnt && (ixp_hold || ixp_want)) n_contend++;
    lock_gnt <= lock_req && !ixp_hold && !(ixp_want && !lock_gnt);
    // a granted lock is not dropped in the middle of a record
    if (res_valid && res_ready) mid_rec <= !res_last;
    if (lock_gnt && !lock_req && mid_rec) failures++;
    // count read while the bank cannot take another record: a retry follows
    if (bank_cs && !bank_we && bank_addr == 0 && mem[0] + 2 > 15) n_full++;
  end

  // record source
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      for (int w = 0; w < 2; w++) begin
        automatic logic [31:0] d = $urandom;
        @(negedge clk);
        res_valid = 1; res_data = d; res_last = (w == 1);
        exp_q.push_back(d);
        @(posedge clk);
        while (!res_ready) @(posedge clk);
        @(negedge clk); res_valid = 0; res_last = 0;
        if ($urandom % 2 != 0) repeat ($urandom % 4) @(negedge clk);
      end
      n_recs++;
    end
  end

  // network processor: drain the bank now and then
  initial begin
    mem[0] = 0;
    repeat (3) @(posedge clk);
    while (n_read < 600) begin
      repeat ($urandom % 200) @(negedge clk);
      ixp_want = 1;
      while (!ixp_hold) @(negedge clk);
      ixp_want = 0;
      checks++;
      if (mem[0] % 2 != 0 || mem[0] > 15) failures++;   // whole records only
      for (int i = 1; i <= int'(mem[0]); i++) begin
        checks++;
        if (exp_q.size() == 0 || mem[i] !== exp_q[0]) failures++;
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n_read++;
      end
      mem[0] = 0;
      @(negedge clk);
      ixp_hold = 0;
    end
    checks += 2;
    if (n_full == 0) failures++;
    if (n_contend == 0) failures++;
    $display("records=%0d words_read=%0d full_retries=%0d contention=%0d", n_recs, n_read, n_full, n_contend);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
