// tb_hids_coprocessor_top: end-to-end test of the co-processor with every
// parameter at its default.
//
// Board models: two downstream banks and one upstream bank (64K words each,
// single-ported, one cycle read latency) with a lock per bank, and a model of
// the network processor. The network processor writes batches of random
// packets into the downstream banks in turn (count word, length headers,
// payload words; a few empty packets), and now and then locks the upstream
// bank, takes the result records out and clears it. Each record is compared
// with the result computed directly from the packet text by the reference
// functions (substring searches, position windows, edit distance, request
// argument rules). The packets are also fed to the four-characters-per-cycle
// datapath and its results are checked.
//
// Mechanisms counted, each of which must happen at least once: matcher stall
// (output stage busy at a packet end), empty packet skipped, empty bank
// polled, batches from both downstream banks, upstream lock contention,
// partial last word, case-insensitive hit, offset/depth hit and miss,
// distance/within hit, approximate hits with 1 and 2 differences, argument
// pattern hit, argument overflow, a four-wide datapath hit, and a packet in
// which both strings of the shared prefix "ab" ("abc", "abd") occur. The
// same packets also go, one character per clock, through the two baseline
// matchers beside the co-processor, whose hits are checked at every
// character; a packet with a baseline hit is counted as well.
module tb_hids_coprocessor_top;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] dn_lock_req, dn_lock_gnt = '0, dn_cs;
  logic dn_we;
  logic [15:0] dn_addr, up_addr;
  logic [31:0] dn_wdata, up_wdata, up_rdata = '0;
  logic [1:0][31:0] dn_rdata = '0;
  logic up_lock_req, up_lock_gnt = 0, up_cs, up_we;
  logic [31:0] w_in_data = '0;
  logic w_in_valid = 0, w_in_sop = 0, w_in_eop = 0;
  logic [2:0] w_in_nvalid = 0;
  logic [3:0] w_match;
  logic w_match_valid;
  logic [7:0] b_ch = '0;
  logic b_adv = 0, b_sop = 0;
  logic [1:0] b_bf_hit, b_cn_hit;

  hids_coprocessor_top dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] dmem [2][1 << 16];
  logic [31:0] umem [1 << 16];
  bit dn_want [2] = '{0, 0}, dn_hold [2] = '{0, 0};
  bit up_want = 0, up_hold = 0;
  res_t exp_q [$];
  logic [3:0] wexp_q [$];
  bytes_t x4_q [$], b_q [$];
  int n_pkts = 0, n_recs = 0;
  int m_stall = 0, m_zero = 0, m_poll = 0, m_bank [2] = '{0, 0}, m_contend = 0;
  int m_partial = 0, m_nocase = 0, m_win = 0, m_winmiss = 0, m_rel = 0;
  int m_k1 = 0, m_k2 = 0, m_uri = 0, m_ovf = 0, m_x4 = 0, m_tree = 0, m_base = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog: records %0d of %0d", n_recs, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // banks and lock arbitration (the network processor wins a free bank)
  always @(posedge clk) begin
    for (int b = 0; b < 2; b++) begin
      if (dn_cs[b]) begin
        checks++;
        if (!dn_lock_gnt[b]) begin failures++; $display("dn access without lock"); end
        if (dn_we) dmem[b][dn_addr] <= dn_wdata;
        else dn_rdata[b] <= dmem[b][dn_addr];
        if (!dn_we && dn_addr == 0 && dmem[b][0] == 0) m_poll++;
      end
      if (dn_want[b] && !dn_hold[b] && !dn_lock_gnt[b]) dn_hold[b] <= 1;
      dn_lock_gnt[b] <= dn_lock_req[b] && !dn_hold[b] && !(dn_want[b] && !dn_lock_gnt[b]);
    end
    if (up_cs) begin
      checks++;
      if (!up_lock_gnt) failures++;
      if (up_we) umem[up_addr] <= up_wdata;
      else up_rdata <= umem[up_addr];
    end
    if (up_want && !up_hold && !up_lock_gnt) up_hold <= 1;
    if (up_lock_req && !up_lock_gnt && (up_hold || up_want)) m_contend++;
    up_lock_gnt <= up_lock_req && !up_hold && !(up_want && !up_lock_gnt);
    if (rst_n && dut.u_match.stall) m_stall++;
    if (rst_n && w_match_valid) begin
      checks++;
      if (wexp_q.size() == 0 || w_match !== wexp_q[0]) begin failures++; $display("x4 mismatch %b", w_match); end
      if (wexp_q.size() != 0) void'(wexp_q.pop_front());
    end
  end

  function automatic bytes_t random_packet(int pkt);
    string frags [] = '{"abc", "cd", "e", "STAT ", "Stat ", "stat", "snort", "xxsnort", "USER",
                        "root", "USER root", "USERroot", "USER  xx root", "abcd", "abxd",
                        "abd", "axcd", "GET ", "POST  ", "HEAD\t", "/bin/sh", "/aaaaaaaaaaaaaaaaaa",
                        " ", "x", "zz", "q", "GET /bin/sh HTTP", "GET /index.html HTTP"};
    string s = (pkt % 5 == 0) ? "xx" : "";
    int nf = 1 + $urandom % 5;
    for (int f = 0; f < nf; f++) s = {s, frags[$urandom % frags.size()]};
    if (pkt % 7 == 0) s = "a";
    return to_bytes(s);
  endfunction

  // network processor, downstream: one batch of packets into bank b
  task automatic fill(int b, int n);
    int a = 1;
    dn_want[b] = 1;
    while (!dn_hold[b]) @(negedge clk);
    dn_want[b] = 0;
    checks++;
    if (dmem[b][0] != 0) begin failures++; $display("bank %0d not consumed", b); end
    for (int p = 0; p < n; p++) begin
      bytes_t t = ($urandom % 25 == 0) ? bytes_t'{} : random_packet(n_pkts);
      dmem[b][a++] = 32'(t.size());
      if (t.size() == 0) begin
        m_zero++;
        continue;
      end
      for (int w = 0; w < (t.size() + 3) / 4; w++) begin
        logic [31:0] d = '0;
        for (int l = 0; l < 4; l++) if (4*w + l < t.size()) d[31 - 8*l -: 8] = t[4*w + l];
        dmem[b][a++] = d;
      end
      begin
        res_t r = hids_expected(t);
        exp_q.push_back(r);
        wexp_q.push_back({contains(t, "root"), contains(t, "stat ", 1), contains(t, "abc"), contains(t, "snort")});
        x4_q.push_back(t);
        b_q.push_back(t);
        if (t.size() % 4 != 0) m_partial++;
        if (r[2] && !contains(t, "stat ")) m_nocase++;
        if (r[3]) m_win++;
        if (!r[3] && contains(t, "snort")) m_winmiss++;
        if (r[4]) m_rel++;
        if (r[40] && r[33:32] == 2'd1) m_k1++;
        if (r[40] && r[33:32] == 2'd2) m_k2++;
        if (r[6]) m_uri++;
        if (r[1] && contains(t, "abc")) m_tree++;
        if (r[7]) m_ovf++;
        if (contains(t, "snort") || contains(t, "root")) m_x4++;
      end
      n_pkts++;
    end
    dmem[b][0] = 32'(n);
    m_bank[b]++;
    @(negedge clk);
    dn_hold[b] = 0;
  endtask

  // network processor, upstream: take the result records out
  task automatic drain();
    up_want = 1;
    while (!up_hold) @(negedge clk);
    up_want = 0;
    checks++;
    if (umem[0] % 2 != 0) failures++;
    for (int i = 1; i <= int'(umem[0]); i += 2) begin
      checks++;
      if (exp_q.size() == 0 || {umem[i+1], umem[i]} !== exp_q[0]) begin
        failures++;
        if (failures < 6) $display("record %0d: got %h_%h exp %h", n_recs, umem[i+1], umem[i],
                                   exp_q.size() != 0 ? exp_q[0] : 64'h0);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_recs++;
    end
    umem[0] = 0;
    @(negedge clk);
    up_hold = 0;
  endtask

  // the same packets through the four-wide datapath
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (x4_q.size() != 0) begin
        automatic bytes_t t = x4_q.pop_front();
        automatic int nwords = (t.size() + 3) / 4;
        for (int w = 0; w < nwords; w++) begin
          w_in_valid = 1; w_in_sop = (w == 0); w_in_eop = (w == nwords - 1);
          w_in_nvalid = 3'((t.size() - 4*w > 4) ? 4 : t.size() - 4*w);
          w_in_data = '0;
          for (int l = 0; l < 4; l++) if (4*w + l < t.size()) w_in_data[31 - 8*l -: 8] = t[4*w + l];
          @(negedge clk);
        end
        w_in_valid = 0; w_in_sop = 0; w_in_eop = 0;
      end
    end
  end

  // the same packets, one character per clock, through both baseline
  // matchers ("snort" and "stat " in any case), checked at every character
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      b_adv = 0; b_sop = 0;
      if (b_q.size() != 0) begin
        automatic bytes_t t = b_q.pop_front();
        automatic bytes_t txt = {};
        automatic bit any = 0;
        for (int p = 0; p < t.size(); p++) begin
          automatic logic [1:0] e;
          txt.push_back(t[p]);
          b_adv = 1; b_sop = (p == 0); b_ch = t[p];
          e = {ends_at(txt, "stat ", p, 1), ends_at(txt, "snort", p, 0)};
          #1;
          checks += 2;
          if (b_bf_hit !== e) begin failures++; $display("brute-force hit %b, expected %b", b_bf_hit, e); end
          if (b_cn_hit !== e) begin failures++; $display("comparator NFA hit %b, expected %b", b_cn_hit, e); end
          if (e != 0) any = 1;
          @(negedge clk);
        end
        b_adv = 0; b_sop = 0;
        if (any) m_base++;
      end
    end
  end

  initial begin
    dmem[0][0] = 0; dmem[1][0] = 0; umem[0] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);              // nothing to do yet: banks polled
    fork
      for (int r = 0; r < 120; r++) begin
        fill(r % 2, 1 + $urandom % 8);
        repeat ($urandom % 40) @(posedge clk);
      end
      begin
        repeat (200) @(posedge clk);
        while (exp_q.size() != 0 || n_recs == 0) begin
          repeat ($urandom % 150) @(posedge clk);
          drain();
        end
      end
    join
    repeat (200) @(posedge clk);
    drain();
    repeat (20) @(posedge clk);
    checks += 4;
    if (n_recs != n_pkts) failures++;
    if (exp_q.size() != 0) failures++;
    if (wexp_q.size() != 0) failures++;
    if (b_q.size() != 0) failures++;
    $display("packets=%0d records=%0d stall_cycles=%0d empty_pkts=%0d polls=%0d batches=%0d/%0d contention=%0d",
             n_pkts, n_recs, m_stall, m_zero, m_poll, m_bank[0], m_bank[1], m_contend);
    $display("partial=%0d nocase=%0d window=%0d window_miss=%0d distance_within=%0d k1=%0d k2=%0d uri=%0d overflow=%0d x4=%0d shared_prefix=%0d baseline=%0d",
             m_partial, m_nocase, m_win, m_winmiss, m_rel, m_k1, m_k2, m_uri, m_ovf, m_x4, m_tree, m_base);
    checks += 18;
    if (m_stall == 0) failures++;
    if (m_zero == 0) failures++;
    if (m_poll == 0) failures++;
    if (m_bank[0] == 0 || m_bank[1] == 0) failures++;
    if (m_contend == 0) failures++;
    if (m_partial == 0) failures++;
    if (m_nocase == 0) failures++;
    if (m_win == 0) failures++;
    if (m_winmiss == 0) failures++;
    if (m_rel == 0) failures++;
    if (m_k1 == 0) failures++;
    if (m_k2 == 0) failures++;
    if (m_uri == 0) failures++;
    if (m_ovf == 0) failures++;
    if (m_x4 == 0) failures++;
    if (m_tree == 0) failures++;
    if (m_base == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
