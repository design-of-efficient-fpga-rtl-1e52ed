// tb_hids_matcher_top: end-to-end test of the pattern matching processor at
// its built-in sizes (no parameter overrides).
//
// Random packets are assembled from fragments that contain, or nearly
// contain, the example rules' patterns, request lines for the protocol
// analyzer, and noise. Each packet is sent as 32-bit words (last word often
// partial) and the two result words that come back are compared with results
// computed directly from the packet text: plain substring searches, the
// offset/depth and distance/within windows, the smallest edit distance for
// the approximate rule, and the argument rules of the protocol analyzer.
// The result sink applies random back-pressure, so the output stage is
// sometimes busy when a packet ends and the character pipeline must stall.
// The same packets are also fed to the four-characters-per-cycle datapath
// and its per-packet results are checked.
//
// Each mechanism (stall, partial last word, case-insensitive hit, offset/depth
// window hit and window miss, distance/within hit, approximate hits with 1 and
// 2 differences, argument pattern hit, argument overflow, four-wide hit,
// both strings of the shared prefix "ab" in one packet) is
// counted, and one that never happened counts as a failure.
module tb_hids_matcher_top;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0, out_data;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  logic [1:0] in_nbytes = 0;
  logic [31:0] w_in_data = '0;
  logic w_in_valid = 0, w_in_sop = 0, w_in_eop = 0;
  logic [2:0] w_in_nvalid = 0;
  logic [3:0] w_match;
  logic w_match_valid;

  hids_matcher_top dut (.*);

  res_t exp_q [$];
  logic [3:0] wexp_q [$];
  int checks = 0, failures = 0, n_pkts = 0;
  int widx = 0;
  bit steady = 0;
  int cyc = 0, t_first = -1, t_done = -1;
  logic [31:0] w0;
  // mechanism counters
  int m_stall = 0, m_partial = 0, m_nocase = 0, m_win = 0, m_winmiss = 0, m_rel = 0;
  int m_k1 = 0, m_k2 = 0, m_uri = 0, m_ovf = 0, m_x4 = 0, m_tree = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: packets done %0d", n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // result sink
  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_ready && t_first < 0) t_first = cyc;
    if (out_valid && out_ready && out_last) t_done = cyc;
    if (rst_n && dut.stall) m_stall++;
    if (rst_n && out_valid && out_ready) begin
      if (widx == 0) begin
        w0 = out_data;
        checks++;
        if (out_last) failures++;
        widx = 1;
      end else begin
        checks += 2;
        if (!out_last) failures++;
        if (exp_q.size() == 0 || {out_data, w0} !== exp_q[0]) begin
          failures++;
          if (failures < 6) $display("pkt %0d: got %h_%h exp %h", n_pkts, out_data, w0,
                                     exp_q.size() != 0 ? exp_q[0] : 64'h0);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
        n_pkts++;
        widx = 0;
      end
    end
    if (rst_n && w_match_valid) begin
      checks++;
      if (wexp_q.size() == 0 || w_match !== wexp_q[0]) failures++;
      if (wexp_q.size() != 0) void'(wexp_q.pop_front());
    end
  end

  task automatic send(bytes_t t, bit gaps = 1);
    automatic int nwords = (t.size() + 3) / 4;
    for (int w = 0; w < nwords; w++) begin
      logic [31:0] d = '0;
      int nb = (t.size() - 4*w > 4) ? 4 : t.size() - 4*w;
      for (int l = 0; l < nb; l++) d[31 - 8*l -: 8] = t[4*w + l];
      if (gaps && $urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_data = d; in_last = (w == nwords - 1); in_nbytes = 2'(nb % 4);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  task automatic send_x4(bytes_t t);
    automatic int nwords = (t.size() + 3) / 4;
    for (int w = 0; w < nwords; w++) begin
      @(negedge clk);
      w_in_valid = 1; w_in_sop = (w == 0); w_in_eop = (w == nwords - 1);
      w_in_nvalid = 3'((t.size() - 4*w > 4) ? 4 : t.size() - 4*w);
      w_in_data = '0;
      for (int l = 0; l < 4; l++) if (4*w + l < t.size()) w_in_data[31 - 8*l -: 8] = t[4*w + l];
    end
    @(negedge clk); w_in_valid = 0; w_in_sop = 0; w_in_eop = 0;
  endtask

  initial begin
    automatic string frags [] = '{"abc", "cd", "e", "STAT ", "Stat ", "stat", "snort", "xxsnort", "USER",
                        "root", "USER root", "USERroot", "USER  xx root", "abcd", "abxd",
                        "abd", "axcd", "GET ", "POST  ", "HEAD\t", "/bin/sh", "/aaaaaaaaaaaaaaaaaa",
                        " ", "x", "zz", "q", "GET /bin/sh HTTP", "GET /index.html HTTP"};
    automatic int n_packets = 600;
    automatic int lat_len [2] = '{64, 1500};
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      forever begin
        @(negedge clk);
        out_ready = steady || ($urandom % 8 < 3);
      end
    join_none
    for (int pkt = 0; pkt < n_packets; pkt++) begin
      automatic string s = "";
      automatic int nf = 1 + $urandom % 5;
      automatic bytes_t t;
      automatic res_t r;
      if (pkt % 5 == 0) s = "xx";
      for (int f = 0; f < nf; f++) s = {s, frags[$urandom % frags.size()]};
      if (pkt % 7 == 0) s = "a";          // very short packets stress the output stage
      t = to_bytes(s);
      r = hids_expected(t);
      exp_q.push_back(r);
      wexp_q.push_back({contains(t, "root"), contains(t, "stat ", 1), contains(t, "abc"), contains(t, "snort")});
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
      fork
        send(t);
        send_x4(t);
      join
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    // Latency of one packet of n characters sent without gaps, result sink
    // always ready, from the clock its first word is accepted to the clock its
    // last result word is taken: one clock in the input buffer, one in the
    // decoder stage, n character clocks, then the two result words.
    steady = 1;
    repeat (3) @(posedge clk);
    foreach (lat_len[i]) begin
      automatic string s = "";
      automatic bytes_t t;
      for (int c = 0; c < lat_len[i]; c++) s = {s, "x"};
      t = to_bytes(s);
      exp_q.push_back(hids_expected(t));
      wexp_q.push_back(4'b0000);
      t_first = -1;
      fork
        send(t, 0);
        send_x4(t);
      join
      while (exp_q.size() != 0) @(posedge clk);
      repeat (3) @(posedge clk);
      checks++;
      $display("latency of a %0d-byte packet: %0d clocks", lat_len[i], t_done - t_first + 1);
      if (t_done - t_first + 1 != lat_len[i] + 4) failures++;
    end
    checks += 2;
    if (n_pkts != n_packets + 2) failures++;
    if (wexp_q.size() != 0) failures++;
    $display("packets=%0d stall_cycles=%0d partial=%0d nocase=%0d window=%0d window_miss=%0d",
             n_pkts, m_stall, m_partial, m_nocase, m_win, m_winmiss);
    $display("distance_within=%0d k1=%0d k2=%0d uri=%0d overflow=%0d x4=%0d shared_prefix=%0d",
             m_rel, m_k1, m_k2, m_uri, m_ovf, m_x4, m_tree);
    checks += 12;
    if (m_stall == 0) failures++;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
