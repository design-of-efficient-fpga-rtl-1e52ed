// tb_prefix_tree_capacity: a generated set of 32 strings (284 pattern
// characters) built as one prefix tree and run against random traffic.
//
// Real signature strings are not available, so the set is generated: strings
// of 4 to 12 characters over the alphabet a-d, chosen by a fixed hash of
// string and position. The small alphabet makes many strings share
// beginnings, so the tree has fewer cells than characters; the number of
// cells built is printed and must be below the character count. Packets of
// random a-d/x text, with whole strings of the set pasted in, are fed one
// character per clock with no idle cycles. At every character all hits must
// equal a direct comparison of the text with each string, and at least half
// of the strings must be found. The sharing is worked out by constant
// functions whose cost grows quickly with the number of strings: Verilator
// elaborates this set in seconds, but a set of 248 strings (2,001
// characters) did not elaborate within 10 minutes.
module tb_prefix_tree_capacity;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 32;
  
  typedef pat_t [N-1:0]          pats_t;
  typedef logic [N-1:0][7:0]     lens_t;

  function automatic int unsigned hsh(int unsigned x);
    x = x * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA77;
    x = x ^ (x >> 13);
    return x;
  endfunction

  function automatic int unsigned gen_len(int unsigned p);
    return 4 + hsh(p) % 9;
  endfunction

  function automatic byte unsigned gen_char(int unsigned p, int unsigned j);
    return 8'("a" + hsh(p * 16 + j + 7777) % 4);
  endfunction

  // string p sits at index N-1-p (the first string is the leftmost entry)
  function automatic pats_t gen_pats();
    pats_t r = '0;
    for (int unsigned p = 0; p < N; p++) begin
      int unsigned l = gen_len(p);
      for (int unsigned j = 0; j < l; j++) r[N-1-p][8*(l-1-j) +: 8] = gen_char(p, j);
    end
    return r;
  endfunction
  function automatic lens_t gen_lens();
    lens_t r = '0;
    for (int unsigned p = 0; p < N; p++) r[N-1-p] = 8'(gen_len(p));
    return r;
  endfunction

  localparam pats_t TPATS = gen_pats();
  localparam lens_t TLENS = gen_lens();

  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  dec_t dec = '0;
  logic [N-1:0] hit;
  bytes_t txt;
  bytes_t strs [N];
  int checks = 0, failures = 0;
  int seen [N];

  prefix_tree_nfa #(.N_PAT(N), .PATS(TPATS), .LENS(TLENS), .NOCASE('0)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .dec(dec), .hit(hit));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // does text t end with string s at position e
  function automatic bit ends_with(bytes_t t, bytes_t s, int e);
    if (e + 1 < s.size()) return 0;
    for (int k = 0; k < s.size(); k++) if (t[e - s.size() + 1 + k] != s[k]) return 0;
    return 1;
  endfunction

  initial begin
    automatic int total = 0, found = 0;
    automatic byte unsigned alpha [5] = '{"a", "b", "c", "d", "x"};
    for (int p = 0; p < N; p++) begin
      strs[p] = {};
      for (int j = 0; j < gen_len(p); j++) strs[p].push_back(gen_char(p, j));
      total += strs[p].size();
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++;
    if (dut.N_CELLS >= total) failures++;
    $display("strings %0d, pattern characters %0d, cells built %0d", N, total, dut.N_CELLS);
    for (int pkt = 0; pkt < 60; pkt++) begin
      automatic bytes_t t = {};
      while (t.size() < 40 + $urandom % 60) begin
        if ($urandom % 4 == 0) t = {t, strs[$urandom % N]};
        else t.push_back(alpha[$urandom % 5]);
      end
      txt = {};
      for (int p = 0; p < t.size(); p++) begin
        @(negedge clk);
        txt.push_back(t[p]);
        adv = 1; sop = (p == 0); dec = '0; dec[t[p]] = 1'b1;
        #1;
        for (int s = 0; s < N; s++) begin
          automatic bit e = ends_with(txt, strs[s], p);
          checks++;
          if (hit[s] !== e) begin
            failures++;
            if (failures < 6) $display("pkt %0d pos %0d string %0d: hit %b", pkt, p, s, hit[s]);
          end
          if (e) seen[s]++;
        end
      end
    end
    @(negedge clk); adv = 0; sop = 0; dec = '0;
    foreach (seen[s]) if (seen[s] != 0) found++;
    checks++;
    if (found < N / 2) failures++;
    $display("strings found at least once: %0d of %0d", found, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
