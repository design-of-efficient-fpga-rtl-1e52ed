// tb_approx_k_sweep: approximate matching of one longer pattern at the
// difference bounds k = 0, 1, 2 and 4, side by side on one decoder.
//
// Four approx_matcher instances for the 8-character pattern "overflow" (with
// K = 0, 1, 2, 4) watch the same random text, built from pieces of the pattern
// with random edits. At every character the lowest active output of each
// instance must equal the smallest edit distance of any text piece ending
// there, computed by a dynamic-programming table, or show no output when that
// distance exceeds the instance's K. Every distance 0..4 must occur. The
// state count of an instance is (K+1) x 8 flip-flops, so the four instances
// also show how the circuit grows with k.
module tb_approx_k_sweep;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  localparam string PAT = "overflow";
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  dec_t dec = '0;
  logic [0:0] on0, oq0;
  logic [1:0] on1, oq1;
  logic [2:0] on2, oq2;
  logic [4:0] on4, oq4;
  bytes_t txt;
  int checks = 0, failures = 0;
  int seen [6];

  approx_matcher #(.LEN(8), .PAT("overflow"), .K(0)) u_k0 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .out_next(on0), .out_q(oq0));
  approx_matcher #(.LEN(8), .PAT("overflow"), .K(1)) u_k1 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .out_next(on1), .out_q(oq1));
  approx_matcher #(.LEN(8), .PAT("overflow"), .K(2)) u_k2 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .out_next(on2), .out_q(oq2));
  approx_matcher #(.LEN(8), .PAT("overflow"), .K(4)) u_k4 (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .out_next(on4), .out_q(oq4));

  // lowest set bit of an output vector, or `none` when there is none
  function automatic int low(logic [4:0] v, int n, int none);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return none;
  endfunction

  function automatic void check(int k, int got, int d);
    int e = (d > k) ? k + 1 : d;
    checks++;
    if (got != e) begin
      failures++;
      if (failures < 8) $display("k=%0d: lowest output %0d, expected %0d", k, got, e);
    end
  endfunction

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic byte unsigned noise [4] = '{"x", "o", "f", "w"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      // text: the pattern with random substitutions, insertions and deletions,
      // between random noise characters
      automatic bytes_t t = {};
      automatic int lead = $urandom % 4;
      automatic int edits = $urandom % 7;
      for (int i = 0; i < lead; i++) t.push_back(noise[$urandom % 4]);
      for (int j = 0; j < PAT.len(); j++) begin
        automatic int r = $urandom % 16;
        if (edits > 0 && r == 0) begin edits--; continue; end                                       // delete
        if (edits > 0 && r == 1) begin edits--; t.push_back(noise[$urandom % 4]); continue; end    // substitute
        if (edits > 0 && r == 2) begin edits--; t.push_back(noise[$urandom % 4]); end              // insert
        t.push_back(PAT[j]);
      end
      for (int i = 0; i < $urandom % 4; i++) t.push_back(noise[$urandom % 4]);
      txt = {};
      for (int p = 0; p < t.size(); p++) begin
        int d;
        @(negedge clk);
        txt.push_back(t[p]);
        adv = 1; sop = (p == 0); dec = '0; dec[t[p]] = 1'b1;
        d = approx_at(txt, PAT, p);
        #1;
        check(0, low(5'(on0), 1, 1), d);
        check(1, low(5'(on1), 2, 2), d);
        check(2, low(5'(on2), 3, 3), d);
        check(4, low(on4, 5, 5), d);
        seen[(d > 5) ? 5 : d]++;
      end
      @(negedge clk); adv = 0; sop = 0; dec = '0;
    end
    checks++;
    for (int d = 0; d <= 4; d++) if (seen[d] == 0) failures++;
    $display("distances seen: 0:%0d 1:%0d 2:%0d 3:%0d 4:%0d >4:%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
