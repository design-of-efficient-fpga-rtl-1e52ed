// tb_content_matcher: position options of a content pattern. Random packets
// over {a,b,c}; for pattern "ab" starting at index s and ending at p:
//   u_win  offset 2, depth 5  -> hit iff 2 <= s <= 2 + (5 - 2)
//   u_off  offset 2           -> hit iff s >= 2
//   u_rel  after a pulse at q, distance 1, within 4 -> hit iff some pulse q
//          has 1 <= s - (q + 1) <= 1 + (4 - 2)
module tb_content_matcher;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0, xp = 0;
  dec_t dec = '0;
  logic h_win, h_off, h_rel;
  bytes_t txt;
  bit xs [$];
  int checks = 0, failures = 0, n_win = 0, n_rel = 0, n_miss = 0;

  content_matcher #(.LEN(2), .PAT("ab"), .MIN_GAP(2), .HAS_MAX(1'b1), .MAX_GAP(3)) u_win (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(sop), .dec(dec), .hit(h_win));
  content_matcher #(.LEN(2), .PAT("ab"), .MIN_GAP(2)) u_off (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(sop), .dec(dec), .hit(h_off));
  content_matcher #(.LEN(2), .PAT("ab"), .MIN_GAP(1), .HAS_MAX(1'b1), .MAX_GAP(2), .AFTER_HIT(1'b1)) u_rel (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(xp), .dec(dec), .hit(h_rel));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic byte unsigned alpha [3] = '{"a", "b", "c"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 500; pkt++) begin
      automatic int len = 1 + $urandom % 16;
      txt = {}; xs = {};
      for (int p = 0; p < len; p++) begin
        automatic byte unsigned c = alpha[$urandom % 3];
        bit m, e_win, e_off, e_rel;
        automatic int s = p - 1;
        while ($urandom % 5 == 0) begin
          @(negedge clk); adv = 0; sop = 0; xp = 1'($urandom); dec = '0;
        end
        @(negedge clk);
        txt.push_back(c);
        xp = ($urandom % 8 == 0);
        xs.push_back(xp);
        adv = 1; sop = (p == 0); dec = '0; dec[c] = 1'b1;
        m = ends_at(txt, "ab", p);
        e_win = m && s >= 2 && s <= 5;
        e_off = m && s >= 2;
        e_rel = 0;
        for (int q = 0; q < p; q++) if (xs[q] && (s - q - 1) >= 1 && (s - q - 1) <= 3) e_rel = m;
        #1;
        checks += 3;
        if (h_win !== e_win) failures++;
        if (h_off !== e_off) failures++;
        if (h_rel !== e_rel) failures++;
        n_win += e_win; n_rel += e_rel; n_miss += (m && !e_win);
      end
    end
    checks++;
    if (n_win == 0 || n_rel == 0 || n_miss == 0) failures++;
    $display("windows hit=%0d rel=%0d outside=%0d", n_win, n_rel, n_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
