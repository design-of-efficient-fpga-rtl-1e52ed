// tb_string_nfa: random packets over a small alphabet, with idle cycles.
// A case-sensitive "snort" matcher and a case-insensitive "aBa" matcher (which
// has overlapping occurrences) must signal exactly where the text, compared
// directly, ends with the pattern inside the current packet.
module tb_string_nfa;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  dec_t dec = '0;
  logic hit_s, hit_a;
  bytes_t txt;
  int checks = 0, failures = 0, n_s = 0, n_a = 0;
  byte unsigned alpha [] = '{"s", "n", "o", "r", "t", "a", "A", "b", "B"};

  string_nfa #(.LEN(5), .PAT("snort")) u_s (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .hit(hit_s));
  string_nfa #(.LEN(3), .PAT("aBa"), .NOCASE(1'b1)) u_a (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .hit(hit_a));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      automatic int len = 1 + $urandom % 40;
      txt = {};
      for (int i = 0; i < len; i++) begin
        byte unsigned c;
        while ($urandom % 4 == 0) begin
          @(negedge clk); adv = 0; sop = 0; dec = dec_t'({$urandom, $urandom});
        end
        @(negedge clk);
        c = (i % 13 == 3) ? "s" : alpha[$urandom % alpha.size()];
        // plant whole patterns now and then
        if ($urandom % 30 == 0 && i + 5 <= len) c = "s";
        txt.push_back(c);
        adv = 1; sop = (i == 0); dec = '0; dec[c] = 1'b1;
        #1;
        checks += 2;
        if (hit_s !== ends_at(txt, "snort", i)) failures++;
        if (hit_a !== ends_at(txt, "aba", i, 1)) failures++;
        n_s += hit_s; n_a += hit_a;
      end
    end
    // planted "snort" occurrences
    for (int rep = 0; rep < 20; rep++) begin
      automatic string p = (rep % 2 != 0) ? "xsnortsnort" : "snort";
      txt = {};
      for (int i = 0; i < p.len(); i++) begin
        @(negedge clk);
        txt.push_back(p[i]);
        adv = 1; sop = (i == 0); dec = '0; dec[p[i]] = 1'b1;
        #1;
        checks++;
        if (hit_s !== ends_at(txt, "snort", i)) failures++;
        n_s += hit_s;
      end
    end
    checks += 2;
    if (n_s < 20) failures++;
    if (n_a == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
