// tb_brute_force_matcher: self-checking test of the brute-force multi-string matcher
// (full comparison of every string at every character).
//
// Strings {"abc", "abd", "ab", "xyz", "abcde", "Xy"(any case)} are searched in
// packets built from pieces of the strings, with random characters mixed in
// and idle cycles in between. At every character each hit must equal a direct
// comparison of the text ending there with the string, and every string must
// be found at least once. The character goes straight to the character input;
// there is no decoder. Idle cycles carry random characters, which must be
// ignored.
module tb_brute_force_matcher;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  char_t ch = '0;
  logic [N-1:0] hit;
  bytes_t txt;
  int checks = 0, failures = 0;
  int seen [N];
  string pats [N] = '{"abc", "abd", "ab", "xyz", "abcde", "Xy"};

  localparam pat_t [N-1:0]        TPATS = '{"abc", "abd", "ab", "xyz", "abcde", "Xy"};
  localparam logic [N-1:0][7:0]   TLENS = '{3, 3, 2, 3, 5, 2};
  brute_force_matcher #(.N_PAT(N), .PATS(TPATS), .LENS(TLENS), .NOCASE(6'b100000)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .ch(ch), .hit(hit));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic byte unsigned alpha [10] = '{"a", "b", "c", "d", "e", "x", "y", "z", "X", "Y"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 500; pkt++) begin
      automatic string frags [10] = '{"abc", "abd", "ab", "xyz", "abcde", "xY", "XY", "a", "z", "d"};
      automatic string str = "";
      automatic bytes_t t;
      for (int f = 0; f < 1 + $urandom % 4; f++) str = {str, frags[$urandom % 10]};
      t = to_bytes(str);
      txt = {};
      for (int p = 0; p < t.size(); p++) begin
        automatic byte unsigned c = t[p];
        if ($urandom % 8 == 0) c = alpha[$urandom % 10];
        while ($urandom % 6 == 0) begin
          @(negedge clk); adv = 0; sop = 0; ch = alpha[$urandom % 10];
        end
        @(negedge clk);
        txt.push_back(c);
        adv = 1; sop = (p == 0); ch = c;
        #1;
        for (int s = 0; s < N; s++) begin
          automatic bit e = ends_at(txt, pats[s], p, s == 5);
          checks++;
          if (hit[s] !== e) begin
            failures++;
            if (failures < 6) $display("pkt %0d pos %0d string %s: hit %b", pkt, p, pats[s], hit[s]);
          end
          if (e) seen[s]++;
        end
      end
    end
    checks++;
    foreach (seen[s]) if (seen[s] == 0) failures++;
    $display("hits: abc %0d abd %0d ab %0d xyz %0d abcde %0d Xy %0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
