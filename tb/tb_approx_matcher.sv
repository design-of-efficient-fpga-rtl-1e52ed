// tb_approx_matcher: "abcd" with up to K = 2 differences against an
// edit-distance table computed from the text. At every character the lowest
// active output must equal the smallest edit distance of any text piece
// ending there (no output when it exceeds K); the registered outputs must
// repeat the previous character's values.
module tb_approx_matcher;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  dec_t dec = '0;
  logic [2:0] on, oq, prev_on;
  bytes_t txt;
  int checks = 0, failures = 0;
  int seen [4];

  approx_matcher #(.LEN(4), .PAT("abcd"), .K(2)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec),
    .out_next(on), .out_q(oq));

  function automatic int low(logic [2:0] v);
    for (int i = 0; i < 3; i++) if (v[i]) return i;
    return 3;
  endfunction

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic byte unsigned alpha [5] = '{"a", "b", "c", "d", "x"};
    automatic byte unsigned pat4 [4] = '{"a", "b", "c", "d"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_on = '0;
    for (int pkt = 0; pkt < 400; pkt++) begin
      automatic int len = 1 + $urandom % 14;
      txt = {};
      for (int p = 0; p < len; p++) begin
        automatic byte unsigned c = ($urandom % 2 != 0) ? alpha[$urandom % 5] : pat4[p % 4];
        int d;
        while ($urandom % 5 == 0) begin
          @(negedge clk); adv = 0; sop = 0; dec = '0;
          #1;
          checks++;
          if (oq !== prev_on) failures++;
        end
        @(negedge clk);
        txt.push_back(c);
        adv = 1; sop = (p == 0); dec = '0; dec[c] = 1'b1;
        d = approx_at(txt, "abcd", p);
        if (d > 2) d = 3;
        #1;
        checks++;
        if (low(on) !== d) begin
          failures++;
          if (failures < 6) $display("p=%0d d=%0d out=%b", p, d, on);
        end
        if (p > 0) begin
          checks++;
          if (oq !== prev_on) failures++;
        end
        seen[d]++;
        prev_on = on;
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("distances seen: 0:%0d 1:%0d 2:%0d >2:%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
