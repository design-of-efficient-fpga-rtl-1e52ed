// tb_parallel_string_nfa: four characters per cycle. Random packets over the
// letters of "snort" (with planted copies at every lane offset) are fed as
// decoded words; the matcher must signal in exactly those words in which an
// occurrence of the pattern ends, whatever lane it starts in.
module tb_parallel_string_nfa;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0, hit;
  dec_t dec [4];
  bytes_t txt;
  int checks = 0, failures = 0, n_hit = 0;
  int lane_seen [4];

  parallel_string_nfa #(.W(4), .LEN(5), .PAT("snort")) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en_in(1'b1), .dec(dec), .hit(hit));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic byte unsigned alpha [6] = '{"s", "n", "o", "r", "t", "x"};
    foreach (dec[i]) dec[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 400; pkt++) begin
      automatic int len = 1 + $urandom % 30;
      automatic int nwords = (len + 3) / 4;
      txt = {};
      for (int i = 0; i < len; i++) txt.push_back(alpha[$urandom % 6]);
      if (len >= 5 && $urandom % 2 != 0) begin
        automatic int s = $urandom % (len - 4);
        automatic string pat = "snort";
        for (int j = 0; j < 5; j++) txt[s+j] = pat[j];
      end
      for (int w = 0; w < nwords; w++) begin
        automatic bit e = 0;
        while ($urandom % 5 == 0) begin
          @(negedge clk); adv = 0; sop = 0; foreach (dec[i]) dec[i] = '0;
        end
        @(negedge clk);
        adv = 1; sop = (w == 0);
        for (int l = 0; l < 4; l++) begin
          dec[l] = '0;
          if (4*w + l < len) dec[l][txt[4*w+l]] = 1'b1;
          if (4*w + l < len && ends_at(txt, "snort", 4*w + l)) begin
            e = 1;
            lane_seen[(4*w + l - 4) % 4]++;
          end
        end
        #1;
        checks++;
        if (hit !== e) failures++;
        n_hit += e;
      end
    end
    checks++;
    if (lane_seen[0] == 0 || lane_seen[1] == 0 || lane_seen[2] == 0 || lane_seen[3] == 0) failures++;
    $display("hits=%0d start lanes %0d %0d %0d %0d", n_hit, lane_seen[0], lane_seen[1], lane_seen[2], lane_seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
