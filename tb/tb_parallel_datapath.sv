// tb_parallel_datapath: packets streamed as 32-bit words (partial last word
// allowed), one word per cycle or with gaps. For each packet the result bits
// must equal a direct search of the packet for the four patterns ("stat " in
// any letter case), and the result must appear two cycles after the last word.
module tb_parallel_datapath;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0;
  logic in_valid = 0, in_sop = 0, in_eop = 0;
  logic [2:0] in_nvalid = 0;
  logic [3:0] match;
  logic match_valid;
  bytes_t txt;
  logic [3:0] exp_q [$];
  int checks = 0, failures = 0, cyc = 0;
  int eop_q [$];
  int seen [4];

  parallel_datapath dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_valid(in_valid), .in_sop(in_sop),
    .in_eop(in_eop), .in_nvalid(in_nvalid), .match(match), .match_valid(match_valid));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (in_valid && in_eop) eop_q.push_back(cyc);
    if (rst_n && match_valid) begin
      checks += 2;
      if (exp_q.size() == 0 || match !== exp_q[0]) begin failures++; if (failures < 4) $display("got %b exp %b", match, exp_q[0]); end
      if (eop_q.size() == 0 || cyc - eop_q.pop_front() != 2) failures++;
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  initial begin
    automatic string frags [8] = '{"snort", "abc", "STAT ", "sTaT ", "root", "xyz", "ab", "roo"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      automatic string s = "";
      automatic int nf = 1 + $urandom % 5;
      automatic int nwords;
      automatic logic [3:0] e;
      for (int f = 0; f < nf; f++) begin
        s = {s, frags[$urandom % 8]};
        if ($urandom % 2 != 0) s = {s, "-"};
      end
      txt = to_bytes(s);
      e = {contains(txt, "root"), contains(txt, "stat ", 1), contains(txt, "abc"), contains(txt, "snort")};
      foreach (seen[i]) seen[i] += e[i];
      exp_q.push_back(e);
      nwords = (txt.size() + 3) / 4;
      for (int w = 0; w < nwords; w++) begin
        while ($urandom % 4 == 0) begin
          @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0;
        end
        @(negedge clk);
        in_valid = 1; in_sop = (w == 0); in_eop = (w == nwords - 1);
        in_nvalid = 3'((txt.size() - 4*w > 4) ? 4 : txt.size() - 4*w);
        in_data = '0;
        for (int l = 0; l < 4; l++) if (4*w + l < txt.size()) in_data[31 - 8*l -: 8] = txt[4*w + l];
        @(posedge clk);
      end
      @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || seen[0] == 0 || seen[1] == 0 || seen[2] == 0 || seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
