// tb_match_vector: random pattern pulses in random packets. A rule's bit must
// be set once all its patterns have pulsed in the packet (two-pattern rules
// need both), and the kept k must be the smallest one reported so far.
module tb_match_vector;
  localparam int NR = 4;
  localparam logic [NR-1:0] TWO = 4'b0101;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  logic [NR-1:0] hit0 = '0, hit1 = '0, rules_now;
  logic [0:0] apx_valid = '0, kvalid_now;
  logic [1:0] apx_k [1], k_now [1];
  bit s0 [NR], s1 [NR];
  bit mkv; int mk;
  int checks = 0, failures = 0, n_two = 0;

  match_vector #(.N_RULES(NR), .TWO_PAT(TWO), .N_APX(1), .KW(2)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .hit0(hit0), .hit1(hit1),
    .apx_valid(apx_valid), .apx_k(apx_k), .rules_now(rules_now),
    .kvalid_now(kvalid_now), .k_now(k_now));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apx_k[0] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      adv = $urandom % 4 != 0;
      sop = adv && ($urandom % 10 == 0);
      hit0 = NR'($urandom) & NR'($urandom) & NR'($urandom);
      hit1 = NR'($urandom) & NR'($urandom) & NR'($urandom);
      apx_valid[0] = $urandom % 5 == 0;
      apx_k[0] = 2'($urandom % 3);
      if (sop) begin
        foreach (s0[r]) begin s0[r] = 0; s1[r] = 0; end
        mkv = 0; mk = 0;
      end
      foreach (s0[r]) begin s0[r] |= hit0[r]; s1[r] |= hit1[r]; end
      if (apx_valid[0] && (!mkv || int'(apx_k[0]) < mk)) begin mk = int'(apx_k[0]); end
      mkv |= apx_valid[0];
      #1;
      if (adv) begin
        for (int r = 0; r < NR; r++) begin
          automatic bit e = s0[r] && (!TWO[r] || s1[r]);
          checks++;
          if (rules_now[r] !== e) failures++;
          if (TWO[r] && e) n_two++;
        end
        checks++;
        if (kvalid_now[0] !== mkv || (mkv && k_now[0] !== 2'(mk))) failures++;
      end else begin
        // nothing is stored on an idle cycle: undo this cycle's pulses
        foreach (s0[r]) begin s0[r] = s0_prev[r]; s1[r] = s1_prev[r]; end
        mkv = mkv_prev; mk = mk_prev;
      end
      s0_prev = s0; s1_prev = s1; mkv_prev = mkv; mk_prev = mk;
    end
    checks++;
    if (n_two == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit s0_prev [NR], s1_prev [NR];
  bit mkv_prev; int mk_prev;
endmodule
