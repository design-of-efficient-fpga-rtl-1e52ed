// tb_char_counter: random enable runs; overflow must be high exactly for the
// characters of a run beyond the MAX_ARG-th one.
module tb_char_counter;
  localparam int MAXA = 5;
  logic clk = 0, rst_n = 0, adv, sop, en, overflow;
  int run;
  int checks = 0, failures = 0;

  char_counter #(.MAX_ARG(MAXA)) dut (.clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .en(en), .overflow(overflow));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int seen_ovf = 0;
    adv = 0; sop = 0; en = 0; run = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      adv = $urandom % 5 != 0;
      sop = $urandom % 23 == 0;
      en  = $urandom % 12 != 0;
      #1;
      if (adv) begin
        automatic int r = en ? (sop ? 1 : run + 1) : 0;
        checks++;
        if (overflow !== (r > MAXA)) failures++;
        if (overflow) seen_ovf++;
        run = r;
      end
    end
    checks++;
    if (seen_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
