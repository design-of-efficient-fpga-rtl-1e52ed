// tb_char_match_unit: random stimulus against a model of one NFA stage: the
// output is the previous step's input ANDed with the current match line, the
// state only moves on `adv` and is ignored on `clr`.
module tb_char_match_unit;
  logic clk = 0, rst_n = 0, adv, clr, d, m, q;
  logic model_s;
  int checks = 0, failures = 0;

  char_match_unit dut (.clk(clk), .rst_n(rst_n), .adv(adv), .clr(clr), .d(d), .m(m), .q(q));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adv = 0; clr = 0; d = 0; m = 0; model_s = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      adv = $urandom % 3 != 0;
      clr = $urandom % 7 == 0;
      d = 1'($urandom % 2);
      m = 1'($urandom % 2);
      #1;
      checks++;
      if (q !== (model_s & ~clr & m)) failures++;
      @(posedge clk);
      if (adv) model_s = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
