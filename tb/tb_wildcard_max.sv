// tb_wildcard_max: random start pulses inside random packets; the output must
// be high iff a pulse came 0..N characters earlier in the same packet.
module tb_wildcard_max;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0, x = 0, y;
  bit xs [$];
  int checks = 0, failures = 0;

  wildcard_max #(.N(2)) dut (.clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(x), .y(y));

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
    for (int pkt = 0; pkt < 400; pkt++) begin
      automatic int len = 1 + $urandom % 20;
      xs = {};
      for (int p = 0; p < len; p++) begin
        automatic bit e = 0;
        while ($urandom % 4 == 0) begin
          @(negedge clk); adv = 0; sop = 0; x = 1'($urandom);
        end
        @(negedge clk);
        adv = 1; sop = (p == 0); x = ($urandom % 6 == 0);
        xs.push_back(x);
        for (int q = p - 2; q <= p; q++) if (q >= 0) e |= xs[q];
        #1;
        checks++;
        if (y !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
