// tb_wildcard_min: random start pulses inside random packets. With HOLD the
// output must be high iff a pulse came at least N characters earlier in the
// packet; without HOLD iff a pulse came exactly N characters earlier.
module tb_wildcard_min;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0, x = 0, y_h, y_e;
  bit xs [$];
  int checks = 0, failures = 0;

  wildcard_min #(.N(3), .HOLD(1'b1)) u_h (.clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(x), .y(y_h));
  wildcard_min #(.N(2), .HOLD(1'b0)) u_e (.clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .x(x), .y(y_e));

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
        automatic bit eh = 0, ee;
        while ($urandom % 4 == 0) begin
          @(negedge clk); adv = 0; sop = 0; x = 1'($urandom);
        end
        @(negedge clk);
        adv = 1; sop = (p == 0); x = ($urandom % 6 == 0);
        xs.push_back(x);
        for (int q = 0; q <= p - 3; q++) eh |= xs[q];
        ee = (p >= 2) ? xs[p-2] : 0;
        #1;
        checks += 2;
        if (y_h !== eh) failures++;
        if (y_e !== ee) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
