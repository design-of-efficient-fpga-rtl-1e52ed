// tb_input_buffer: random packets (1..13 bytes) sent as words with random
// gaps and random downstream back-pressure; every character must come out in
// order with correct start/end flags. A final long packet sent without gaps
// must stream one character per clock cycle.
module tb_input_buffer;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0;
  logic in_valid = 0, in_ready, in_last = 0;
  logic [1:0] in_nbytes = 0;
  logic [7:0] ch;
  logic ch_valid, ch_sop, ch_eop, ch_ready = 0;
  typedef struct { byte unsigned c; bit sop; bit eop; } ev_t;
  ev_t exp_q [$];
  int checks = 0, failures = 0;
  bit fast = 0;
  int fast_chars = 0, fast_first = -1, fast_last = -1, cyc = 0;

  input_buffer dut (
    .clk(clk), .rst_n(rst_n), .in_data(in_data), .in_valid(in_valid), .in_ready(in_ready),
    .in_last(in_last), .in_nbytes(in_nbytes), .ch(ch), .ch_valid(ch_valid),
    .ch_sop(ch_sop), .ch_eop(ch_eop), .ch_ready(ch_ready));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && ch_valid && ch_ready) begin
      checks++;
      if (exp_q.size() == 0 || ch !== exp_q[0].c || ch_sop !== exp_q[0].sop || ch_eop !== exp_q[0].eop)
        failures++;
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      if (fast) begin
        if (fast_first < 0) fast_first = cyc;
        fast_last = cyc;
        fast_chars++;
      end
    end
  end

  task automatic send_packet(int len, bit gaps);
    int nwords = (len + 3) / 4;
    for (int w = 0; w < nwords; w++) begin
      logic [31:0] d = $urandom;
      int nb = (w == nwords - 1) ? len - 4 * w : 4;
      for (int b = 0; b < nb; b++) begin
        ev_t e;
        e.c = d[31 - 8*b -: 8];
        e.sop = (w == 0 && b == 0);
        e.eop = (w == nwords - 1 && b == nb - 1);
        exp_q.push_back(e);
      end
      while (gaps && $urandom % 3 == 0) begin
        @(negedge clk); in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1; in_data = d; in_last = (w == nwords - 1); in_nbytes = 2'(nb % 4);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); ch_ready = fast ? 1'b1 : ($urandom % 4 != 0); end
    join_none
    for (int p = 0; p < 300; p++) send_packet(1 + $urandom % 13, 1);
    repeat (20) @(posedge clk);
    fast = 1;
    send_packet(64, 0);
    repeat (10) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) failures++;
    if (fast_chars != 64 || fast_last - fast_first != 63) begin
      failures++;
      $display("streaming: %0d chars in %0d cycles", fast_chars, fast_last - fast_first + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
