// tb_output_encoder: loads random 70-bit result vectors and checks that they
// come out as three 32-bit words, low bits first, with `out_last` on the
// third, under random back-pressure, and that `busy` covers the transfer.
module tb_output_encoder;
  localparam int NB = 70;
  logic clk = 0, rst_n = 0, load = 0, busy, out_valid, out_ready = 0, out_last;
  logic [NB-1:0] data = '0;
  logic [31:0] out_data;
  logic [95:0] exp_q [$];
  int checks = 0, failures = 0, widx = 0;

  output_encoder #(.N_BITS(NB)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .data(data), .busy(busy),
    .out_data(out_data), .out_valid(out_valid), .out_ready(out_ready), .out_last(out_last));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_data !== exp_q[0][32*widx +: 32] || out_last !== (widx == 2)) failures++;
    if (widx == 2) begin widx = 0; void'(exp_q.pop_front()); end
    else widx++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      out_ready = $urandom % 3 != 0;
      load = 0;
      if (!busy && ($urandom % 2 != 0)) begin
        load = 1;
        data = NB'({$urandom, $urandom, $urandom});
        exp_q.push_back(96'(data));
      end
    end
    @(negedge clk); load = 0; out_ready = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || busy) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
