// tb_char_decoder: checks that the shared decoder raises exactly the line of
// the loaded character one cycle later, all lines low for an empty slot, and
// holds its output while not enabled.
module tb_char_decoder;
  import hids_pkg::*;
  logic clk = 0, rst_n = 0, en, valid;
  char_t ch;
  dec_t dec, exp_dec;
  int checks = 0, failures = 0;

  char_decoder dut (.clk(clk), .rst_n(rst_n), .en(en), .valid(valid), .ch(ch), .dec(dec));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; valid = 0; ch = 0; exp_dec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      valid = ($urandom % 5) != 0;
      ch = (i < 256) ? char_t'(i) : char_t'($urandom);
      if (en) begin
        exp_dec = '0;
        if (valid) exp_dec[ch] = 1'b1;
      end
      @(posedge clk); #1;
      checks++;
      if (dec !== exp_dec) begin
        failures++;
        if (failures < 5) $display("mismatch ch=%02h en=%0d valid=%0d", ch, en, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
