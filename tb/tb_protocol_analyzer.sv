// tb_protocol_analyzer: request lines built from methods, whitespace,
// arguments (some containing "/bin/sh", some long) and noise. The expected
// argument window, argument pattern hits and overflow flags are derived from
// the text: a character is in an argument when it is not whitespace, the
// whitespace run before its word directly follows a method name, and no
// method name ends earlier inside the word.
module tb_protocol_analyzer;
  import hids_pkg::*;
  import tb_ref_pkg::*;
  localparam int MAXA = 8;
  logic clk = 0, rst_n = 0, adv = 0, sop = 0;
  char_t ch = 0;
  dec_t dec = '0;
  logic cmd_hit, en_args, overflow;
  logic [0:0] arg_hit;
  bytes_t txt;
  int checks = 0, failures = 0, n_en = 0, n_arg = 0, n_ovf = 0;

  protocol_analyzer #(.MAX_ARG(MAXA)) dut (
    .clk(clk), .rst_n(rst_n), .adv(adv), .sop(sop), .ch(ch), .dec(dec),
    .cmd_hit(cmd_hit), .en_args(en_args), .arg_hit(arg_hit), .overflow(overflow));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic string words [8] = '{"GET", "POST", "HEAD", "/bin/sh", "/index.html", "/aaaaaaaaaaaaaa", "x", "GETX"};
    automatic string seps [3] = '{" ", "  ", "\t"};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 300; pkt++) begin
      automatic string s = "";
      automatic int nw = 1 + $urandom % 6;
      for (int w = 0; w < nw; w++) begin
        s = {s, words[$urandom % 8]};
        if (w < nw - 1 || $urandom % 2 != 0) s = {s, seps[$urandom % 3]};
      end
      txt = {};
      for (int p = 0; p < s.len(); p++) begin
        automatic bit e_en, e_arg, e_ovf;
        while ($urandom % 6 == 0) begin
          @(negedge clk); adv = 0; sop = 0; dec = '0;
        end
        @(negedge clk);
        txt.push_back(s[p]);
        adv = 1; sop = (p == 0); ch = s[p]; dec = '0; dec[ch] = 1'b1;
        e_en  = exp_en(txt, p);
        e_arg = e_en && ends_at(txt, "/bin/sh", p) && exp_en(txt, p - 6);
        e_ovf = e_en && arg_len(txt, p) > MAXA;
        #1;
        checks += 4;
        if (en_args !== e_en) begin
          failures++;
          if (failures < 5) $display("en mismatch pkt=%0d p=%0d '%s'", pkt, p, s);
        end
        if (arg_hit[0] !== e_arg) failures++;
        if (overflow !== e_ovf) failures++;
        if (cmd_hit !== method_end(txt, p)) failures++;
        n_en += e_en; n_arg += e_arg; n_ovf += e_ovf;
      end
    end
    checks++;
    if (n_en == 0 || n_arg == 0 || n_ovf == 0) failures++;
    $display("arg chars=%0d uri hits=%0d overflow chars=%0d", n_en, n_arg, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
