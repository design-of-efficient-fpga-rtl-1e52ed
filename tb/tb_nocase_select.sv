// tb_nocase_select: drives every one-hot decoder pattern and checks that a
// case-sensitive selector fires only for its code, a case-insensitive one for
// both cases of a letter, and a case-insensitive non-letter only for itself.
module tb_nocase_select;
  import hids_pkg::*;
  dec_t dec;
  logic m_cs, m_ci, m_dig;
  int checks = 0, failures = 0;

  nocase_select #(.CH("a"), .NOCASE(1'b0)) u_cs  (.dec(dec), .m(m_cs));
  nocase_select #(.CH("S"), .NOCASE(1'b1)) u_ci  (.dec(dec), .m(m_ci));
  nocase_select #(.CH("5"), .NOCASE(1'b1)) u_dig (.dec(dec), .m(m_dig));

  task automatic chk(logic got, logic exp, int c);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("mismatch code=%02h got=%0d exp=%0d", c, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      dec = '0;
      dec[c] = 1'b1;
      #1;
      chk(m_cs, c == "a", c);
      chk(m_ci, c == "s" || c == "S", c);
      chk(m_dig, c == "5", c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
