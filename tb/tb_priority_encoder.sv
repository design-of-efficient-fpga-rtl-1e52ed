// tb_priority_encoder: exhaustive check that the lowest set request wins.
module tb_priority_encoder;
  logic [2:0] req3;  logic v3; logic [1:0] k3;
  logic [4:0] req5;  logic v5; logic [2:0] k5;
  int checks = 0, failures = 0;

  priority_encoder #(.K(2)) u3 (.req(req3), .valid(v3), .k(k3));
  priority_encoder #(.K(4)) u5 (.req(req5), .valid(v5), .k(k5));

  function automatic int lowest(int v);
    for (int i = 0; i < 32; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      req3 = v[2:0]; req5 = v[4:0];
      #1;
      checks += 2;
      if (v3 !== (v[2:0] != 0) || (v[2:0] != 0 && k3 !== 2'(lowest(v[2:0])))) failures++;
      if (v5 !== (v != 0) || (v != 0 && k5 !== 3'(lowest(v)))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
