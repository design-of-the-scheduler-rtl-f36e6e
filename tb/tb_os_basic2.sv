// tb_os_basic2 -- exhaustive check of the basic 2x2 output selector.
// All eight input combinations are applied and compared with the rule
// "enable and the first requested output wins; C = any request".
module tb_os_basic2;
  logic e, d1, d2, q1, q2, c;
  int checks = 0, failures = 0;

  os_basic2 dut (.e, .d1, .d2, .q1, .q2, .c);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic eq1, eq2, ec;
      {e, d1, d2} = 3'(v);
      #1;
      ec  = d1 || d2;
      eq1 = e && d1;
      eq2 = e && !d1 && d2;
      checks++;
      if ({q1, q2, c} !== {eq1, eq2, ec}) begin
        failures++;
        $display("FAIL e=%b d1=%b d2=%b: q1=%b q2=%b c=%b", e, d1, d2, q1, q2, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
