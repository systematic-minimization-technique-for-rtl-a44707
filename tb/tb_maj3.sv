// tb_maj3 -- exhaustive self-checking test of the majority gate.
// All eight input combinations are applied; the expected output is the
// number of ones among the inputs compared with two.
module tb_maj3;
  logic a, b, c, m;
  int checks = 0, failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .m(m));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (m !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b m=%0b", a, b, c, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
