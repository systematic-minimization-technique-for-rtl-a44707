// tb_table1_functions -- exhaustive self-checking test of the six
// majority-of-majority functions against their sum-of-products forms.
module tb_table1_functions;
  logic a, b, c;
  logic f_abc, f_ab, f_abc_nabc, f_ab_nanbc, f_a, f_ab_nbc;
  int checks = 0, failures = 0;

  table1_functions dut (
    .a(a), .b(b), .c(c),
    .f_abc(f_abc), .f_ab(f_ab), .f_abc_nabc(f_abc_nabc),
    .f_ab_nanbc(f_ab_nanbc), .f_a(f_a), .f_ab_nbc(f_ab_nbc)
  );

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b got=%0b exp=%0b", name, a, b, c, got, exp);
    end
  endtask

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
      check("ABC",        f_abc,      a & b & c);
      check("AB",         f_ab,       a & b);
      check("ABC+A'B'C'", f_abc_nabc, (a & b & c) | (!a & !b & !c));
      check("AB+A'B'C",   f_ab_nanbc, (a & b) | (!a & !b & c));
      check("A",          f_a,        a);
      check("AB+B'C",     f_ab_nbc,   (a & b) | (!b & c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
