// tb_jmap_examples -- exhaustive self-checking test of the two worked
// minimisation results. The three-variable result is compared with its
// minterm list (2, 3 and 6 of {a,b,c}); the four-variable result with
// ABCD + A'B'C'.
module tb_jmap_examples;
  logic a, b, c, d, f_map3, f_map4;
  int checks = 0, failures = 0;

  jmap_examples dut (.a(a), .b(b), .c(c), .d(d), .f_map3(f_map3), .f_map4(f_map4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam logic [7:0] MAP3_ONES = 8'b0100_1100;  // minterms 6, 3, 2
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      checks += 2;
      if (f_map3 !== MAP3_ONES[{a, b, c}]) begin
        failures++;
        $display("FAIL f_map3 abc=%0b%0b%0b got=%0b", a, b, c, f_map3);
      end
      if (f_map4 !== ((a & b & c & d) | (!a & !b & !c))) begin
        failures++;
        $display("FAIL f_map4 abcd=%0b%0b%0b%0b got=%0b", a, b, c, d, f_map4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
