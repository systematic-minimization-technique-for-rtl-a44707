// tb_fa_maj -- exhaustive self-checking test of the majority full adder.
// Each of the eight input combinations is compared with the two-bit
// arithmetic sum x + y + c.
module tb_fa_maj;
  logic x, y, c, sum, cout;
  int checks = 0, failures = 0;

  fa_maj dut (.x(x), .y(y), .c(c), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_total;
    for (int v = 0; v < 8; v++) begin
      {x, y, c} = 3'(v);
      #1;
      exp_total = 2'(x) + 2'(y) + 2'(c);
      checks += 2;
      if (sum !== exp_total[0]) begin
        failures++;
        $display("FAIL sum x=%0b y=%0b c=%0b sum=%0b", x, y, c, sum);
      end
      if (cout !== exp_total[1]) begin
        failures++;
        $display("FAIL cout x=%0b y=%0b c=%0b cout=%0b", x, y, c, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
