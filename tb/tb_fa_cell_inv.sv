// tb_fa_cell_inv -- exhaustive self-checking test of the inverted-carry
// full-adder cell. The carry enters as its complement and leaves as its
// complement; the expected values come from x + y + ~cin_n.
module tb_fa_cell_inv;
  logic x, y, cin_n, sum, cout_n;
  int checks = 0, failures = 0;

  fa_cell_inv dut (.x(x), .y(y), .cin_n(cin_n), .sum(sum), .cout_n(cout_n));

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
      {x, y, cin_n} = 3'(v);
      #1;
      exp_total = 2'(x) + 2'(y) + 2'(!cin_n);
      checks += 2;
      if (sum !== exp_total[0]) begin
        failures++;
        $display("FAIL sum x=%0b y=%0b cin_n=%0b sum=%0b", x, y, cin_n, sum);
      end
      if (cout_n !== !exp_total[1]) begin
        failures++;
        $display("FAIL cout_n x=%0b y=%0b cin_n=%0b cout_n=%0b", x, y, cin_n, cout_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
