// tb_rca_inv -- exhaustive self-checking test of the ripple-carry adder at
// its default width of 8 bits: all 2^17 combinations of x, y and cin are
// compared with the integer sum. It also counts the cases in which the
// carry ripples through every bit (x ^ y all ones with cin = 1), which must
// occur for the chain of inverted carries to be exercised end to end.
module tb_rca_inv;
  localparam int unsigned N = 8;
  logic [N-1:0] x, y, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, full_ripple = 0;

  rca_inv dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] expected;
    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {x, y, cin} = (2 * N + 1)'(v);
      #1;
      expected = (N + 1)'(x) + (N + 1)'(y) + (N + 1)'(cin);
      checks++;
      if ({cout, sum} !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL x=%0d y=%0d cin=%0b got %0d expected %0d",
                   x, y, cin, {cout, sum}, expected);
      end
      if ((x ^ y) == '1 && cin) full_ripple++;
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no full-length carry ripple was applied");
    end
    $display("full-length ripples: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
