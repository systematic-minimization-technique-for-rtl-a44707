// tb_maj_top -- end-to-end test of the whole design at its default size.
//
// The top is instantiated with no parameter overrides (8-bit adder). Every
// circuit is driven through its full input space, in parallel, and each
// output is compared with a reference computed here from integer addition
// or the sum-of-products form of the function:
//   - adder: all 2^17 combinations of x, y and carry-in;
//   - full adder: its 8 input combinations, cycled alongside;
//   - function blocks: their 8 and 16 input combinations, cycled alongside.
// It counts the adder's mechanisms: carry-in applied through the input
// inverter, a carry rippling through every bit, and a carry-out leaving
// through the output inverter; and, for each single-output function, that
// both values were seen. A mechanism that never happened is a failure.
module tb_maj_top;
  localparam int unsigned N = 8;

  logic [N-1:0] rca_x, rca_y, rca_sum;
  logic         rca_cin, rca_cout;
  logic         fa_x, fa_y, fa_c, fa_sum, fa_cout;
  logic [2:0]   t1_in;
  logic [5:0]   t1_f;
  logic [3:0]   jm_in;
  logic         jm_f3, jm_f4;

  int checks = 0, failures = 0;
  int n_cin = 0, n_full_ripple = 0, n_cout = 0;
  int n_t1_one [6];
  int n_t1_zero[6];
  int n_f4_one = 0, n_f4_zero = 0;

  maj_top dut (
    .rca_x(rca_x), .rca_y(rca_y), .rca_cin(rca_cin), .rca_sum(rca_sum), .rca_cout(rca_cout),
    .fa_x(fa_x), .fa_y(fa_y), .fa_c(fa_c), .fa_sum(fa_sum), .fa_cout(fa_cout),
    .t1_in(t1_in), .t1_f(t1_f),
    .jm_in(jm_in), .jm_f3(jm_f3), .jm_f4(jm_f4)
  );

  function automatic logic [5:0] t1_ref(logic a, logic b, logic c);
    return {a & b & c,
            a & b,
            (a & b & c) | (!a & !b & !c),
            (a & b) | (!a & !b & c),
            a,
            (a & b) | (!b & c)};
  endfunction

  task automatic check(string what, logic [N:0] got, logic [N:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0h exp=%0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] exp_rca;
    logic [1:0] exp_fa;
    logic [5:0] exp_t1;
    logic       a3, b3, c3;
    foreach (n_t1_one[i]) begin
      n_t1_one[i] = 0;
      n_t1_zero[i] = 0;
    end

    for (int v = 0; v < (1 << (2 * N + 1)); v++) begin
      {rca_x, rca_y, rca_cin} = (2 * N + 1)'(v);
      {fa_x, fa_y, fa_c} = 3'(v);
      t1_in = 3'(v >> 3);
      jm_in = 4'(v >> 6);
      #1;

      exp_rca = (N + 1)'(rca_x) + (N + 1)'(rca_y) + (N + 1)'(rca_cin);
      check("rca", {rca_cout, rca_sum}, exp_rca);
      if (rca_cin) n_cin++;
      if (rca_cin && (rca_x ^ rca_y) == '1) n_full_ripple++;
      if (rca_cout) n_cout++;

      exp_fa = 2'(fa_x) + 2'(fa_y) + 2'(fa_c);
      check("fa", (N + 1)'({fa_cout, fa_sum}), (N + 1)'(exp_fa));

      exp_t1 = t1_ref(t1_in[2], t1_in[1], t1_in[0]);
      check("t1", (N + 1)'(t1_f), (N + 1)'(exp_t1));
      for (int i = 0; i < 6; i++)
        if (t1_f[i]) n_t1_one[i]++; else n_t1_zero[i]++;

      {a3, b3, c3} = jm_in[3:1];
      check("jm_f3", (N + 1)'(jm_f3), (N + 1)'((!a3 & b3) | (a3 & b3 & !c3)));
      check("jm_f4", (N + 1)'(jm_f4),
            (N + 1)'((&jm_in) | (!jm_in[3] & !jm_in[2] & !jm_in[1])));
      if (jm_f4) n_f4_one++; else n_f4_zero++;
    end

    $display("carry-in applied: %0d, full-length ripples: %0d, carry-outs: %0d",
             n_cin, n_full_ripple, n_cout);
    checks++;
    if (n_cin == 0 || n_full_ripple == 0 || n_cout == 0) begin
      failures++;
      $display("FAIL an adder mechanism never happened");
    end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (n_t1_one[i] == 0 || n_t1_zero[i] == 0) begin
        failures++;
        $display("FAIL function output %0d never took both values", i);
      end
    end
    checks++;
    if (n_f4_one == 0 || n_f4_zero == 0) begin
      failures++;
      $display("FAIL four-variable function never took both values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
