// maj_top -- all majority-logic circuits of the design, side by side.
//
// The circuits do not share signals; each has its own ports:
//   - an N-bit ripple-carry adder of inverted-carry cells (rca_*),
//   - the three-gate majority full adder (fa_*),
//   - six three-input functions in majority-of-majority form (t1_*),
//   - the three- and four-variable worked minimisation results (jm_*).
// Everything is combinational: outputs follow inputs after the gate delays,
// with no clock and no reset.
module maj_top #(
  parameter int unsigned N = 8
) (
  // ripple-carry adder
  input  logic [N-1:0] rca_x,
  input  logic [N-1:0] rca_y,
  input  logic         rca_cin,
  output logic [N-1:0] rca_sum,
  output logic         rca_cout,
  // majority full adder
  input  logic         fa_x,
  input  logic         fa_y,
  input  logic         fa_c,
  output logic         fa_sum,
  output logic         fa_cout,
  // three-input functions
  input  logic [2:0]   t1_in,      // {a, b, c}
  output logic [5:0]   t1_f,       // {ABC, AB, ABC+A'B'C', AB+A'B'C, A, AB+B'C}
  // worked minimisation results
  input  logic [3:0]   jm_in,      // {a, b, c, d}
  output logic         jm_f3,
  output logic         jm_f4
);
  rca_inv #(.N(N)) u_rca (
    .x(rca_x), .y(rca_y), .cin(rca_cin), .sum(rca_sum), .cout(rca_cout)
  );

  fa_maj u_fa (.x(fa_x), .y(fa_y), .c(fa_c), .sum(fa_sum), .cout(fa_cout));

  table1_functions u_t1 (
    .a(t1_in[2]), .b(t1_in[1]), .c(t1_in[0]),
    .f_abc(t1_f[5]), .f_ab(t1_f[4]), .f_abc_nabc(t1_f[3]),
    .f_ab_nanbc(t1_f[2]), .f_a(t1_f[1]), .f_ab_nbc(t1_f[0])
  );

  jmap_examples u_jm (
    .a(jm_in[3]), .b(jm_in[2]), .c(jm_in[1]), .d(jm_in[0]),
    .f_map3(jm_f3), .f_map4(jm_f4)
  );
endmodule
