// table1_functions -- six three-input functions realised as majority-of-
// majority networks.
//
// Every output is built only from maj3 gates, inverters and the constants 0
// and 1. A gate with a 0 input acts as AND, with a 1 input as OR, so a
// sum of products maps onto nested majorities:
//   f_abc        = ABC            = M(M(A,B,0), C, 0)
//   f_ab         = AB             = M(A,B,0)
//   f_abc_nabc   = ABC + A'B'C'   = M(M(M(A,B,0),C,0), M(M(A',B',0),C',0), 1)
//   f_ab_nanbc   = AB + A'B'C     = M(M(A,B,0), M(M(A',B',0),C,0), 1)
//   f_a          = A              = M(A,A,1)
//   f_ab_nbc     = AB + B'C       = M(M(A,B,0), M(B',C,0), 1)
// f_abc_nabc is also the two-map example of the extended (XJ) procedure:
// each map is one AND term and a top-level M(., ., 1) ORs them.
// M(A,A,1) is A itself, so after synthesis f_a is a wire from input a; it
// is kept as a gate because that is the majority form being illustrated.
//
// Interface: a, b, c in; one output per function. Combinational.
// The six functions and the nested forms of the first five follow the
// document's comparison table; for AB + A'B'C and AB + B'C this design uses
// the OR-of-AND majority form, which the same table lists for the reference
// method.
module table1_functions (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f_abc,
  output logic f_ab,
  output logic f_abc_nabc,
  output logic f_ab_nanbc,
  output logic f_a,
  output logic f_ab_nbc
);
  logic ab, nanb, abc, nanbnc, nanbc, nbc;

  // shared AND terms
  maj3 u_ab     (.a(a),    .b(b),  .c(1'b0), .m(ab));
  maj3 u_nanb   (.a(~a),   .b(~b), .c(1'b0), .m(nanb));
  maj3 u_abc    (.a(ab),   .b(c),  .c(1'b0), .m(abc));
  maj3 u_nanbnc (.a(nanb), .b(~c), .c(1'b0), .m(nanbnc));
  maj3 u_nanbc  (.a(nanb), .b(c),  .c(1'b0), .m(nanbc));
  maj3 u_nbc    (.a(~b),   .b(c),  .c(1'b0), .m(nbc));

  // outputs
  assign f_abc = abc;
  assign f_ab  = ab;
  maj3 u_f3 (.a(abc), .b(nanbnc), .c(1'b1), .m(f_abc_nabc));
  maj3 u_f4 (.a(ab),  .b(nanbc),  .c(1'b1), .m(f_ab_nanbc));
  maj3 u_f5 (.a(a),   .b(a),      .c(1'b1), .m(f_a));
  maj3 u_f6 (.a(ab),  .b(nbc),    .c(1'b1), .m(f_ab_nbc));
endmodule
