// jmap_examples -- the two worked minimisation results as gate networks.
//
// f_map3 is the three-variable majority-of-majority result
//   f_map3 = M(M(a',b,c), M(a',b,c'), M(0,b,c'))
// built exactly as written: three first-level gates and one output gate.
// Worked out, it equals a'b + abc' (ones at minterms 2, 3 and 6).
//
// f_map4 is the four-variable extended-map result for ABCD + A'B'C'.
// The map splits into two maps, one per product term; each becomes
// AND gates (majority with a 0 input) and the two are ORed by a majority
// with a 1 input:
//   f_map4 = M( M(C', M(A',B',0), 0), M(M(A,B,0), M(C,D,0), 0), 1 )
//
// Interface: a, b, c, d in; f_map3 (uses a, b, c) and f_map4 out.
// Combinational.
// The expressions follow the document's worked examples; where the printed
// four-variable result is ambiguous this design reads its inner terms as
// the 2-input ANDs the map's covers show.
module jmap_examples (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic f_map3,
  output logic f_map4
);
  // three-variable example
  logic m1, m2, m3;
  maj3 u_m1  (.a(~a),  .b(b), .c(c),    .m(m1));
  maj3 u_m2  (.a(~a),  .b(b), .c(~c),   .m(m2));
  maj3 u_m3  (.a(1'b0), .b(b), .c(~c),  .m(m3));
  maj3 u_f3  (.a(m1),  .b(m2), .c(m3),  .m(f_map3));

  // four-variable example: ABCD + A'B'C'
  logic nanb, nanbnc, ab, cd, abcd;
  maj3 u_nanb   (.a(~a),  .b(~b),   .c(1'b0), .m(nanb));
  maj3 u_nanbnc (.a(~c),  .b(nanb), .c(1'b0), .m(nanbnc));
  maj3 u_ab     (.a(a),   .b(b),    .c(1'b0), .m(ab));
  maj3 u_cd     (.a(c),   .b(d),    .c(1'b0), .m(cd));
  maj3 u_abcd   (.a(ab),  .b(cd),   .c(1'b0), .m(abcd));
  maj3 u_f4     (.a(nanbnc), .b(abcd), .c(1'b1), .m(f_map4));
endmodule
