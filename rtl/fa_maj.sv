// fa_maj -- full adder made of three majority gates and one inverter.
//
// The carry is a single majority gate, cout = M(x, y, c). The sum reuses that
// carry: a second gate forms M(x, y, ~c), and a third gate combines the
// inverted carry, that term and the carry-in:
//   sum = M(~M(x, y, c), M(x, y, ~c), c)
// For c = 0 this is ~(x&y) & (x|y) = x^y; for c = 1 it is ~(x|y) | (x&y),
// the complement, so sum = x ^ y ^ c.
//
// Interface: x, y, c (carry-in) in; sum, cout out. Combinational.
// The gate network and its three-gate-plus-inverter count follow the
// document's full-adder schematic; the complement of c feeding the second
// gate is written as an inverter, which the schematic shows only as a
// primed input label.
module fa_maj (
  input  logic x,
  input  logic y,
  input  logic c,
  output logic sum,
  output logic cout
);
  logic m_carry;   // M(x, y, c): the carry-out
  logic m_low;     // M(x, y, c'): x|y when c = 0, x&y when c = 1

  maj3 u_carry (.a(x), .b(y), .c(c),  .m(m_carry));
  maj3 u_low   (.a(x), .b(y), .c(~c), .m(m_low));
  maj3 u_sum   (.a(~m_carry), .b(m_low), .c(c), .m(sum));

  assign cout = m_carry;
endmodule
