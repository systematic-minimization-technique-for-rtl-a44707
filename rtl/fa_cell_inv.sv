// fa_cell_inv -- full-adder cell that passes its carry in inverted form.
//
// The cell takes the complement of its carry-in, cin_n, and returns the
// complement of its carry-out, cout_n. Because majority is self-dual,
//   cout_n = ~M(x, y, cin) = M(~x, ~y, cin_n)
// so the inverted carry costs one gate and needs no inverter on the carry
// path. The sum uses that inverted carry directly:
//   sum = M(cout_n, M(x, y, cin_n), cin),   cin = ~cin_n
// which is x ^ y ^ cin by the same argument as for the plain majority full
// adder. A chain of these cells therefore ripples the carry through one
// majority gate per bit with no inverter between cells.
//
// Interface: x, y, cin_n in; sum, cout_n out. Combinational.
// The two equations and the gate arrangement follow the document's adder
// with fewer quantum dots; the inverters on x, y and cin_n are written as
// '~', which the schematic shows only as primed input labels.
module fa_cell_inv (
  input  logic x,
  input  logic y,
  input  logic cin_n,
  output logic sum,
  output logic cout_n
);
  logic cin;       // true carry-in, needed by the sum gate
  logic m_carry_n; // M(x', y', cin'): inverted carry-out
  logic m_mid;     // M(x, y, cin')

  assign cin = ~cin_n;

  maj3 u_carry_n (.a(~x), .b(~y), .c(cin_n), .m(m_carry_n));
  maj3 u_mid     (.a(x),  .b(y),  .c(cin_n), .m(m_mid));
  maj3 u_sum     (.a(m_carry_n), .b(m_mid), .c(cin), .m(sum));

  assign cout_n = m_carry_n;
endmodule
