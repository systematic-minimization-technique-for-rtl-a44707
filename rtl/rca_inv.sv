// rca_inv -- N-bit ripple-carry adder built from inverted-carry cells.
//
// sum = x + y + cin, with the carry-out in cout. The carry-in is inverted
// once at the input and fed to bit 0 as cin_n; every fa_cell_inv passes the
// complement of its carry-out straight to the next bit as that bit's cin_n;
// the complement leaving the top bit is inverted once more to give cout.
// Between those two inverters the carry chain is one majority gate per bit.
//
// Interface: x[N-1:0], y[N-1:0], cin in; sum[N-1:0], cout out.
// Combinational; the critical path is the carry chain, N majority gates plus
// the two end inverters.
//
// The chaining (invert at the first cell, pass Cout' as the next Cin',
// invert at the last cell) follows the document. The document describes an
// n-bit adder without fixing n: N = 8 is this design's choice.
module rca_inv #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] carry_n;  // carry_n[i]: inverted carry into bit i

  assign carry_n[0] = ~cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    fa_cell_inv u_cell (
      .x     (x[i]),
      .y     (y[i]),
      .cin_n (carry_n[i]),
      .sum   (sum[i]),
      .cout_n(carry_n[i+1])
    );
  end

  assign cout = ~carry_n[N];
endmodule
