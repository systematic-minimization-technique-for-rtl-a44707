// maj3 -- three-input majority gate, the only logic primitive of the design.
//
// The output takes the value held by at least two of the three inputs:
//   m = a&b | b&c | c&a
// In quantum-dot cellular automata this is the five-cell cross whose centre
// cell settles to the polarisation of the majority of its three input cells;
// here it is plain combinational logic. Fixing one input to 0 turns the gate
// into a 2-input AND, fixing it to 1 turns it into a 2-input OR, which is how
// the rest of the design builds every function from this one gate.
//
// Interface: a, b, c in; m out. Purely combinational, no clock, no reset.
// The function is the document's; writing it as a sum of products is the
// usual CMOS-independent way to state it.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic m
);
  always_comb m = (a & b) | (b & c) | (c & a);
endmodule
