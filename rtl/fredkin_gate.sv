// fredkin_gate: 3x3 reversible controlled-swap gate.
//
// The control input a passes straight through to p. While a is 0, b goes to q and
// c goes to r. While a is 1, b and c are swapped. This gives q = a'b ^ ac and
// r = a'c ^ ab. The mapping is a bijection on the three bits, so no information is
// lost. The gate is purely combinational and has no clock.
//
// It is the only gate the multiplexers and latches of this design are built from.
// The equations are the standard ones for this gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
