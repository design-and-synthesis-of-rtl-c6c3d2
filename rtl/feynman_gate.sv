// feynman_gate: 2x2 reversible controlled-NOT gate.
//
// p = a and q = a ^ b. With b tied to 0 the gate gives two copies of a. Reversible
// logic does not allow plain fan-out, so the flip-flop uses the gate this way to
// copy a latch output onto its feedback path. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
