// mux_dff: master-slave D flip-flop built from two multiplexer latches.
//
// Each latch is one Fredkin gate used as a 2-to-1 mux whose control input is clk.
// One data input takes the new value and the other takes the latch's own output,
// fed back. A Feynman gate with a constant-0 input copies each latch output, so
// one copy can go back into the feedback loop and the other can go forward.
//
//   master (f1, f3): clk = 1 passes d, clk = 0 holds
//   slave  (f2, f4): clk = 0 passes the master output, clk = 1 holds
//
// The two latches are never transparent together, so q takes the value d had at
// the falling edge of clk and holds it for a whole clock period. The slave runs on
// the inverted clock, but it needs no inverter: its two data pins are simply
// swapped relative to the master's. The flip-flop uses two Fredkin gates and two
// Feynman gates. It has two constant inputs and four garbage outputs. The garbage
// outputs are the p and r pins of the two Fredkin gates: garbage[1:0] from the
// master, garbage[3:2] from the slave.
//
// The gate-level wiring follows the published construction. The falling-edge
// timing is what that wiring gives; the clock edge is never stated. There is no
// reset: load a value before relying on q.
//
// Each feedback path through a Fredkin gate and a Feynman gate is a combinational
// loop. This is deliberate, because that loop is how the latch stores its bit,
// so lint tools report it as a loop. It settles at once, because the only input
// that changes in a given phase is the one that the select input is not
// choosing.
module mux_dff (
  input  logic       clk,
  input  logic       d,
  output logic       q,
  output logic [3:0] garbage
);
  logic master_q;   // master latch value (Fredkin f1 middle output)
  logic master_fb;  // copy fed back to f1
  logic master_fw;  // copy forwarded to the slave
  logic slave_q;    // slave latch value (Fredkin f2 middle output)
  logic slave_fb;   // copy fed back to f2

  // Master latch: q = clk' * master_fb + clk * d
  fredkin_gate f1 (
    .a(clk), .b(master_fb), .c(d),
    .p(garbage[1]), .q(master_q), .r(garbage[0])
  );
  feynman_gate f3 (.a(master_q), .b(1'b0), .p(master_fw), .q(master_fb));

  // Slave latch: q = clk' * master_fw + clk * slave_fb
  fredkin_gate f2 (
    .a(clk), .b(master_fw), .c(slave_fb),
    .p(garbage[3]), .q(slave_q), .r(garbage[2])
  );
  feynman_gate f4 (.a(slave_q), .b(1'b0), .p(q), .q(slave_fb));
endmodule
