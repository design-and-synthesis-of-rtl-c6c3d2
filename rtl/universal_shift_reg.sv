// universal_shift_reg: universal shift register from Fredkin-gate muxes and
// mux-based flip-flops.
//
// Each bit i has one 4-to-1 Fredkin mux (fredkin_mux4) in front of one master-slave
// flip-flop (mux_dff). All the muxes share the selects s1, s0, and the mux output is
// the flip-flop's next value:
//
//   s1 s0   mux input   operation
//   0  0    0: q[i]     no change (each output recirculates)
//   0  1    1: q[i-1]   shift left; sil enters q[0], the rightmost stage
//   1  0    2: q[i+1]   shift right; sir enters q[WIDTH-1], the leftmost stage
//   1  1    3: pin[i]   parallel load
//
// With these modes the register works as serial-in serial-out, serial-in
// parallel-out, parallel-in serial-out or parallel-in parallel-out. q[WIDTH-1]
// serves as the serial output of a right shift, and q[0] as that of a left shift.
//
// Timing: the flip-flops take the mux output at the falling edge of clk, so s1,
// s0, sir, sil and pin must be stable around that edge. The new contents appear on
// q right after it, and q holds until the next falling edge. There is no reset;
// load the register in parallel first.
//
// The 4-bit size, the mode coding and the structure are the published design;
// WIDTH generalises it. Each flip-flop output drives up to three muxes and the q port
// directly, without Feynman copies. The garbage outputs of the muxes and
// flip-flops are left open on purpose, so lint reports them as unconnected pins.
// At WIDTH = 4 the register has 28 reversible gates: 12 Fredkin gates in the
// muxes, plus 8 Fredkin and 8 Feynman gates in the flip-flops.
module universal_shift_reg #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             s1,
  input  logic             s0,
  input  logic             sir,
  input  logic             sil,
  input  logic [WIDTH-1:0] pin,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] next;
  logic [WIDTH+1:0] ext;  // q with the serial inputs at both ends: ext[i+1] = q[i]

  assign ext = {sir, q, sil};

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    fredkin_mux4 u_mux (
      .s1(s1), .s0(s0),
      .d({pin[i], ext[i+2], ext[i], q[i]}),
      .y(next[i]),
      .garbage()
    );
    mux_dff u_ff (.clk(clk), .d(next[i]), .q(q[i]), .garbage());
  end
endmodule
