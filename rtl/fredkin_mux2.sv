// fredkin_mux2: 2-to-1 multiplexer made of one Fredkin gate.
//
// The select s drives the gate's control input, and data a and b drive its two
// swapped inputs. The gate's middle output is then y = s'a + sb: a when s = 0, b when
// s = 1. The other two outputs carry s and the unselected input. Nothing uses
// them, so they are brought out as the garbage port: garbage[1] = s and
// garbage[0] = s'b + sa. No constant inputs are needed. Purely combinational.
module fredkin_mux2 (
  input  logic       s,
  input  logic       a,
  input  logic       b,
  output logic       y,
  output logic [1:0] garbage
);
  fredkin_gate u_gate (
    .a(s),
    .b(a),
    .c(b),
    .p(garbage[1]),
    .q(y),
    .r(garbage[0])
  );
endmodule
