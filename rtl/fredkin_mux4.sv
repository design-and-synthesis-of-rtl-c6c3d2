// fredkin_mux4: 4-to-1 multiplexer built as a tree of three Fredkin 2-to-1 muxes.
//
// Two first-level muxes, both steered by s0, pick d[0] or d[1] and d[2] or d[3].
// A second-level mux, steered by s1, picks between those two results, so
// y = d[{s1,s0}]. Each of the three gates leaves two outputs unused. The six
// garbage outputs are brought out: garbage[1:0] from the d[1:0] mux,
// garbage[3:2] from the d[3:2] mux and garbage[5:4] from the final mux. No constant
// inputs. Purely combinational, with two gate levels from d to y.
module fredkin_mux4 (
  input  logic       s1,
  input  logic       s0,
  input  logic [3:0] d,
  output logic       y,
  output logic [5:0] garbage
);
  logic y_lo, y_hi;

  fredkin_mux2 u_lo  (.s(s0), .a(d[0]), .b(d[1]), .y(y_lo), .garbage(garbage[1:0]));
  fredkin_mux2 u_hi  (.s(s0), .a(d[2]), .b(d[3]), .y(y_hi), .garbage(garbage[3:2]));
  fredkin_mux2 u_out (.s(s1), .a(y_lo), .b(y_hi), .y(y),    .garbage(garbage[5:4]));
endmodule
