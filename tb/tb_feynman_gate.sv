// tb_feynman_gate: exhaustive self-check of the Feynman (controlled-NOT) gate.
// Expected outputs: p = a, and q equals b inverted when a = 1. With b = 0 both
// outputs must equal a, which is how the flip-flop uses the gate for fan-out.
`timescale 1ns/1ps
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic exp_q;
      {a, b} = 2'(v);
      #1;
      exp_q = (a == 1'b1) ? ~b : b;
      checks++;
      if (p !== a || q !== exp_q) begin
        failures++;
        $display("FAIL ab=%b%b pq=%b%b", a, b, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
