// tb_fredkin_gate: exhaustive self-check of the Fredkin gate.
// The reference model is a controlled swap: when a = 1 the outputs are c and b,
// otherwise b and c, and p copies a. The test also checks that the eight input
// patterns give eight different output patterns, which is what makes the gate
// reversible.
`timescale 1ns/1ps
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      logic [2:0] expv;
      {a, b, c} = 3'(v);
      #1;
      expv = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== expv) begin
        failures++;
        $display("FAIL abc=%b%b%b pqr=%b%b%b expected %b", a, b, c, p, q, r, expv);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("FAIL gate is not a bijection, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
