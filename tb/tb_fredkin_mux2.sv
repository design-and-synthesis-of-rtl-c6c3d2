// tb_fredkin_mux2: exhaustive self-check of the one-gate 2-to-1 multiplexer.
// y must equal a when s = 0 and b when s = 1. The garbage outputs must carry s
// and the unselected input.
`timescale 1ns/1ps
module tb_fredkin_mux2;
  logic s, a, b, y;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  fredkin_mux2 dut (.s(s), .a(a), .b(b), .y(y), .garbage(garbage));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_y, exp_other;
      {s, a, b} = 3'(v);
      #1;
      if (s) begin exp_y = b; exp_other = a; end
      else   begin exp_y = a; exp_other = b; end
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b y=%b", s, a, b, y);
      end
      checks++;
      if (garbage !== {s, exp_other}) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b garbage=%b", s, a, b, garbage);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
