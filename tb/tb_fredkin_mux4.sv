// tb_fredkin_mux4: exhaustive self-check of the 4-to-1 Fredkin multiplexer.
// All 16 data patterns are tried with each of the 4 select values, and y must be
// data input number {s1,s0}. The expected value is picked with a case statement.
`timescale 1ns/1ps
module tb_fredkin_mux4;
  logic s1, s0, y;
  logic [3:0] d;
  logic [5:0] garbage;
  int checks = 0, failures = 0;

  fredkin_mux4 dut (.s1(s1), .s0(s0), .d(d), .y(y), .garbage(garbage));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic exp_y;
      {s1, s0, d} = 6'(v);
      #1;
      case ({s1, s0})
        2'b00:   exp_y = d[0];
        2'b01:   exp_y = d[1];
        2'b10:   exp_y = d[2];
        default: exp_y = d[3];
      endcase
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL s1s0=%b%b d=%b y=%b", s1, s0, d, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
