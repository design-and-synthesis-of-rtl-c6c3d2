// tb_mux_dff: self-check of the mux-based master-slave D flip-flop.
//
// The clock period is 20 ns, high for the first 10 ns. In every period d is
// changed at random times while the clock is high and again while it is low. A
// reference bit takes d at each falling edge. q is compared with it before and
// after every change of d and just before each edge, so a latch that lets d
// through, or that misses a capture, is caught. Each falling edge is one capture
// with a latency of zero cycles, and the test checks that q is settled 1 ns
// after the edge.
`timescale 1ns/1ps
module tb_mux_dff;
  localparam int NCYCLES = 400;
  logic clk, d, q;
  logic [3:0] garbage;
  logic ref_q;
  int checks = 0, failures = 0;
  int captures_0 = 0, captures_1 = 0;

  mux_dff dut (.clk(clk), .d(d), .q(q), .garbage(garbage));

  task automatic check(string where);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s t=%0t q=%b expected %b", where, $time, q, ref_q);
    end
  endtask

  initial begin
    #(20 * (NCYCLES + 10));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Bring the flip-flop to a known state: one falling edge with d = 0.
    clk = 1'b1;
    d   = 1'b0;
    #10 clk = 1'b0;
    #10 clk = 1'b1;
    ref_q = 1'b0;
    #1 check("init");
    for (int n = 0; n < NCYCLES; n++) begin
      int t1, t2;
      // clk is high here, 1 ns into the high phase
      t1 = 1 + int'($urandom_range(0, 6));
      #(t1) d = 1'($urandom);
      #1 check("high phase, after d change");
      #(8 - t1) check("just before falling edge");
      clk = 1'b0;
      ref_q = d;
      if (d) captures_1++; else captures_0++;
      #1 check("1 ns after falling edge");
      t2 = int'($urandom_range(0, 6));
      #(t2) d = 1'($urandom);
      #1 check("low phase, after d change");
      #(8 - t2) check("just before rising edge");
      clk = 1'b1;
      #1 check("after rising edge");
    end
    checks++;
    if (captures_0 == 0 || captures_1 == 0) begin
      failures++;
      $display("FAIL did not capture both values");
    end
    $display("captures of 0: %0d, of 1: %0d", captures_0, captures_1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
