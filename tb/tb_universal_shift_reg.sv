// tb_universal_shift_reg: end-to-end self-check of the universal shift register.
//
// The register is run at its default width. The clock period is 20 ns and the
// register captures at the falling edge. Inputs change only at the rising edge,
// and q is checked 1 ns after every falling edge against a reference register in
// plain behavioural code. The new contents must be visible in that same cycle,
// so the test also checks the one-cycle latency.
//
// Phase 1 runs the four register transfers of the four usage modes, with values
// worked out by hand:
//   PIPO  parallel load, then hold
//   SIPO  a word shifted in serially to the right, then read in parallel
//   PISO  a parallel load shifted out to the left through q[WIDTH-1]
//   SISO  a word shifted in on sil and out again, in order, at q[WIDTH-1]
// Phase 2 runs random modes, serial bits and parallel words against the
// reference register. The test counts how often each of the four modes ran and
// how often a serial 1 entered at each end, and fails if any count is zero.
`timescale 1ns/1ps
module tb_universal_shift_reg;
  localparam int WIDTH   = 4;
  localparam int NRANDOM = 2000;

  typedef enum logic [1:0] {
    MODE_HOLD = 2'b00,
    MODE_SHL  = 2'b01,
    MODE_SHR  = 2'b10,
    MODE_LOAD = 2'b11
  } mode_e;

  logic clk = 1'b1;
  logic s1, s0, sir, sil;
  logic [WIDTH-1:0] pin, q, ref_q;
  int checks = 0, failures = 0;
  int mode_count [4];
  int sir_ones = 0, sil_ones = 0;

  universal_shift_reg dut (
    .clk(clk), .s1(s1), .s0(s0), .sir(sir), .sil(sil), .pin(pin), .q(q)
  );

  initial begin
    #(20 * (NRANDOM + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] next_value(mode_e m, logic [WIDTH-1:0] cur,
                                                  logic r_in, logic l_in,
                                                  logic [WIDTH-1:0] par);
    case (m)
      MODE_HOLD: return cur;
      MODE_SHL:  return {cur[WIDTH-2:0], l_in};
      MODE_SHR:  return {r_in, cur[WIDTH-1:1]};
      default:   return par;
    endcase
  endfunction

  // Apply one clock period: inputs set at the rising edge, capture at the falling
  // edge, check 1 ns later. expect_q is the value q must show after this edge.
  task automatic step(mode_e m, logic r_in, logic l_in, logic [WIDTH-1:0] par,
                      logic [WIDTH-1:0] expect_q, string what);
    {s1, s0} = m;
    sir = r_in;
    sil = l_in;
    pin = par;
    mode_count[m]++;
    if (m == MODE_SHR && r_in) sir_ones++;
    if (m == MODE_SHL && l_in) sil_ones++;
    #9;
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("FAIL %s: q changed before the falling edge, q=%b expected %b", what, q, ref_q);
    end
    #1 clk = 1'b0;
    #1;
    ref_q = expect_q;
    checks++;
    if (q !== expect_q) begin
      failures++;
      $display("FAIL %s: mode=%s q=%b expected %b", what, m.name(), q, expect_q);
    end
    #9 clk = 1'b1;
  endtask

  initial begin
    foreach (mode_count[i]) mode_count[i] = 0;
    s1 = 0; s0 = 0; sir = 0; sil = 0; pin = '0;
    #1 ref_q = q;  // unknown power-up contents, settled

    // PIPO: parallel load 1010, then hold twice.
    step(MODE_LOAD, 0, 0, 4'b1010, 4'b1010, "PIPO load");
    step(MODE_HOLD, 1, 1, 4'b0101, 4'b1010, "PIPO hold 1");
    step(MODE_HOLD, 0, 1, 4'b1111, 4'b1010, "PIPO hold 2");

    // SIPO: shift 1,1,0,1 in from the left with shift right; after four shifts
    // the first bit is in q[0].
    step(MODE_SHR, 1, 0, 4'b0000, 4'b1101, "SIPO shr 1");
    step(MODE_SHR, 1, 0, 4'b0000, 4'b1110, "SIPO shr 2");
    step(MODE_SHR, 0, 0, 4'b0000, 4'b0111, "SIPO shr 3");
    step(MODE_SHR, 1, 0, 4'b0000, 4'b1011, "SIPO shr 4");

    // PISO: load 0110, then shift left with sil = 0; the serial output q[3]
    // shows 0, then 1, 1, 0, 0.
    step(MODE_LOAD, 0, 0, 4'b0110, 4'b0110, "PISO load");
    step(MODE_SHL,  0, 0, 4'b0000, 4'b1100, "PISO shl 1");
    step(MODE_SHL,  0, 0, 4'b0000, 4'b1000, "PISO shl 2");
    step(MODE_SHL,  0, 0, 4'b0000, 4'b0000, "PISO shl 3");

    // SISO: shift the word 1,0,0,1,1,1,0,1 in on sil and read it back at q[3]
    // WIDTH cycles later.
    begin
      logic [7:0] stream;
      logic [WIDTH-1:0] model;
      logic bit_in;
      stream = 8'b1011_1001;  // bit 0 goes first
      model  = q;
      for (int k = 0; k < 8 + WIDTH; k++) begin
        bit_in = (k < 8) ? stream[k] : 1'b0;
        model = {model[WIDTH-2:0], bit_in};
        step(MODE_SHL, 0, bit_in, 4'b0000, model, "SISO shl");
        if (k >= WIDTH - 1 && k < 8 + WIDTH - 1) begin
          checks++;
          if (q[WIDTH-1] !== stream[k-(WIDTH-1)]) begin
            failures++;
            $display("FAIL SISO: serial out %b, expected bit %0d = %b",
                     q[WIDTH-1], k - (WIDTH-1), stream[k-(WIDTH-1)]);
          end
        end
      end
    end

    // Random operation against the behavioural reference.
    for (int n = 0; n < NRANDOM; n++) begin
      mode_e m;
      logic r_in, l_in;
      logic [WIDTH-1:0] par;
      m    = mode_e'($urandom_range(0, 3));
      r_in = 1'($urandom);
      l_in = 1'($urandom);
      par  = WIDTH'($urandom);
      step(m, r_in, l_in, par, next_value(m, ref_q, r_in, l_in, par), "random");
    end

    foreach (mode_count[i]) begin
      checks++;
      if (mode_count[i] == 0) begin
        failures++;
        $display("FAIL mode %0d never exercised", i);
      end
    end
    checks++;
    if (sir_ones == 0 || sil_ones == 0) begin
      failures++;
      $display("FAIL a serial input never shifted in a 1");
    end
    $display("modes: hold=%0d shl=%0d shr=%0d load=%0d, serial ones: sir=%0d sil=%0d",
             mode_count[0], mode_count[1], mode_count[2], mode_count[3], sir_ones, sil_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
