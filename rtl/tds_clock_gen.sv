// tds_clock_gen: three-phase sampling clock generator for the TDS cell.
//
// From the master clock it derives Clk-A, Clk-B and Clk-C. Each has a period of
// two master cycles and a 25% duty cycle (high for half a master cycle). They
// are 90 degrees apart in that order: Clk-A is high in the high half of an even
// master cycle. Clk-B is high in the low half of the same cycle. Clk-C is high
// in the high half of the next, odd, cycle. The fourth quarter has no pulse.
// The effective computation rate is therefore half the master clock rate.
// Period, duty cycle, phase spacing and rate follow the original description; the gating
// circuit is this design's own choice.
//
// How: a posedge flip-flop `odd` toggles every master cycle. The enables for the
// pulses in the high half (A, C) are registered on the falling master edge. The
// enable for the pulse in the low half (B) is registered on the rising edge. So
// every enable is stable while its pulse can be high, and the AND gates make no
// glitches. This is the usual latch-free clock gating scheme. The Clk-C enable
// is taken from the Clk-B enable, not from `odd`. So a Clk-C pulse always
// follows a Clk-B pulse, which follows a Clk-A pulse, even when the reset is
// released on a clock edge. A Clk-C pulse first would release a value that had
// not been sampled.
//
// Reset: asynchronous, active low. All three clocks are low in reset. After the
// release, the first Clk-A pulse comes in the second master cycle.
//
// Ports: clk (master clock), rst_n; clk_a, clk_b, clk_c (gated clocks).
module tds_clock_gen (
  input  logic clk,
  input  logic rst_n,
  output logic clk_a,
  output logic clk_b,
  output logic clk_c
);

  logic odd;    // 1 in odd master cycles (the Clk-C cycle)
  logic en_a;   // Clk-A pulse in the coming high half
  logic en_c;   // Clk-C pulse in the coming high half
  logic en_b;   // Clk-B pulse in the current low half

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd  <= 1'b0;
      en_b <= 1'b0;
    end else begin
      odd  <= ~odd;
      en_b <= odd;       // the cycle starting now is even
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_a <= 1'b0;
      en_c <= 1'b0;
    end else begin
      en_a <= odd;       // next cycle is even: Clk-A
      en_c <= en_b;      // Clk-B is now high, so the next high half is Clk-C
    end
  end

  assign clk_a = clk & en_a;
  assign clk_b = ~clk & en_b;
  assign clk_c = clk & en_c;

endmodule
