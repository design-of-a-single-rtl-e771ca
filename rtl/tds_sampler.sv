// tds_sampler: the five flip-flops L1..L5 of one temporal-data-sampling bit.
//
// Sampling stage: L1 takes `data` on Clk-A, L3 takes `data` on Clk-B and L5
// takes `data` on Clk-C. So one data value is sampled at three instants, half a
// master cycle apart. Release stage: on the same Clk-C edge, L2 takes L1 and L4
// takes L3. From that edge until the next Clk-A edge, all five flip-flops hold
// samples of the same data value, which the voter combines. L5 belongs to both
// stages. This structure follows the original description.
//
// The flip-flops capture on the falling edge of their clock, the end of the
// high "sampling mode" window. The original description calls them edge-sensitive and says
// they block changes while their clock is low. The falling edge is this
// design's reading of those two statements.
//
// Reset: asynchronous, active low, clears all five flip-flops (this design's
// choice).
//
// Ports: clk_a, clk_b, clk_c (from tds_clock_gen), rst_n, data (the bit to store);
// samples (the five flip-flop outputs, see tds_pkg).
module tds_sampler
  import tds_pkg::*;
(
  input  logic         clk_a,
  input  logic         clk_b,
  input  logic         clk_c,
  input  logic         rst_n,
  input  logic         data,
  output tds_samples_t samples
);

  logic l1, l2, l3, l4, l5;

  // Sampling stage.
  always_ff @(negedge clk_a or negedge rst_n)
    if (!rst_n) l1 <= 1'b0;
    else        l1 <= data;

  always_ff @(negedge clk_b or negedge rst_n)
    if (!rst_n) l3 <= 1'b0;
    else        l3 <= data;

  // Clk-C: third sample and release of the first two.
  always_ff @(negedge clk_c or negedge rst_n)
    if (!rst_n) begin
      l2 <= 1'b0;
      l4 <= 1'b0;
      l5 <= 1'b0;
    end else begin
      l2 <= l1;
      l4 <= l3;
      l5 <= data;
    end

  assign samples = '{d_t_a: l2, d_tm1_a: l1, d_t_b: l4, d_tm1_b: l3, d_t_c: l5};

endmodule
