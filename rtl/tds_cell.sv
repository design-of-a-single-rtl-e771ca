// tds_cell: one SEU/SET-hardened storage bit (a drop-in for a D flip-flop).
//
// It chains the temporal sampler (flip-flops L1..L5), the majority voter and the
// voter fault recovery unit, in the arrangement the original description draws. `data` is
// sampled on the falling edges of Clk-A, Clk-B and Clk-C. On the Clk-C edge the
// release stage presents the samples, and `q` shows the voted value from that
// edge on. So `q` follows `data` with one computation cycle (two master cycles)
// of latency. It stays correct while at most two of the five samples are wrong.
// Timing rule (from the original description): logic that feeds `data` from the `q` of
// other cells, released on Clk-C, must settle before the next Clk-A edge.
//
// Status outputs, this design's addition for observation:
//   sampling_used  the release stage disagreed and L1/L3 were consulted
//   voter_fault    the watchdog overrode the voter
//
// Ports: clk_a, clk_b, clk_c, rst_n, data; q, sampling_used, voter_fault.
module tds_cell
  import tds_pkg::*;
(
  input  logic clk_a,
  input  logic clk_b,
  input  logic clk_c,
  input  logic rst_n,
  input  logic data,
  output logic q,
  output logic sampling_used,
  output logic voter_fault
);

  tds_samples_t samples;
  logic         vote;
  logic         release_agree;

  tds_sampler u_sampler (
    .clk_a, .clk_b, .clk_c, .rst_n, .data, .samples
  );

  tds_majority_voter u_voter (
    .samples, .vote, .release_agree
  );

  tds_voter_recovery u_recovery (
    .samples, .vote, .q, .voter_fault
  );

  assign sampling_used = ~release_agree;

endmodule
