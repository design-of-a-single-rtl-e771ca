// tds_voter_recovery: watchdog and override ("voter fault recovery unit").
//
// The original description gives only this unit's function: it checks the voter for faults
// and overrides the output when the voter is wrong. This design checks it this
// way. It counts how many of the five samples agree with the voter's result. A
// correct voter always has at least three on its side. If fewer than three
// agree, the voter has failed. The result is then a single bit, so the right
// value is the complement of the voter's, and the unit outputs that.
// `voter_fault` reports that an override happened.
//
// Purely combinational.
// Ports: samples (from tds_sampler), vote (from tds_majority_voter);
// q (checked output), voter_fault.
module tds_voter_recovery
  import tds_pkg::*;
(
  input  tds_samples_t samples,
  input  logic         vote,
  output logic         q,
  output logic         voter_fault
);

  logic [2:0] agree;

  always_comb begin
    agree = 3'(samples.d_t_a   == vote) + 3'(samples.d_tm1_a == vote)
          + 3'(samples.d_t_b   == vote) + 3'(samples.d_tm1_b == vote)
          + 3'(samples.d_t_c   == vote);
    voter_fault = agree < 3'd3;
    q           = voter_fault ? ~vote : vote;
  end

endmodule
