// tds_majority_voter: voter of the temporal-data-sampling cell.
//
// The voter first compares the three release-stage samples (L2, L4, L5). If they
// agree, their value is the output. If they do not agree, the two
// sampling-stage samples (L1, L3) join them, and the output is the majority of
// all five. That two-step order follows the original description. With five votes, any two
// wrong samples are outvoted.
// `release_agree` is 1 when the release stage was unanimous. It is 0 when the
// sampling-stage samples decided the result.
//
// Purely combinational: no clock, no latency.
// Ports: samples (from tds_sampler); vote (voted data bit), release_agree.
module tds_majority_voter
  import tds_pkg::*;
(
  input  tds_samples_t samples,
  output logic         vote,
  output logic         release_agree
);

  always_comb begin
    release_agree = (samples.d_t_a == samples.d_t_b) && (samples.d_t_b == samples.d_t_c);
    if (release_agree) vote = samples.d_t_a;
    else               vote = maj5(samples);
  end

endmodule
