// tds_majority_voter_tb: exhaustive check of the TDS voter.
// All 32 combinations of the five samples are applied. The expected vote is
// counted here independently: 1 when three or more samples are 1. The expected
// release_agree flag is 1 when L2, L4 and L5 are equal. A unanimous release
// stage must decide the vote alone. Since a true value has all five samples
// equal, every pattern with at most two flipped samples is among the 32.
module tds_majority_voter_tb;
  import tds_pkg::*;

  tds_samples_t samples;
  logic vote, release_agree;
  int checks = 0, failures = 0;

  tds_majority_voter dut (.samples, .vote, .release_agree);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [4:0] bits;
      int ones;
      bits = 5'(v);
      samples = bits;
      ones = $countones(bits);
      #1;
      checks++;
      if (vote !== (ones >= 3)) begin
        failures++;
        $display("FAIL vote for %b: got %0b", bits, vote);
      end
      checks++;
      // struct bit order: d_t_a(4) d_tm1_a(3) d_t_b(2) d_tm1_b(1) d_t_c(0)
      if (release_agree !== (bits[4] == bits[2] && bits[2] == bits[0])) begin
        failures++;
        $display("FAIL release_agree for %b: got %0b", bits, release_agree);
      end
      // a unanimous release stage decides on its own
      if (bits[4] == bits[2] && bits[2] == bits[0]) begin
        checks++;
        if (vote !== bits[4]) begin
          failures++;
          $display("FAIL unanimous release stage overruled for %b", bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
