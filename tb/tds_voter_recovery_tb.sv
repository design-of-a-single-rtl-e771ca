// tds_voter_recovery_tb: exhaustive check of the voter watchdog.
// Every pattern of the five samples is applied, with both a correct vote (the
// majority, counted here) and a wrong one (its complement), as a faulty voter
// would give. The output q must always be the majority. voter_fault must be 1
// exactly when the vote was wrong.
module tds_voter_recovery_tb;
  import tds_pkg::*;

  tds_samples_t samples;
  logic vote, q, voter_fault;
  int checks = 0, failures = 0;
  int overrides = 0;

  tds_voter_recovery dut (.samples, .vote, .q, .voter_fault);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      for (int wrong = 0; wrong < 2; wrong++) begin
        logic truth;
        samples = 5'(v);
        truth   = ($countones(5'(v)) >= 3);
        vote    = (wrong != 0) ? ~truth : truth;
        #1;
        checks++;
        if (q !== truth) begin
          failures++;
          $display("FAIL q for samples %b vote %0b: got %0b", 5'(v), vote, q);
        end
        checks++;
        if (voter_fault !== 1'(wrong)) begin
          failures++;
          $display("FAIL voter_fault for samples %b vote %0b: got %0b", 5'(v), vote, voter_fault);
        end
        if (voter_fault) overrides++;
      end
    end
    checks++;
    if (overrides != 32) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
