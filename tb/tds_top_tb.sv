// tds_top_tb: end-to-end test of the hardened register at its default size.
//
// The master clock has a period of 10 units. The on-chip generator makes
// Clk-A/B/C from it, so one computation cycle is 20 units. A random N_FF-bit word
// is launched on d just after each falling Clk-C edge. It must appear on q at
// the next falling Clk-C edge (one computation cycle, two master cycles, later)
// and hold until the next falling Clk-A edge. The expected q is the launched
// word, kept by the test.
//
// Every other word gets one fault event, chosen at random:
//   SEU   one flip-flop (L1..L5) of one random bit flips
//   DEU   two flip-flops flip: in the same bit or in two bits, voting window
//   DSET  one bit of d glitches around one of the three sampling edges
//   CSET  one of the generated clock lines glitches for 1 unit
//   VOTER one bit's voter output is forced wrong during its voting window
//   TEU   three flip-flops of one bit flip in the voting window
// The first five must be fully corrected. A TEU beats a five-sample vote in the
// bit it hits: that bit is left out of the compare, and the test reports how
// often it was corrupted. The other bits must still be right. Each fault class
// and each status flag must occur at least once. The test also checks that
// every other status bit stays 0 and that q does not change early.
//
// A second phase closes the loop: d = q + 1 with no delay, so the register
// counts, one step per computation cycle. This checks the timing between
// cells: q changes on the same Clk-C edge at which L5 samples d. The phase runs
// in episodes: reset, count up from 0, one fault at step 10, checks at every
// step. In a loop the vote at the Clk-C edge has no margin: L1 and L3 already
// hold the next value. So only single faults are required to pass here: an
// SEU (any flip-flop, any time), a clock SET, or a voter fault. The count must
// never be off. Three effects are only reported, not failed. First, how many
// single-fault episodes end with a lasting wrong copy (in a loop the copies
// are not always cleaned up). Second, how often a double upset in the voting window put the
// count off. Third, how often a Clk-C glitch between the Clk-A and Clk-B
// sampling edges did: that glitch releases a half-sampled value early.
module tds_top_tb;

  localparam int N      = 12;     // tds_top default N_FF
  localparam int NWORDS = 4000;
  localparam int NEP        = 300;  // feedback-phase episodes
  localparam int EPSTEPS    = 24;   // count steps per episode
  localparam int FAULT_STEP = 10;   // step at which the episode's fault comes

  logic clk = 0, rst_n = 1;
  logic [N-1:0] d, d_tb = '0, q, sampling_used, voter_fault;
  logic fb_mode = 1'b0;                  // second phase: d = q + 1
  logic clk_a, clk_b, clk_c;
  int checks = 0, failures = 0;
  int n_class[6] = '{default: 0};
  int n_sampling_used = 0, n_voter_fault = 0, n_teu_corrupt = 0;
  int n_fb_class[5] = '{default: 0};
  int n_fb_latent = 0, n_fb_skip = 0, n_fb_deu_skip = 0;
  logic [N-1:0] words[NWORDS + 2];
  int fclass[NWORDS + 2];
  int fbit[NWORDS + 2];

  // fault injection requests into the cell array
  event flip_ev, vote_ev;
  int   flip_bit, flip_ff, vote_bit;
  logic vote_val;

  tds_top dut (.clk, .rst_n, .d, .q, .sampling_used, .voter_fault, .clk_a, .clk_b, .clk_c);

  always #5 clk = ~clk;

  // In the feedback phase the register counts: its own output plus one is
  // its next input, with no delay in the loop.
  always_comb d = fb_mode ? q + N'(1) : d_tb;

  initial begin : watchdog
    #(20 * (NWORDS + NEP * (EPSTEPS + 3) + 40));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < N; i++) begin : g_inj
    always @(flip_ev) begin
      if (flip_bit == i) begin
        logic v;
        case (flip_ff)
          0: begin v = dut.g_bit[i].u_cell.u_sampler.l1; force dut.g_bit[i].u_cell.u_sampler.l1 = ~v; release dut.g_bit[i].u_cell.u_sampler.l1; end
          1: begin v = dut.g_bit[i].u_cell.u_sampler.l2; force dut.g_bit[i].u_cell.u_sampler.l2 = ~v; release dut.g_bit[i].u_cell.u_sampler.l2; end
          2: begin v = dut.g_bit[i].u_cell.u_sampler.l3; force dut.g_bit[i].u_cell.u_sampler.l3 = ~v; release dut.g_bit[i].u_cell.u_sampler.l3; end
          3: begin v = dut.g_bit[i].u_cell.u_sampler.l4; force dut.g_bit[i].u_cell.u_sampler.l4 = ~v; release dut.g_bit[i].u_cell.u_sampler.l4; end
          default: begin v = dut.g_bit[i].u_cell.u_sampler.l5; force dut.g_bit[i].u_cell.u_sampler.l5 = ~v; release dut.g_bit[i].u_cell.u_sampler.l5; end
        endcase
      end
    end
    always @(vote_ev) begin
      if (vote_bit == i) begin
        force dut.g_bit[i].u_cell.vote = vote_val;
        #9;
        release dut.g_bit[i].u_cell.vote;
      end
    end
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic flip(input int b, input int ff);
    flip_bit = b;
    flip_ff  = ff;
    -> flip_ev;
    #1;
  endtask

  // Fault event for word k, called at its launch time L.
  task automatic inject(input int k);
    int cls, off, b, ff, ff2, e;
    cls = fclass[k];
    b   = fbit[k];
    n_class[cls]++;
    case (cls)
      0: begin                                  // SEU
        #(5 * int'($urandom_range(3)) + 12);
        flip(b, int'($urandom_range(4)));
      end
      1: begin                                  // DEU
        ff  = int'($urandom_range(4));
        ff2 = (ff + 1 + int'($urandom_range(3))) % 5;
        #21;
        flip(b, ff);
        if ($urandom_range(1) == 0) flip(b, ff2);
        else flip(int'($urandom_range(N - 1)), ff2);
      end
      2: begin                                  // data SET
        e = 10 + 5 * int'($urandom_range(2));
        #(e - 1);
        d_tb[b] = ~words[k][b];
        #2;
        // at the Clk-C edge the launch of the next word ends the glitch
        if (e < 20) d_tb[b] = words[k][b];
      end
      3: begin                                  // clock SET on a generated clock
        off = 5 * int'($urandom_range(3)) + 12;
        ff  = int'($urandom_range(2));
        #(off);
        case (ff)
          0: begin force dut.clk_a = ~dut.u_clkgen.clk_a; #1 release dut.clk_a; end
          1: begin force dut.clk_b = ~dut.u_clkgen.clk_b; #1 release dut.clk_b; end
          default: begin force dut.clk_c = ~dut.u_clkgen.clk_c; #1 release dut.clk_c; end
        endcase
      end
      4: begin                                  // voter fault
        #21;
        vote_bit = b;
        vote_val = ~words[k][b];
        -> vote_ev;
      end
      default: begin                            // TEU in one bit
        ff = int'($urandom_range(4));
        #21;
        flip(b, ff);
        flip(b, (ff + 1) % 5);
        flip(b, (ff + 2) % 5);
      end
    endcase
  endtask

  // Feedback phase: one fault event for the count value launched at time L
  // (called at L). Single faults may land at any time in the value's life,
  // including the end of the previous value's release window, where a wrong
  // q would feed one wrong copy into the next value.
  task automatic fb_inject(input int cls, input logic [N-1:0] value);
    int b, ff, ff2, off;
    b = int'($urandom_range(N - 1));
    n_fb_class[cls]++;
    case (cls)
      0: begin                                  // SEU
        #(5 * int'($urandom_range(5)) + 2);
        flip(b, int'($urandom_range(4)));
      end
      3: begin                                  // DEU in the voting window
        ff  = int'($urandom_range(4));
        ff2 = (ff + 1 + int'($urandom_range(3))) % 5;
        #21;
        flip(b, ff);
        flip(int'($urandom_range(N - 1)), ff2);
      end
      1: begin                                  // clock SET
        off = 5 * int'($urandom_range(5)) + 2;
        ff  = int'($urandom_range(2));
        // A Clk-C glitch between the Clk-A and Clk-B sampling edges is
        // class 4, not this one.
        if (ff == 2 && off == 12) off = 17;
        #(off);
        case (ff)
          0: begin force dut.clk_a = ~dut.u_clkgen.clk_a; #1 release dut.clk_a; end
          1: begin force dut.clk_b = ~dut.u_clkgen.clk_b; #1 release dut.clk_b; end
          default: begin force dut.clk_c = ~dut.u_clkgen.clk_c; #1 release dut.clk_c; end
        endcase
      end
      2: begin                                  // voter fault
        #21;
        vote_bit = b;
        vote_val = ~value[b];
        -> vote_ev;
      end
      default: begin                            // Clk-C glitch between A and B
        #12;
        force dut.clk_c = ~dut.u_clkgen.clk_c;
        #1;
        release dut.clk_c;
      end
    endcase
  endtask

  // Class 3 and 4 episodes only record the result, see the header.
  task automatic fb_probe(input logic [N-1:0] value);
    #4;
  endtask

  task automatic fb_check(input logic [N-1:0] value);
    #4;
    check(q == value, 1'b1, "count value after release");
    #5;
    check(q == value, 1'b1, "count value held until next Clk-A");
  endtask

  // Checks of word k, called at its release.
  task automatic check_word(input int k);
    logic [N-1:0] mask, exp_vf;
    mask   = (fclass[k] == 5) ? ~(N'(1) << fbit[k]) : '1;
    exp_vf = (fclass[k] == 4) ? (N'(1) << fbit[k]) : '0;
    #4;
    check((q & mask) == (words[k] & mask), 1'b1, "q after release");
    check(voter_fault == exp_vf, 1'b1, "voter_fault flags");
    if (fclass[k] < 0) check(sampling_used == '0, 1'b1, "sampling_used in a clean word");
    if (sampling_used != '0) n_sampling_used++;
    if (voter_fault != '0) n_voter_fault++;
    #5;
    check((q & mask) == (words[k] & mask), 1'b1, "q held until next Clk-A");
    if (fclass[k] == 5 && q[fbit[k]] != words[k][fbit[k]]) n_teu_corrupt++;
    #10;
    if (fclass[k + 1] < 0 && fclass[k] < 0) check(q == words[k], 1'b1, "q unchanged before release");
  endtask

  initial begin
    foreach (words[i]) begin
      words[i]  = N'({$urandom, $urandom});
      fclass[i] = (i % 2 == 0 && i > 1) ? int'($urandom_range(5)) : -1;
      fbit[i]   = int'($urandom_range(N - 1));
    end
    #1 rst_n = 0;
    #11 rst_n = 1;
    checks++;
    if (q != '0) failures++;
    @(negedge clk_c);
    for (int k = 0; k < NWORDS; k++) begin
      // time L: release of word k-1, launch of word k
      fork
        automatic int kk = k;
        begin
          if (kk > 0) check_word(kk - 1);
        end
        begin
          if (fclass[kk] >= 0) inject(kk);
        end
      join_none
      #1 d_tb = words[k];
      #19;
    end
    // feedback phase, in episodes: reset, count up from 0 with one fault
    fork
      check_word(NWORDS - 1);
    join_none
    #30;
    fb_mode = 1'b1;
    for (int ep = 0; ep < NEP; ep++) begin
      int cls;
      cls = ep % 5;     // classes 3 and 4 are only reported
      #1 rst_n = 1'b0;
      #7 rst_n = 1'b1;
      @(negedge clk_c);
      // time L of step j: release of count value j
      for (int j = 1; j <= EPSTEPS; j++) begin
        fork
          automatic int jj = j;
          automatic int cc = cls;
          begin
            if (cc >= 3) fb_probe(N'(jj));
            else fb_check(N'(jj));
          end
          begin
            if (jj == FAULT_STEP) fb_inject(cc, N'(jj + 1));
          end
        join_none
        if (j == EPSTEPS) #12;
        else #20;
      end
      if (cls < 3 && sampling_used != '0) n_fb_latent++;
      if (cls == 3 && q != N'(EPSTEPS)) n_fb_deu_skip++;
      if (cls == 4 && q != N'(EPSTEPS)) n_fb_skip++;
      #10;
    end
    #12;
    checks++;
    if (n_class[0] == 0 || n_class[1] == 0 || n_class[2] == 0 || n_class[3] == 0 ||
        n_class[4] == 0 || n_class[5] == 0 || n_sampling_used == 0 || n_voter_fault == 0 ||
        n_fb_class[0] == 0 || n_fb_class[1] == 0 || n_fb_class[2] == 0 || n_fb_class[3] == 0 ||
        n_fb_class[4] == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("faults: SEU=%0d DEU=%0d DSET=%0d CSET=%0d VOTER=%0d TEU=%0d (TEU bit corrupted %0d times)",
             n_class[0], n_class[1], n_class[2], n_class[3], n_class[4], n_class[5], n_teu_corrupt);
    $display("feedback phase faults: SEU=%0d CSET=%0d VOTER=%0d; reported only: DEU=%0d, Clk-C glitch between A and B=%0d",
             n_fb_class[0], n_fb_class[1], n_fb_class[2], n_fb_class[3], n_fb_class[4]);
    $display("feedback phase: single-fault episodes ending with a lasting wrong copy %0d of %0d",
             n_fb_latent, n_fb_class[0] + n_fb_class[1] + n_fb_class[2]);
    $display("feedback phase: count off after DEU %0d of %0d, after Clk-C glitch %0d of %0d",
             n_fb_deu_skip, n_fb_class[3], n_fb_skip, n_fb_class[4]);
    $display("status: sampling_used seen %0d, voter overrides seen %0d", n_sampling_used, n_voter_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
