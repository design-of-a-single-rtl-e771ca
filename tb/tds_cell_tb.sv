// tds_cell_tb: one hardened bit under injected single and double faults.
//
// The test makes its own Clk-A/B/C with a 20-unit computation cycle (master
// period 10): A high in [5,10), B in [10,15) and C in [15,20), modulo 20. A word
// (one data bit) is launched just after each falling Clk-C edge, as an upstream
// cell would release it. It must appear on q at the next falling Clk-C edge,
// one computation cycle later, and hold until the next falling Clk-A edge. The
// test checks q 3 and 9 units after that release. In fault-free cycles it also
// checks, just before the release, that q still shows the previous word.
//
// Every other word gets one fault event, picked at random:
//   SEU   one flip-flop of L1..L5 flips, at a random time after the previous
//         word's voting window (the data is then sampled, released or voted)
//   DEU   two different flip-flops flip inside the voting window
//   DSET  the data line glitches around one of the three sampling edges
//   CSET  one clock line glitches (inverted for 1 unit) at a random time in
//         the same span
//   VOTER the voter output is forced wrong during the voting window
// The remaining words are clean, so leftovers of a fault show up as errors.
// The expected q is the launched word, kept by the test. Each fault class, and
// each status flag (sampling_used, voter_fault), must occur at least once.
module tds_cell_tb;

  localparam int NWORDS = 3000;

  logic a_gen = 0, b_gen = 0, c_gen = 0;
  logic ga = 0, gb = 0, gc = 0;          // clock-line glitches
  logic clk_a, clk_b, clk_c;
  logic rst_n = 1, data = 0;
  logic q, sampling_used, voter_fault;
  int checks = 0, failures = 0;
  int n_class[5] = '{default: 0};
  int n_sampling_used = 0, n_voter_fault = 0;
  logic words[NWORDS + 2];
  int   fclass[NWORDS + 2];              // -1 = clean

  assign clk_a = a_gen ^ ga;
  assign clk_b = b_gen ^ gb;
  assign clk_c = c_gen ^ gc;

  tds_cell dut (.clk_a, .clk_b, .clk_c, .rst_n, .data, .q, .sampling_used, .voter_fault);

  initial begin : watchdog
    #(20 * (NWORDS + 20));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // three-phase clocks, period 20
  initial forever begin
    #5 a_gen = 1;
    #5 a_gen = 0; b_gen = 1;
    #5 b_gen = 0; c_gen = 1;
    #5 c_gen = 0;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic flip(input int ff);
    logic v;
    case (ff)
      0: begin v = dut.u_sampler.l1; force dut.u_sampler.l1 = ~v; release dut.u_sampler.l1; end
      1: begin v = dut.u_sampler.l2; force dut.u_sampler.l2 = ~v; release dut.u_sampler.l2; end
      2: begin v = dut.u_sampler.l3; force dut.u_sampler.l3 = ~v; release dut.u_sampler.l3; end
      3: begin v = dut.u_sampler.l4; force dut.u_sampler.l4 = ~v; release dut.u_sampler.l4; end
      default: begin v = dut.u_sampler.l5; force dut.u_sampler.l5 = ~v; release dut.u_sampler.l5; end
    endcase
  endtask

  // Fault event for the word launched at time L (called at L).
  task automatic inject(input int k);
    int cls, off, ff, ff2, e;
    cls = fclass[k];
    n_class[cls]++;
    case (cls)
      0: begin                               // SEU
        off = 5 * int'($urandom_range(3)) + 12;
        ff  = int'($urandom_range(4));
        #(off);
        flip(ff);
      end
      1: begin                               // DEU in the voting window
        ff  = int'($urandom_range(4));
        ff2 = (ff + 1 + int'($urandom_range(3))) % 5;
        #21;
        flip(ff);
        #1;
        flip(ff2);
      end
      2: begin                               // data SET at one sampling edge
        e = 10 + 5 * int'($urandom_range(2));
        #(e - 1);
        data = ~words[k];
        #2;
        // at the Clk-C edge the launch of the next word ends the glitch
        if (e < 20) data = words[k];
      end
      3: begin                               // clock SET
        off = 5 * int'($urandom_range(3)) + 12;
        ff  = int'($urandom_range(2));
        #(off);
        case (ff)
          0: ga = 1;
          1: gb = 1;
          default: gc = 1;
        endcase
        #1;
        ga = 0; gb = 0; gc = 0;
      end
      default: begin                         // voter fault
        #21;
        force dut.vote = ~words[k];
        #9;
        release dut.vote;
      end
    endcase
  endtask

  // Checks of the word launched at L-20, called at L (its release).
  task automatic check_word(input int k);
    #4;
    check(q, words[k], "q after release");
    check(voter_fault, fclass[k] == 4, "voter_fault flag");
    if (fclass[k] < 0) check(sampling_used, 1'b0, "sampling_used in a clean word");
    if (sampling_used) n_sampling_used++;
    if (voter_fault) n_voter_fault++;
    #5;
    check(q, words[k], "q held until next Clk-A");
    if (voter_fault) n_voter_fault++;
    if (sampling_used) n_sampling_used++;
    // just before the next release, q still shows this word
    #10;
    if (fclass[k + 1] < 0 && fclass[k] < 0) check(q, words[k], "q unchanged before release");
  endtask

  initial begin
    foreach (words[i]) begin
      words[i]  = 1'($urandom);
      fclass[i] = (i % 2 == 0 && i > 1) ? int'($urandom_range(4)) : -1;
    end
    #1 rst_n = 0;   // reset needs an edge
    #1 rst_n = 1;
    @(negedge c_gen);
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
      #1 data = words[k];
      @(negedge c_gen);
    end
    #12;
    checks++;
    if (n_class[0] == 0 || n_class[1] == 0 || n_class[2] == 0 || n_class[3] == 0 ||
        n_class[4] == 0 || n_sampling_used == 0 || n_voter_fault == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("faults: SEU=%0d DEU=%0d DSET=%0d CSET=%0d VOTER=%0d; sampling_used seen %0d, overrides seen %0d",
             n_class[0], n_class[1], n_class[2], n_class[3], n_class[4], n_sampling_used, n_voter_fault);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
