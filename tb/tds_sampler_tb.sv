// tds_sampler_tb: checks flip-flops L1..L5 of the temporal sampler.
// The test makes its own Clk-A/B/C pulses, in the order A, B, C, one after the
// other. In each computation cycle it gives the data line three random values,
// one per sampling instant. The data changes while the clock is high, so the
// test also checks that the value present at the falling edge is the one
// stored, and that nothing moves at the rising edge. After Clk-C, L2 must equal
// the old L1 and L4 the old L3, with L5 the Clk-C value. Reset must clear all
// five flip-flops.
module tds_sampler_tb;
  import tds_pkg::*;

  logic clk_a = 0, clk_b = 0, clk_c = 0, rst_n = 1, data = 0;
  tds_samples_t samples;
  int checks = 0, failures = 0;

  tds_sampler dut (.clk_a, .clk_b, .clk_c, .rst_n, .data, .samples);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_samples(input tds_samples_t exp, input string what);
    checks++;
    if (samples !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, samples, exp);
    end
  endtask

  // One sampling pulse on clock `which` (0=A,1=B,2=C). The data is the
  // complement of `v` at the rising edge and `v` at the falling edge.
  task automatic pulse(input int which, input logic v, input tds_samples_t prev);
    data = ~v;
    #2;
    case (which)
      0: clk_a = 1'b1;
      1: clk_b = 1'b1;
      default: clk_c = 1'b1;
    endcase
    #2;
    expect_samples(prev, "no capture on rising edge");
    data = v;
    #2;
    case (which)
      0: clk_a = 1'b0;
      1: clk_b = 1'b0;
      default: clk_c = 1'b0;
    endcase
    #2;
    data = ~v;   // later changes must not reach the flip-flops
    #2;
  endtask

  initial begin
    tds_samples_t exp;
    logic da, db, dc;
    #1 rst_n = 1'b0;
    #2;
    expect_samples('0, "reset clears all");
    rst_n = 1'b1;
    exp = '0;
    for (int cyc = 0; cyc < 200; cyc++) begin
      da = 1'($urandom);
      db = 1'($urandom);
      dc = 1'($urandom);
      pulse(0, da, exp);
      exp.d_tm1_a = da;
      expect_samples(exp, "L1 after Clk-A");
      pulse(1, db, exp);
      exp.d_tm1_b = db;
      expect_samples(exp, "L3 after Clk-B");
      pulse(2, dc, exp);
      exp.d_t_a = da;
      exp.d_t_b = db;
      exp.d_t_c = dc;
      expect_samples(exp, "release after Clk-C");
    end
    rst_n = 1'b0;
    #1;
    expect_samples('0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
