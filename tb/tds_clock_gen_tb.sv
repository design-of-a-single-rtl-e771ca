// tds_clock_gen_tb: checks the three sampling clocks against the master clock.
// The master clock has a period of 10 time units. The test samples the three
// clocks in the middle of every master half cycle. Once the first Clk-A pulse
// shows, the half cycles must repeat the pattern A, B, C, none, for a period of
// two master cycles with each clock high in one quarter of it. The test also
// counts rising edges, so a glitch shows up as an extra edge: each clock must
// give exactly one pulse per two master cycles. All three clocks must be low in
// reset. After the reset is released, the first pulse must be Clk-A, within two
// master cycles. The test releases the reset at every point of the master
// cycle, on its edges too.
module tds_clock_gen_tb;

  logic clk = 1'b0, rst_n = 1'b1;
  logic clk_a, clk_b, clk_c;
  int checks = 0, failures = 0;
  int rises_a = 0, rises_b = 0, rises_c = 0;

  tds_clock_gen dut (.clk, .rst_n, .clk_a, .clk_b, .clk_c);

  always #5 clk = ~clk;

  always @(posedge clk_a) rises_a++;
  always @(posedge clk_b) rises_b++;
  always @(posedge clk_c) rises_c++;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // Runs one reset / release sequence and checks NCYC computation cycles.
  task automatic run(input int ncyc, input int rel_delay);
    int h, wait_halves;
    #1 rst_n = 1'b0;   // asynchronous reset, asserted by an edge
    repeat (3) begin
      #5;
      check(clk_a | clk_b | clk_c, 1'b0, "clocks low in reset");
    end
    rises_a = 0; rises_b = 0; rises_c = 0;
    @(negedge clk) #(rel_delay) rst_n = 1'b1;
    // find the first Clk-A pulse, sampling in mid half cycles
    wait_halves = 0;
    @(posedge clk or negedge clk) #2;
    while (!clk_a && wait_halves < 10) begin
      wait_halves++;
      #5;
    end
    check(rises_b == 0 && rises_c == 0, 1'b1, "Clk-A is the first pulse after reset");
    check(wait_halves <= 4, 1'b1, "first Clk-A within two master cycles");
    rises_a = 0; rises_b = 0; rises_c = 0;
    // clk_a was sampled high in a high half
    check(clk, 1'b1, "Clk-A pulse inside a master high half");
    for (h = 0; h < 4 * ncyc; h++) begin
      check(clk_a, (h % 4) == 0, "Clk-A pattern");
      check(clk_b, (h % 4) == 1, "Clk-B pattern");
      check(clk_c, (h % 4) == 2, "Clk-C pattern");
      #5;
    end
    // edges counted since the first pulse was seen high; the loop ends inside the
    // next Clk-A pulse, so A has as many rises as B and C
    check(rises_a == ncyc, 1'b1, "Clk-A pulse count");
    check(rises_b == ncyc, 1'b1, "Clk-B pulse count");
    check(rises_c == ncyc, 1'b1, "Clk-C pulse count");
  endtask

  initial begin
    run(20, 2);
    // release the reset at every point of the master cycle, on edges too
    for (int r = 0; r < 10; r++) run(3, r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
