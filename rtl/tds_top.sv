// tds_top: hardened register of N_FF bits using temporal data sampling.
//
// The original method replaces every D flip-flop of a circuit with a temporal
// sampling cell and keeps the combinational logic unchanged. Its test circuit
// had 12 flip-flops. This top is that register: N_FF tds_cell instances with a
// shared tds_clock_gen that makes Clk-A/B/C from the master clock. The
// surrounding combinational logic of a user circuit goes between `q` and `d`.
//
// Timing: d[i] is sampled on the falling edges of Clk-A, Clk-B and Clk-C. q[i]
// takes the new value on the falling edge of Clk-C. One computation cycle is two
// master cycles. Logic from q to d must settle between that Clk-C edge and the
// next falling Clk-A edge (one master cycle). clk_a/clk_b/clk_c are brought out
// so that surrounding logic can be timed against them.
//
// Ports: clk (master), rst_n (asynchronous, active low), d, q;
// per-bit status sampling_used and voter_fault (see tds_cell).
module tds_top #(
  parameter int unsigned N_FF = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_FF-1:0] d,
  output logic [N_FF-1:0] q,
  output logic [N_FF-1:0] sampling_used,
  output logic [N_FF-1:0] voter_fault,
  output logic            clk_a,
  output logic            clk_b,
  output logic            clk_c
);

  tds_clock_gen u_clkgen (
    .clk, .rst_n, .clk_a, .clk_b, .clk_c
  );

  for (genvar i = 0; i < N_FF; i++) begin : g_bit
    tds_cell u_cell (
      .clk_a, .clk_b, .clk_c, .rst_n,
      .data          (d[i]),
      .q             (q[i]),
      .sampling_used (sampling_used[i]),
      .voter_fault   (voter_fault[i])
    );
  end

endmodule
