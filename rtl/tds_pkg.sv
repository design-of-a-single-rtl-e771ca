// tds_pkg: types and helpers shared by the temporal-data-sampling (TDS)
// SEU/SET mitigation cell.
//
// A hardened bit holds five copies of its data in flip-flops L1..L5. The
// copies come from three sampling instants (Clk-A, Clk-B, Clk-C). Each copy is
// named after its label in the block diagram of the cell:
//   d_t_a    L2 output, release stage, copy of the Clk-A sample
//   d_tm1_a  L1 output, sampling stage, the Clk-A sample
//   d_t_b    L4 output, release stage, copy of the Clk-B sample
//   d_tm1_b  L3 output, sampling stage, the Clk-B sample
//   d_t_c    L5 output, the Clk-C sample (shared by both stages)
// maj5() is the five-input majority that the voter and its watchdog both
// apply. It is plain combinational logic.
package tds_pkg;

  typedef struct packed {
    logic d_t_a;    // L2
    logic d_tm1_a;  // L1
    logic d_t_b;    // L4
    logic d_tm1_b;  // L3
    logic d_t_c;    // L5
  } tds_samples_t;

  // Majority of the five samples: 1 when at least three of them are 1.
  function automatic logic maj5(input tds_samples_t s);
    logic [2:0] ones;
    ones = 3'(s.d_t_a) + 3'(s.d_tm1_a) + 3'(s.d_t_b) + 3'(s.d_tm1_b) + 3'(s.d_t_c);
    return ones >= 3'd3;
  endfunction

endpackage
