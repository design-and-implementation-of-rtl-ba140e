// rand_float: random binary64 generator (Randf).
//
// A 52-cell rule-90/150 cellular automaton (ca_rng) supplies the fraction
// bits of a double whose sign is 0 and exponent is 1023, so every output
// lies in [1.0, 2.0) and takes one of 2^52 - 1 equally spaced values (the
// all-zero fraction never occurs). The engine maps it onto the search
// interval as x = x_min + (r - 1.0) * (x_max - x_min) with the crossover
// datapath, which has exactly the form x_r1 + F * (x_r2 - x_r3).
// That a CA-based generator supplies the initial attribute values follows
// the source design; the [1,2) construction and the mapping through the
// crossover unit are this design's choices.
//
// Interface: 'r' is valid at all times and advances on every clock with
// 'en' high.
module rand_float
  import dea_pkg::*;
#(
  parameter logic [51:0] SEED = 52'h0_1234_5678_9ABC
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  output fp64_t r
);
  logic [51:0] cells;

  // primitive rule vector for 52 cells (bit i = 1: cell i follows rule 150)
  ca_rng #(.CELLS(52), .RULES(52'hE_0D57_B02F_6ACC), .SEED(SEED)) u_ca (
    .clk, .rst_n, .en, .state(cells)
  );

  assign r = {1'b0, 11'd1023, cells};
endmodule
