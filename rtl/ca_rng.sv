// ca_rng: cellular-automaton pseudo-random number generator.
//
// A one-dimensional row of CELLS cells with null (zero) boundaries. Each
// cell follows one of two rules per clock:
//   rule 90 : a_i(t+1) = a_{i-1}(t) ^ a_{i+1}(t)
//   rule 150: a_i(t+1) = a_{i-1}(t) ^ a_i(t) ^ a_{i+1}(t)
// RULES[i] = 1 selects rule 150 for cell i. The two rules are those of the
// source design; the rule vector is this design's choice, picked so that
// the characteristic polynomial of the automaton is primitive over GF(2):
// the state then runs through all 2^CELLS - 1 non-zero values before it
// repeats. The default (CELLS = 4, 4'hB) is such a vector.
//
// Interface: 'state' is the current value; it advances on every clock with
// 'en' high. Reset loads SEED, which must be non-zero.
module ca_rng #(
  parameter int unsigned       CELLS = 4,
  parameter logic [CELLS-1:0]  RULES = CELLS'(4'hB),
  parameter logic [CELLS-1:0]  SEED  = CELLS'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [CELLS-1:0] state
);
  logic [CELLS-1:0] nxt;

  always_comb begin
    for (int i = 0; i < CELLS; i++) begin
      logic left, right;
      left   = (i + 1 < CELLS) ? state[(i + 1) % CELLS] : 1'b0;
      right  = (i > 0)         ? state[(i + CELLS - 1) % CELLS] : 1'b0;
      nxt[i] = left ^ right ^ (RULES[i] & state[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= nxt;
  end
endmodule
