// fp64_comp: combinational binary64 comparator.
//
// lt = (a < b) in IEEE order: -0 and +0 are equal and any NaN operand gives
// 0. Like the comparator of the source design it is purely combinational
// (no clock): because binary64 is sign-magnitude with the exponent above
// the fraction, the magnitudes compare as unsigned integers and only the
// signs need extra logic.
module fp64_comp
  import dea_pkg::*;
(
  input  fp64_t a,
  input  fp64_t b,
  output logic  lt
);
  always_comb lt = fp_lt(a, b);
endmodule
