// fp64_mul: pipelined binary64 multiplier.
//
// y = a * b, rounded to nearest-even with the arithmetic model of
// dea_pkg::fp_mul. A new operation may be issued every cycle; its result
// leaves the pipeline LATENCY cycles later with out_valid set. The default
// latency of 5 cycles is the one given for the vendor multiplier the source
// design uses; the stage split is this design's choice: the product is
// formed in the issue cycle and delayed by a register chain that a synthesis
// tool with retiming can redistribute.
//
// Interface: in_valid/a/b are sampled at the rising clock edge;
// out_valid/y are registered outputs. rst_n (active low, synchronous) clears
// the valid bits only.
module fp64_mul
  import dea_pkg::*;
#(
  parameter int unsigned LATENCY = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp64_t a,
  input  fp64_t b,
  output logic  out_valid,
  output fp64_t y
);
  fp64_t res;
  logic  vld_q [LATENCY];
  fp64_t res_q [LATENCY];

  always_comb res = fp_mul(a, b);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < LATENCY; k++) vld_q[k] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int k = 1; k < LATENCY; k++) vld_q[k] <= vld_q[k-1];
    end
  end

  always_ff @(posedge clk) begin
    res_q[0] <= res;
    for (int k = 1; k < LATENCY; k++) res_q[k] <= res_q[k-1];
  end

  assign out_valid = vld_q[LATENCY-1];
  assign y         = res_q[LATENCY-1];
endmodule
