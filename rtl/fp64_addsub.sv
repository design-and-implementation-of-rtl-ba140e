// fp64_addsub: pipelined binary64 adder/subtractor.
//
// y = a + b (sub = 0) or y = a - b (sub = 1), rounded to nearest-even with
// the arithmetic model of dea_pkg::fp_add. A new operation may be issued
// every cycle; its result leaves the pipeline LATENCY cycles later with
// out_valid set. The default latency of 7 cycles is the one given for the
// vendor add/subtract unit the source design uses; how that latency is
// spread over pipeline stages is this design's choice: the whole operation
// is computed in the issue cycle and then delayed by a register chain, which
// a synthesis tool with retiming can redistribute.
//
// Interface: in_valid/a/b/sub are sampled at the rising clock edge;
// out_valid/y are registered outputs. rst_n (active low, synchronous) clears
// the valid bits only.
module fp64_addsub
  import dea_pkg::*;
#(
  parameter int unsigned LATENCY = 7
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp64_t a,
  input  fp64_t b,
  output logic  out_valid,
  output fp64_t y
);
  fp64_t res;
  logic  vld_q [LATENCY];
  fp64_t res_q [LATENCY];

  always_comb res = sub ? fp_sub(a, b) : fp_add(a, b);

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
