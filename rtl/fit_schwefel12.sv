// fit_schwefel12: objective f3, Schwefel's problem 1.2,
//   f(x) = sum_i ( sum_{j<=i} x_j )^2.
//
// Datapath (after the source design): an add/subtract unit with register
// AC1 forms the running prefix sum, a multiplier squares each new prefix
// sum, and a second add/subtract unit with register AC2 accumulates the
// squares; AC2 is the result Y.
//
// The module drives idx = j and expects x = attribute j in the same cycle.
// One element is issued every PERIOD cycles (12, the per-attribute rate the
// source design reports; it must be at least ADD_LAT + 1). Latency from the
// start cycle to the done cycle: PERIOD*(D-1) + 2 + 2*ADD_LAT + MUL_LAT
// (= 12*D + 9 at the defaults). The issue schedule is this design's choice.
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_schwefel12
  import dea_pkg::*;
#(
  parameter int unsigned D       = 32,
  parameter int unsigned PERIOD  = 12,
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5,
  localparam int unsigned IW     = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fp64_t         x,
  output logic [IW-1:0] idx,
  output logic          busy,
  output logic          done,
  output fp64_t         fx
);
  logic          issuing, issue;
  logic [IW-1:0] j;
  logic [7:0]    cnt;
  logic [IW:0]   nacc;
  fp64_t         acc1, acc2;
  logic          a1_ov, mul_ov, a2_ov;
  fp64_t         a1_y, mul_y, a2_y;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);

  fp64_addsub #(.LATENCY(ADD_LAT)) u_ac1 (
    .clk, .rst_n, .in_valid(issue), .sub(1'b0), .a(acc1), .b(x),
    .out_valid(a1_ov), .y(a1_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_sq (
    .clk, .rst_n, .in_valid(a1_ov), .a(a1_y), .b(a1_y), .out_valid(mul_ov), .y(mul_y)
  );
  fp64_addsub #(.LATENCY(ADD_LAT)) u_ac2 (
    .clk, .rst_n, .in_valid(mul_ov), .sub(1'b0), .a(acc2), .b(mul_y),
    .out_valid(a2_ov), .y(a2_y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; done <= 1'b0;
      j <= '0; cnt <= '0; nacc <= '0; acc1 <= FP_ZERO; acc2 <= FP_ZERO; fx <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; issuing <= 1'b1;
        j <= '0; cnt <= '0; nacc <= '0; acc1 <= FP_ZERO; acc2 <= FP_ZERO;
      end else if (busy) begin
        if (issuing) begin
          if (cnt == 8'(PERIOD - 1)) begin
            cnt <= '0;
            if (j == IW'(D - 1)) issuing <= 1'b0;
            else                 j <= j + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        if (a1_ov) acc1 <= a1_y;
        if (a2_ov) begin
          acc2 <= a2_y;
          nacc <= nacc + 1'b1;
          if (nacc == (IW+1)'(D - 1)) begin
            fx <= a2_y; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
