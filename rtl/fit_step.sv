// fit_step: objective f6, the step function as built by the source design,
//   f(x) = sum_j |x_j + 0.5|^2.
//
// Datapath (after the source design): X and the constant 0.5 feed an
// add/subtract unit, its absolute value is squared by a multiplier, and a
// second add/subtract unit with register AC accumulates the squares; AC is
// the result Y. The datapath has no rounding to an integer (no floor
// stage), so the function is continuous; that follows the block diagram of
// the source design.
//
// The module drives idx = j and expects x = attribute j in the same cycle.
// One element is issued every PERIOD cycles (12, the per-attribute rate the
// source design reports; it must be at least ADD_LAT + 1). Latency from the
// start cycle to the done cycle: PERIOD*(D-1) + 2 + 2*ADD_LAT + MUL_LAT
// (= 12*D + 9 at the defaults). The issue schedule is this design's choice.
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_step
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
  fp64_t         acc, habs;
  logic          h_ov, mul_ov, ac_ov;
  fp64_t         h_y, mul_y, ac_y;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);
  assign habs  = fp_abs(h_y);

  fp64_addsub #(.LATENCY(ADD_LAT)) u_half (
    .clk, .rst_n, .in_valid(issue), .sub(1'b0), .a(x), .b(FP_HALF),
    .out_valid(h_ov), .y(h_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_sq (
    .clk, .rst_n, .in_valid(h_ov), .a(habs), .b(habs), .out_valid(mul_ov), .y(mul_y)
  );
  fp64_addsub #(.LATENCY(ADD_LAT)) u_ac (
    .clk, .rst_n, .in_valid(mul_ov), .sub(1'b0), .a(acc), .b(mul_y),
    .out_valid(ac_ov), .y(ac_y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; done <= 1'b0;
      j <= '0; cnt <= '0; nacc <= '0; acc <= FP_ZERO; fx <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; issuing <= 1'b1;
        j <= '0; cnt <= '0; nacc <= '0; acc <= FP_ZERO;
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
        if (ac_ov) begin
          acc  <= ac_y;
          nacc <= nacc + 1'b1;
          if (nacc == (IW+1)'(D - 1)) begin
            fx <= ac_y; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
