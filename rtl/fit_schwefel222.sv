// fit_schwefel222: objective f2, Schwefel's problem 2.22,
//   f(x) = sum_j |x_j| + prod_j |x_j|.
//
// Datapath (after the source design): X feeds an absolute-value stage
// (sign bit cleared) that drives two accumulators in parallel: an
// add/subtract unit with register AC+ (initial 0.0) and a multiplier with
// register AC* (initial 1.0). After the last attribute the same adder forms
// Y = AC+ + AC*.
//
// The module drives idx = j and expects x = attribute j in the same cycle.
// One element is issued every PERIOD cycles (11, the per-attribute rate the
// source design reports; it must be at least ADD_LAT + 1). Latency from the
// start cycle to the done cycle: PERIOD*(D-1) + 2 + 2*ADD_LAT (= 11*D + 5 at
// the defaults). The issue schedule is this design's choice.
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_schwefel222
  import dea_pkg::*;
#(
  parameter int unsigned D       = 32,
  parameter int unsigned PERIOD  = 11,
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
  logic          issuing, issue, final_q;
  logic [IW-1:0] j;
  logic [7:0]    cnt;
  logic [IW:0]   nacc;
  fp64_t         acc_s, acc_p, xabs;
  logic          mul_ov, add_ov, add_iv, last_sum;
  fp64_t         mul_y, add_y, add_a, add_b;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);
  assign xabs  = fp_abs(x);
  // the accumulation of the last |x_j| completes in this cycle
  assign last_sum = add_ov && !final_q && (nacc == (IW+1)'(D - 1));

  // adder input: running sum while issuing, then AC+ + AC* once
  always_comb begin
    add_iv = issue;
    add_a  = acc_s;
    add_b  = xabs;
    if (last_sum) begin
      add_iv = 1'b1;
      add_a  = add_y;
      add_b  = acc_p;
    end
  end

  fp64_addsub #(.LATENCY(ADD_LAT)) u_sum (
    .clk, .rst_n, .in_valid(add_iv), .sub(1'b0), .a(add_a), .b(add_b),
    .out_valid(add_ov), .y(add_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_prod (
    .clk, .rst_n, .in_valid(issue), .a(acc_p), .b(xabs), .out_valid(mul_ov), .y(mul_y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; done <= 1'b0; final_q <= 1'b0;
      j <= '0; cnt <= '0; nacc <= '0; acc_s <= FP_ZERO; acc_p <= FP_ONE; fx <= FP_ZERO;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; issuing <= 1'b1; final_q <= 1'b0;
        j <= '0; cnt <= '0; nacc <= '0; acc_s <= FP_ZERO; acc_p <= FP_ONE;
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
        if (mul_ov) acc_p <= mul_y;
        if (add_ov && !final_q) begin
          acc_s <= add_y;
          nacc  <= nacc + 1'b1;
          if (last_sum) final_q <= 1'b1;
        end
        if (add_ov && final_q) begin
          fx <= add_y; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
        end
      end
    end
  end
endmodule
