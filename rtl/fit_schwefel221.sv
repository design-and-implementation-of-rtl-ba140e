// fit_schwefel221: objective f4, Schwefel's problem 2.21,
//   f(x) = max_j |x_j|.
//
// Datapath (after the source design): X feeds the register Xabs (|x|, sign
// bit cleared); a combinational comparator (fp64_comp) tests Xabs > Max
// and, when true, loads Xabs into the register Max, which is the result Y.
// No floating-point arithmetic is needed.
//
// The module drives idx = j and expects x = attribute j in the same cycle.
// One element is issued every PERIOD cycles (3, the per-attribute rate the
// source design reports; any PERIOD >= 1 works). Latency from the start
// cycle to the done cycle: PERIOD*(D-1) + 3 (= 3*D at the defaults).
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_schwefel221
  import dea_pkg::*;
#(
  parameter int unsigned D      = 32,
  parameter int unsigned PERIOD = 3,
  localparam int unsigned IW    = (D > 1) ? $clog2(D) : 1
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
  logic          issuing, issue, xv_q, gt;
  logic [IW-1:0] j;
  logic [7:0]    cnt;
  logic [IW:0]   nacc;
  fp64_t         xabs_q, max_q;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);

  fp64_comp u_cmp (.a(max_q), .b(xabs_q), .lt(gt));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; done <= 1'b0; xv_q <= 1'b0;
      j <= '0; cnt <= '0; nacc <= '0; xabs_q <= FP_ZERO; max_q <= FP_ZERO; fx <= FP_ZERO;
    end else begin
      done <= 1'b0;
      xv_q <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; issuing <= 1'b1;
        j <= '0; cnt <= '0; nacc <= '0; max_q <= FP_ZERO;
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
        if (issue) begin
          xabs_q <= fp_abs(x);
          xv_q   <= 1'b1;
        end
        if (xv_q) begin
          if (gt) max_q <= xabs_q;
          nacc <= nacc + 1'b1;
          if (nacc == (IW+1)'(D - 1)) begin
            fx <= gt ? xabs_q : max_q; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
