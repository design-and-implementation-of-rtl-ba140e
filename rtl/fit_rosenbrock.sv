// fit_rosenbrock: objective f5, the generalized Rosenbrock function over
// consecutive attribute pairs,
//   f(x) = sum_{j=1}^{D-1} | 100*(x_j - x_{j-1}^2)^2 + (x_{j-1} - 1)^2 |.
//
// Datapath (after the source design, eight units): the previous attribute
// x_{j-1} is squared (multiplier) and subtracted from x_j (add/subtract);
// the difference is squared and scaled by 100 (two multipliers). In a
// parallel branch x_{j-1} - 1 is formed and squared; its result waits in
// the register Delay2 until the upper branch catches up. The two branches
// are added, the absolute value is taken, and an add/subtract unit with
// register AC accumulates it; AC is the result Y. x_j waits in Delay1 while
// x_{j-1}^2 is computed.
//
// The module drives idx = j and expects x = attribute j in the same cycle.
// One element is issued every PERIOD cycles (17, the per-attribute rate
// the source design reports). PERIOD must be at least ADD_LAT + MUL_LAT
// (so Delay2 is read before it is overwritten) and at least ADD_LAT + 1.
// Element 0 only loads the x_{j-1} register. Latency from the start cycle
// to the done cycle: PERIOD*(D-1) + 2 + 3*ADD_LAT + 3*MUL_LAT (= 17*D + 21
// at the defaults). D must be at least 2. The schedule is this design's
// choice.
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_rosenbrock
  import dea_pkg::*;
#(
  parameter int unsigned D       = 32,
  parameter int unsigned PERIOD  = 17,
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
  logic          issuing, issue, pair;
  logic [IW-1:0] j;
  logic [7:0]    cnt;
  logic [IW:0]   nacc;
  fp64_t         prev_q, delay1_q, delay2_q, acc;

  logic  sq_ov, t_ov, t2_ov, h_ov, m_ov, m2_ov, s_ov, ac_ov;
  fp64_t sq_y, t_y, t2_y, h_y, m_y, m2_y, s_y, ac_y;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);
  assign pair  = issue && (j != '0);

  // upper branch: 100 * (x_j - x_{j-1}^2)^2
  fp64_mul #(.LATENCY(MUL_LAT)) u_sq (
    .clk, .rst_n, .in_valid(pair), .a(prev_q), .b(prev_q), .out_valid(sq_ov), .y(sq_y)
  );
  fp64_addsub #(.LATENCY(ADD_LAT)) u_t (
    .clk, .rst_n, .in_valid(sq_ov), .sub(1'b1), .a(delay1_q), .b(sq_y),
    .out_valid(t_ov), .y(t_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_t2 (
    .clk, .rst_n, .in_valid(t_ov), .a(t_y), .b(t_y), .out_valid(t2_ov), .y(t2_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_h (
    .clk, .rst_n, .in_valid(t2_ov), .a(FP_HUNDRED), .b(t2_y), .out_valid(h_ov), .y(h_y)
  );
  // lower branch: (x_{j-1} - 1)^2
  fp64_addsub #(.LATENCY(ADD_LAT)) u_m (
    .clk, .rst_n, .in_valid(pair), .sub(1'b1), .a(prev_q), .b(FP_ONE),
    .out_valid(m_ov), .y(m_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_m2 (
    .clk, .rst_n, .in_valid(m_ov), .a(m_y), .b(m_y), .out_valid(m2_ov), .y(m2_y)
  );
  // join, absolute value, accumulate
  fp64_addsub #(.LATENCY(ADD_LAT)) u_s (
    .clk, .rst_n, .in_valid(h_ov), .sub(1'b0), .a(h_y), .b(delay2_q),
    .out_valid(s_ov), .y(s_y)
  );
  fp64_addsub #(.LATENCY(ADD_LAT)) u_ac (
    .clk, .rst_n, .in_valid(s_ov), .sub(1'b0), .a(acc), .b(fp_abs(s_y)),
    .out_valid(ac_ov), .y(ac_y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0; issuing <= 1'b0; done <= 1'b0;
      j <= '0; cnt <= '0; nacc <= '0; acc <= FP_ZERO; fx <= FP_ZERO;
      prev_q <= FP_ZERO; delay1_q <= FP_ZERO; delay2_q <= FP_ZERO;
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
        if (issue) begin
          prev_q   <= x;
          delay1_q <= x;
        end
        if (m2_ov) delay2_q <= m2_y;
        if (ac_ov) begin
          acc  <= ac_y;
          nacc <= nacc + 1'b1;
          if (nacc == (IW+1)'(D - 2)) begin
            fx <= ac_y; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
