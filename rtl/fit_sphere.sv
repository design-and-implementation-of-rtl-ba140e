// fit_sphere: objective f1, the sphere function  f(x) = sum_j x_j^2.
//
// Datapath (after the source design): the element register X feeds a
// multiplier that squares it, and an add/subtract unit accumulates the
// squares in the register AC, whose value is the result Y.
//
// The module walks the D attributes of one individual. It drives idx = j
// and expects x to be attribute j in the same cycle (combinational read of
// the offspring register file). One element is issued every PERIOD cycles;
// PERIOD = 8 is the per-attribute rate the source design reports, and it
// must be at least ADD_LAT + 1 so that each addition sees the updated AC.
// Latency from the start cycle to the done cycle: PERIOD*(D-1) + 2 +
// MUL_LAT + ADD_LAT (= 8*D + 6 at the defaults). The issue schedule is this
// design's choice.
//
// Interface: start is a one-cycle pulse (ignored while busy); done pulses
// for one cycle and fx then holds f(x) until the next start.
module fit_sphere
  import dea_pkg::*;
#(
  parameter int unsigned D       = 32,
  parameter int unsigned PERIOD  = 8,
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
  fp64_t         acc;
  logic          mul_ov, add_ov;
  fp64_t         mul_y, add_y;

  assign idx   = j;
  assign issue = issuing && (cnt == 8'd0);

  fp64_mul #(.LATENCY(MUL_LAT)) u_sq (
    .clk, .rst_n, .in_valid(issue), .a(x), .b(x), .out_valid(mul_ov), .y(mul_y)
  );
  fp64_addsub #(.LATENCY(ADD_LAT)) u_acc (
    .clk, .rst_n, .in_valid(mul_ov), .sub(1'b0), .a(acc), .b(mul_y),
    .out_valid(add_ov), .y(add_y)
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
        if (add_ov) begin
          acc  <= add_y;
          nacc <= nacc + 1'b1;
          if (nacc == (IW+1)'(D - 1)) begin
            fx <= add_y; done <= 1'b1; busy <= 1'b0; issuing <= 1'b0;
          end
        end
      end
    end
  end
endmodule
