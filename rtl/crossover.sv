// crossover: mutation arithmetic of differential evolution,
//   v = x_r1 + F * (x_r2 - x_r3),
// computed as three dependent binary64 operations on one add/subtract unit
// and one multiplier, as in the two-stage scheme of the source design:
//   stage 1: R1 = x_r2 - x_r3 (adder), R2 = F * R1 (multiplier)
//   stage 2: v  = x_r1 + R2   (the same adder, fed back)
//
// Timing (22 cycles from the start cycle to the done cycle, the figure the
// source design gives): 1 operand-register cycle, 7 subtract, 1 cycle in
// the R1 register, 5 multiply, 7 add, 1 cycle in the output register. The
// split of the three non-arithmetic cycles is this design's choice.
//
// Interface: start (one-cycle pulse, ignored while busy) samples x_r1,
// x_r2, x_r3 and f. done pulses for one cycle when v is valid; v holds
// its value until the next result.
module crossover
  import dea_pkg::*;
#(
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp64_t x_r1,
  input  fp64_t x_r2,
  input  fp64_t x_r3,
  input  fp64_t f,
  output logic  busy,
  output logic  done,
  output fp64_t v
);
  typedef enum logic [2:0] {X_IDLE, X_SUB, X_WSUB, X_MUL, X_WMUL, X_WADD} state_e;
  state_e st;

  fp64_t r1_q, r2_q, r3_q, f_q, diff_q;
  logic  add_iv, add_ov, add_sub, mul_iv, mul_ov;
  fp64_t add_a, add_b, add_y, mul_y;

  fp64_addsub #(.LATENCY(ADD_LAT)) u_add (
    .clk, .rst_n, .in_valid(add_iv), .sub(add_sub), .a(add_a), .b(add_b),
    .out_valid(add_ov), .y(add_y)
  );
  fp64_mul #(.LATENCY(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(mul_iv), .a(f_q), .b(diff_q),
    .out_valid(mul_ov), .y(mul_y)
  );

  // the adder's operand multiplexers: stage 1 subtracts, stage 2 adds
  always_comb begin
    add_iv  = 1'b0;
    add_sub = 1'b1;
    add_a   = r2_q;
    add_b   = r3_q;
    if (st == X_SUB) add_iv = 1'b1;
    if (st == X_WMUL && mul_ov) begin
      add_iv  = 1'b1;
      add_sub = 1'b0;
      add_a   = r1_q;
      add_b   = mul_y;
    end
  end
  assign mul_iv = (st == X_MUL);
  assign busy   = (st != X_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st   <= X_IDLE;
      done <= 1'b0;
      v    <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        X_IDLE: if (start) begin
          r1_q <= x_r1; r2_q <= x_r2; r3_q <= x_r3; f_q <= f;
          st   <= X_SUB;
        end
        X_SUB:  st <= X_WSUB;
        X_WSUB: if (add_ov) begin
          diff_q <= add_y;
          st     <= X_MUL;
        end
        X_MUL:  st <= X_WMUL;
        X_WMUL: if (mul_ov) st <= X_WADD;
        X_WADD: if (add_ov) begin
          v    <= add_y;
          done <= 1'b1;
          st   <= X_IDLE;
        end
        default: st <= X_IDLE;
      endcase
    end
  end
endmodule
