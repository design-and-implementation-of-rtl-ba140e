// tb_fp64_mul: self-checking test of the pipelined binary64 multiplier.
// Issues one operation per cycle (random normal operands of mixed signs and
// exponents, squares and zero operands) and
// compares every result with the simulator's own double arithmetic, which
// rounds to nearest-even. Also checks that each result appears exactly
// LATENCY cycles after issue.
module tb_fp64_mul;
  import dea_pkg::*;
  localparam int LAT = 5;
  localparam int N   = 4000;
  logic clk = 0, rst_n = 0, iv = 0, sub = 0, ov;
  fp64_t a = 0, b = 0, y;
  int checks = 0, failures = 0, cyc = 0;
  fp64_t exp_q [$];
  int    t_q   [$];

  fp64_mul #(.LATENCY(LAT)) dut (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(ov), .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp64_t rnd_fp(int espan);
    logic [10:0] e;
    e = 11'(1023 - espan + int'($urandom % (2 * espan + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  always @(posedge clk) if (rst_n && ov) begin
    fp64_t e; int t;
    e = exp_q.pop_front(); t = t_q.pop_front();
    checks++;
    if (y !== e || cyc - t != LAT) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h lat %0d", y, e, cyc - t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < N; n++) begin
      fp64_t ta, tb_;
      logic  ts;
      ta = rnd_fp((n % 3 == 0) ? 60 : 4);
      tb_ = rnd_fp((n % 3 == 0) ? 60 : 4);
      ts = 1'($urandom);
      if (n % 7 == 1) tb_ = {tb_[63], ta[62:20], tb_[19:0]};   // heavy cancellation
      if (n % 11 == 2) tb_ = ta;                              // x - x, x + x
      if (n % 13 == 3) tb_ = 64'd0;                           // zero operand
      @(negedge clk);
      iv = 1; a = ta; b = tb_; sub = ts;
      exp_q.push_back($realtobits($bitstoreal(ta) * $bitstoreal(tb_)));
      t_q.push_back(cyc);
    end
    @(negedge clk) iv = 0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
