// tb_crossover: self-checking test of the mutation unit
// v = x_r1 + F*(x_r2 - x_r3). Random operands in [-100, 100) and F in
// [0, 2); the expected value is formed with the simulator's double
// arithmetic in the same order (subtract, multiply, add), so it must match
// bit for bit. The done pulse must come exactly 22 cycles after start.
module tb_crossover;
  import dea_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  fp64_t r1 = 0, r2 = 0, r3 = 0, f = 0, v;
  int checks = 0, failures = 0, cyc = 0;

  crossover dut (.clk, .rst_n, .start, .x_r1(r1), .x_r2(r2), .x_r3(r3), .f, .busy, .done, .v);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real rr(real lo, real hi);
    return lo + (hi - lo) * ($urandom % 1000000) / 1000000.0 + ($urandom % 1000) * 1.0e-9;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      real a1, a2, a3, ff;
      int  t0;
      fp64_t e;
      a1 = rr(-100, 100); a2 = rr(-100, 100); a3 = rr(-100, 100); ff = rr(0, 2);
      if (n == 0) a3 = a2;
      @(negedge clk);
      r1 = $realtobits(a1); r2 = $realtobits(a2); r3 = $realtobits(a3); f = $realtobits(ff);
      start = 1;
      t0 = cyc;
      @(negedge clk) start = 0;
      r1 = 0; r2 = 0; r3 = 0; f = 0;   // operands are sampled at start only
      while (!done) @(negedge clk);
      e = $realtobits(a1 + ff * (a2 - a3));
      checks++;
      if (v !== e || cyc - t0 != 22) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h exp=%h cycles=%0d", v, e, cyc - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
