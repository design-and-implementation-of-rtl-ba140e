// tb_fp64_comp: self-checking test of the combinational binary64
// comparator against the simulator's real '<' on random operands (random
// signs, near and far exponents, equal values, +0/-0 and infinities).
module tb_fp64_comp;
  import dea_pkg::*;
  fp64_t a, b;
  logic  lt;
  int checks = 0, failures = 0;

  fp64_comp dut (.a, .b, .lt);

  function automatic fp64_t rnd_fp();
    return {1'($urandom), 11'(1020 + $urandom % 8), 20'($urandom), 32'($urandom)};
  endfunction

  task automatic check(fp64_t ta, fp64_t tb_);
    logic e;
    a = ta; b = tb_;
    #1;
    e = ($bitstoreal(ta) < $bitstoreal(tb_));
    checks++;
    if (lt !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h < %h got %b", ta, tb_, lt);
    end
  endtask

  initial begin
    check(64'h0000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h8000_0000_0000_0000, 64'h0000_0000_0000_0000);
    check(FP_INF, FP_ONE);
    check({1'b1, FP_INF[62:0]}, FP_ONE);
    check(FP_ONE, FP_INF);
    for (int n = 0; n < 5000; n++) begin
      fp64_t x, z;
      x = rnd_fp(); z = rnd_fp();
      if (n % 5 == 0) z = x;
      if (n % 5 == 1) z = {~x[63], x[62:0]};
      if (n % 5 == 2) z = {x[63:8], 8'($urandom)};
      check(x, z);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
