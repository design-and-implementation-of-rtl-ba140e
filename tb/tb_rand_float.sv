// tb_rand_float: self-checking test of the random double generator. Every
// output must be a double in [1.0, 2.0) (sign 0, exponent 1023), its
// fraction must follow a 52-cell rule-90/150 model step by step, and the
// sample mean over 4000 draws must be close to 1.5.
module tb_rand_float;
  import dea_pkg::*;
  localparam logic [51:0] RULES = 52'hE_0D57_B02F_6ACC;
  logic clk = 0, rst_n = 0, en = 1;
  fp64_t r;
  int checks = 0, failures = 0;
  real sum = 0.0;

  rand_float #(.SEED(52'h0_1234_5678_9ABC)) dut (.clk, .rst_n, .en, .r);

  always #5 clk = ~clk;

  function automatic logic [51:0] model(logic [51:0] s);
    logic [51:0] q = '0;
    for (int i = 0; i < 52; i++) begin
      logic l, rt;
      l  = (i == 51) ? 1'b0 : s[i+1];
      rt = (i == 0)  ? 1'b0 : s[i-1];
      q[i] = l ^ rt ^ (RULES[i] & s[i]);
    end
    return q;
  endfunction

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s %h", m, r); end
  endtask

  initial begin
    logic [51:0] p;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(r == {12'h3FF, model(52'h0_1234_5678_9ABC)}, "seed");
    for (int n = 0; n < 4000; n++) begin
      p = r[51:0];
      @(posedge clk); #1;
      chk(r[63:52] == 12'h3FF, "range");
      chk(r[51:0] == model(p), "rule");
      chk($bitstoreal(r) >= 1.0 && $bitstoreal(r) < 2.0, "value");
      sum += $bitstoreal(r);
    end
    chk(sum / 4000.0 > 1.45 && sum / 4000.0 < 1.55, "mean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
