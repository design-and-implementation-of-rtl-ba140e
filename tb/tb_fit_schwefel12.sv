// tb_fit_schwefel12: self-checking test of objective f3, Schwefel 1.2 (fit_schwefel12) at D = 5.
// Random attribute vectors (values in [-10, 10), some near 1.0) are
// presented through the idx/x read port; the expected value is computed
// here with the simulator's double arithmetic in the same operation order
// as the datapath, so it must match bit for bit. The cycle count from the
// start cycle to the done cycle must be 12*D + 9.
module tb_fit_schwefel12;
  import dea_pkg::*;
  localparam int D   = 5;
  localparam int LAT = 12 * D + 9;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [$clog2(D)-1:0] idx;
  fp64_t fx, x;
  real vec [D];
  int checks = 0, failures = 0, cyc = 0;

  fit_schwefel12 #(.D(D)) dut (.clk, .rst_n, .start, .x, .idx, .busy, .done, .fx);

  assign x = $realtobits(vec[idx]);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real ref_f();
    real r;
    real a;
    a = 0.0; r = 0.0;
    for (int k = 0; k < D; k++) begin
      a = a + vec[k];
      r = r + a * a;
    end
    return r;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      int t0;
      fp64_t e;
      for (int k = 0; k < D; k++) begin
        vec[k] = -10.0 + 20.0 * ($urandom % 1000000) / 1000000.0 + ($urandom % 997) * 1.0e-9;
        if (n % 4 == 1) vec[k] = 1.0 + ($urandom % 1000) * 1.0e-4 - 0.05;
      end
      @(negedge clk) start = 1;
      t0 = cyc;
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      e = $realtobits(ref_f());
      checks++;
      if (fx !== e || cyc - t0 != LAT) begin
        failures++;
        if (failures < 10) $display("FAIL fx=%h exp=%h cycles=%0d", fx, e, cyc - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * (LAT + 10) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
