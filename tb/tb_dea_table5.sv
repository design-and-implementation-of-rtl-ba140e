// tb_dea_table5: the two benchmark configurations, run on all six
// objectives with the crossover rates CR = 0.9, 0.2, 0.9, 0.8, 0.9, 0
// (cr = 115, 26, 115, 102, 115, 0) and F = 0.7, stop threshold 1e-12.
// Search intervals are the usual ones for this benchmark set: [-100, 100)
// for f1, f3, f4 and f6, [-10, 10) for f2 and [-30, 30) for f5.
//   - NP = 16, D = 4: each run goes until the threshold or 20,000
//     generations; the sphere function f1 must reach the threshold.
//   - NP = 128, D = 32 (the default build): each run is limited to 3
//     generations, as a full 20,000-generation run takes about 3e9 cycles;
//     the best fitness must be finite and positive.
// Each run's stored population is checked by dea_run_harness.
module tb_dea_table5;
  import dea_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  dea_run_harness #(.NP(16),  .D(4))  h_small (.clk, .rst_n);
  dea_run_harness #(.NP(128), .D(32)) h_full  (.clk, .rst_n);

  always #5 clk = ~clk;

  func_e fns   [6] = '{FN_SPHERE, FN_SCHWEFEL222, FN_SCHWEFEL12, FN_SCHWEFEL221, FN_ROSENBROCK, FN_STEP};
  int    crs   [6] = '{115, 26, 115, 102, 115, 0};
  real   bnd   [6] = '{100.0, 10.0, 100.0, 100.0, 30.0, 100.0};

  initial begin
    real best;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int k = 0; k < 6; k++) begin
      h_small.run(fns[k], crs[k], bnd[k], 1.0e-12, 20000, best);
      checks++;
      if (k == 0 && !(best < 1.0e-12)) begin failures++; $display("FAIL f1 did not reach 1e-12"); end
    end
    for (int k = 0; k < 6; k++) begin
      h_full.run(fns[k], crs[k], bnd[k], 1.0e-12, 3, best);
      checks++;
      if (!(best > 0.0 && best < 1.0e300)) begin failures++; $display("FAIL best not finite"); end
    end
    checks   += h_small.checks + h_full.checks;
    failures += h_small.failures + h_full.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
