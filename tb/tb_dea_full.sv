// tb_dea_full: the engine at its default size (NP = 128 individuals,
// D = 32 attributes) taken through one complete optimisation run on the
// sphere objective f1 with CR = 0.9 (cr = 115), F = 0.7, search interval
// [-100, 100) and a limit of 10 generations. Afterwards every individual is
// read back through the read port; each stored fitness must equal the
// sphere function recomputed here in double arithmetic, best_fx must be
// the population minimum at best_idx, and the generation count must be 10.
// It also checks that the best fitness after the run is better than the
// best of the initial population.
module tb_dea_full;
  import dea_pkg::*;
  localparam int NP = 128, D = 32;
  localparam int NW = $clog2(NP), DW = $clog2(D);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  func_e func_sel = FN_SPHERE;
  logic [6:0] cr = 7'd115;
  fp64_t f, x_min, x_max, min_error, best_fx, rd_x, rd_fx;
  logic [31:0] max_gen = 32'd10, gen_count;
  logic [NW-1:0] best_idx, rd_i = 0;
  logic [DW-1:0] rd_j = 0;
  int checks = 0, failures = 0;
  real init_best = 0.0;

  dea_top dut (
    .clk, .rst_n, .start, .func_sel, .cr, .f, .x_min, .x_max, .min_error, .max_gen,
    .busy, .done, .best_fx, .best_idx, .gen_count, .rd_i, .rd_j, .rd_x, .rd_fx
  );

  always #5 clk = ~clk;

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  // best fitness when the initial population is complete
  always @(posedge clk)
    if (dut.st == S_CHECK && gen_count == 0) init_best = $bitstoreal(best_fx);

  initial begin
    real mn, s, v;
    real fx_all [NP];
    int cycles;
    f = $realtobits(0.7);
    x_min = $realtobits(-100.0);
    x_max = $realtobits(100.0);
    min_error = $realtobits(1.0e-12);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    mn = 1.0e300;
    for (int i = 0; i < NP; i++) begin
      s = 0.0;
      for (int j = 0; j < D; j++) begin
        rd_i = NW'(i); rd_j = DW'(j);
        @(negedge clk);
        v = $bitstoreal(rd_x);
        s = s + v * v;
      end
      fx_all[i] = $bitstoreal(rd_fx);
      chk(rd_fx == $realtobits(s), "stored fitness");
      if (fx_all[i] < mn) mn = fx_all[i];
    end
    chk($bitstoreal(best_fx) == mn, "best_fx is the population minimum");
    chk(fx_all[best_idx] == mn, "best_idx points at the minimum");
    chk(gen_count == 10, "generation count");
    chk(init_best > 0.0 && $bitstoreal(best_fx) < init_best, "best did not improve");
    $display("run: %0d cycles, initial best %g, final best %g", cycles, init_best, $bitstoreal(best_fx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
