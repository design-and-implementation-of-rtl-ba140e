// tb_dea_top: end-to-end test of the differential-evolution engine at
// NP = 8, D = 4. Seven runs cover all six objectives, CR = 0.9 and CR = 0,
// and both stop conditions (generation limit and error threshold).
// During each run it checks, against models written here:
//   - every initial attribute lies in [x_min, x_max);
//   - r1, r2, r3 are distinct and differ from i;
//   - every mutant equals x_r1 + F*(x_r2 - x_r3) formed from the population
//     words in double arithmetic, and every copied attribute equals x_i,j;
//   - every evaluated fitness equals the objective recomputed here;
//   - selection replaces exactly when f(trial) <= f(x_i);
//   - the best fitness never increases.
// After each run it reads the population back through the read port and
// checks every stored fitness, best_fx/best_idx and the generation count.
// Each mechanism (index redraw, mutate, copy, forced jrand mutation,
// replace, reject, new best, both stops, each objective) must occur.
module tb_dea_top;
  import dea_pkg::*;
  localparam int NP = 8, D = 4;
  localparam int NW = $clog2(NP), DW = $clog2(D);

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  func_e func_sel = FN_SPHERE;
  logic [6:0] cr = 0;
  fp64_t f = 0, x_min = 0, x_max = 0, min_error = 0, best_fx, rd_x, rd_fx;
  logic [31:0] max_gen = 0, gen_count;
  logic [NW-1:0] best_idx, rd_i = 0;
  logic [DW-1:0] rd_j = 0;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_redraw = 0, n_mutate = 0, n_copy = 0, n_forced = 0, n_replace = 0,
      n_reject = 0, n_best = 0, n_stop_err = 0, n_stop_gen = 0;
  int n_func [6];

  dea_top #(.NP(NP), .D(D)) dut (
    .clk, .rst_n, .start, .func_sel, .cr, .f, .x_min, .x_max, .min_error, .max_gen,
    .busy, .done, .best_fx, .best_idx, .gen_count, .rd_i, .rd_j, .rd_x, .rd_fx
  );

  always #5 clk = ~clk;

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  function automatic real fabs(real v);
    return (v < 0) ? -v : v;
  endfunction

  // objectives in the datapath's operation order
  function automatic real objective(func_e fn, real v [D]);
    real r, a, s, p, t, h, m;
    r = 0.0;
    case (fn)
      FN_SPHERE: for (int k = 0; k < D; k++) r = r + v[k] * v[k];
      FN_SCHWEFEL222: begin
        s = 0.0; p = 1.0;
        for (int k = 0; k < D; k++) begin s = s + fabs(v[k]); p = p * fabs(v[k]); end
        r = s + p;
      end
      FN_SCHWEFEL12: begin
        a = 0.0;
        for (int k = 0; k < D; k++) begin a = a + v[k]; r = r + a * a; end
      end
      FN_SCHWEFEL221: for (int k = 0; k < D; k++) if (fabs(v[k]) > r) r = fabs(v[k]);
      FN_ROSENBROCK: for (int k = 1; k < D; k++) begin
        t = v[k] - v[k-1] * v[k-1];
        h = 100.0 * (t * t);
        m = v[k-1] - 1.0;
        s = h + m * m;
        r = r + fabs(s);
      end
      default: for (int k = 0; k < D; k++) begin
        h = fabs(v[k] + 0.5);
        r = r + h * h;
      end
    endcase
    return r;
  endfunction

  function automatic real pm(int i, int j);
    return $bitstoreal(dut.u_pmem.mem[i * D + j]);
  endfunction

  // ---------------- monitors on the engine's control flow ----------------
  real last_best;
  logic run_active = 0;
  always @(posedge clk) if (rst_n && run_active) begin
    real u [D];
    // initial population in range
    if (dut.st == S_INIT_XW && dut.xo_done)
      chk($bitstoreal(dut.xo_v) >= $bitstoreal(x_min) && $bitstoreal(dut.xo_v) < $bitstoreal(x_max),
          "initial value out of range");
    // index draws
    if ((dut.st == S_SEL_R1 || dut.st == S_SEL_R2 || dut.st == S_SEL_R3) &&
        !(dut.rnp != dut.i_q && (dut.st == S_SEL_R1 || (dut.rnp != dut.r1_q &&
          (dut.st == S_SEL_R2 || dut.rnp != dut.r2_q)))))
      n_redraw++;
    if (dut.st == S_JRAND)
      chk(dut.r1_q != dut.i_q && dut.r2_q != dut.i_q && dut.r3_q != dut.i_q &&
          dut.r1_q != dut.r2_q && dut.r1_q != dut.r3_q && dut.r2_q != dut.r3_q,
          "r1/r2/r3 not distinct");
    // crossover decision
    if (dut.st == S_DEC) begin
      if (dut.mutate) begin
        n_mutate++;
        if (!(dut.rcr_state < cr)) n_forced++;
      end else begin
        n_copy++;
        chk(dut.pm_y == dut.u_pmem.mem[dut.i_q * D + dut.j_q], "copied attribute");
      end
    end
    if (dut.st == S_XO_W && dut.xo_done) begin
      real e;
      e = pm(dut.r1_q, dut.j_q) + $bitstoreal(f) * (pm(dut.r2_q, dut.j_q) - pm(dut.r3_q, dut.j_q));
      chk(dut.xo_v == $realtobits(e), "mutant value");
    end
    // evaluation and selection
    if ((dut.st == S_FIT_W || dut.st == S_INIT_FITW) && dut.fit_done) begin
      for (int k = 0; k < D; k++) u[k] = $bitstoreal(dut.u_q[k]);
      chk(dut.fit_fx == $realtobits(objective(func_sel, u)), "fitness value");
    end
    if (dut.st == S_SELECT) begin
      logic repl;
      repl = $bitstoreal(dut.fu_q) <= $bitstoreal(dut.fm_y);
      chk(repl == !dut.cmp_lt, "selection decision");
      if (repl) n_replace++; else n_reject++;
    end
    if (dut.st == S_BEST && dut.cmp_lt) n_best++;
    if (dut.st == S_NEXT_I && dut.i_q == NW'(NP - 1)) begin
      chk($bitstoreal(best_fx) <= last_best, "best fitness increased");
      last_best = $bitstoreal(best_fx);
    end
  end

  task automatic run(func_e fn, int crv, real lo, real hi, real err, int gens);
    real fx_all [NP];
    real v [D];
    real mn;
    @(negedge clk);
    func_sel = fn; cr = 7'(crv); f = $realtobits(0.7);
    x_min = $realtobits(lo); x_max = $realtobits(hi);
    min_error = $realtobits(err); max_gen = gens;
    last_best = 1.0e300;
    run_active = 1;
    start = 1;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    run_active = 0;
    n_func[fn]++;
    // result checks through the read port
    mn = 1.0e300;
    for (int i = 0; i < NP; i++) begin
      for (int j = 0; j < D; j++) begin
        rd_i = NW'(i); rd_j = DW'(j);
        @(negedge clk);
        v[j] = $bitstoreal(rd_x);
      end
      fx_all[i] = $bitstoreal(rd_fx);
      chk(rd_fx == $realtobits(objective(fn, v)), "stored fitness");
      if (fx_all[i] < mn) mn = fx_all[i];
    end
    chk($bitstoreal(best_fx) == mn, "best_fx is the population minimum");
    chk(fx_all[best_idx] == mn, "best_idx points at the minimum");
    if ($bitstoreal(best_fx) < err) begin
      n_stop_err++;
      chk(gen_count <= gens, "generation count on error stop");
    end else begin
      n_stop_gen++;
      chk(gen_count == gens, "generation count on limit stop");
    end
    $display("run fn=%0d gens=%0d best=%g", fn, gen_count, $bitstoreal(best_fx));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(FN_SPHERE,      115, -5.0, 5.0, 1.0e-12, 40);
    run(FN_SCHWEFEL222,  26, -5.0, 5.0, 1.0e-12, 20);
    run(FN_SCHWEFEL12,  115, -5.0, 5.0, 1.0e-12, 20);
    run(FN_SCHWEFEL221, 102, -5.0, 5.0, 1.0e-12, 20);
    run(FN_ROSENBROCK,  115, -2.0, 2.0, 1.0e-12, 20);
    run(FN_STEP,          0, -5.0, 5.0, 1.0e-12, 20);
    run(FN_SCHWEFEL221, 102, -5.0, 5.0, 3.0, 200);     // stops on the error threshold
    chk(n_redraw > 0,   "no index redraw happened");
    chk(n_mutate > 0,   "no mutation happened");
    chk(n_copy > 0,     "no attribute copy happened");
    chk(n_forced > 0,   "no forced jrand mutation happened");
    chk(n_replace > 0,  "no replacement happened");
    chk(n_reject > 0,   "no rejection happened");
    chk(n_best > 0,     "no best update happened");
    chk(n_stop_err > 0, "no stop on error threshold");
    chk(n_stop_gen > 0, "no stop on generation limit");
    for (int k = 0; k < 6; k++) chk(n_func[k] > 0, "objective not exercised");
    $display("events: redraw=%0d mutate=%0d copy=%0d forced=%0d replace=%0d reject=%0d best=%0d stop_err=%0d stop_gen=%0d",
             n_redraw, n_mutate, n_copy, n_forced, n_replace, n_reject, n_best, n_stop_err, n_stop_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
