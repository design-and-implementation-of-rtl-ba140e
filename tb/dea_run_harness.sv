// dea_run_harness: test harness around one dea_top instance of size NP x D.
// Its task run() starts one optimisation run with the given objective,
// crossover rate (x128), search bound (+-bound), error threshold and
// generation limit, waits for done, then reads the whole population back
// through the read port and checks that every stored fitness equals the
// objective recomputed here in double arithmetic, that best_fx is the
// population minimum at best_idx, and that the run stopped for a valid
// reason. It keeps its own check and failure counts and prints one line
// per run with the generation and cycle counts.
module dea_run_harness
  import dea_pkg::*;
#(
  parameter int NP = 16,
  parameter int D  = 4
) (
  input logic clk,
  input logic rst_n
);
  localparam int NW = $clog2(NP), DW = $clog2(D);

  logic start = 0, busy, done;
  func_e func_sel = FN_SPHERE;
  logic [6:0] cr = 0;
  fp64_t f = 0, x_min = 0, x_max = 0, min_error = 0, best_fx, rd_x, rd_fx;
  logic [31:0] max_gen = 0, gen_count;
  logic [NW-1:0] best_idx, rd_i = 0;
  logic [DW-1:0] rd_j = 0;
  int checks = 0, failures = 0;

  dea_top #(.NP(NP), .D(D)) dut (
    .clk, .rst_n, .start, .func_sel, .cr, .f, .x_min, .x_max, .min_error, .max_gen,
    .busy, .done, .best_fx, .best_idx, .gen_count, .rd_i, .rd_j, .rd_x, .rd_fx
  );

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s (NP=%0d D=%0d)", m, NP, D); end
  endtask

  function automatic real fabs(real v);
    return (v < 0) ? -v : v;
  endfunction

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

  task automatic run(func_e fn, int crv, real bound, real err, int gens, output real best);
    real v [D];
    real mn, fxi;
    int cycles;
    @(negedge clk);
    func_sel = fn; cr = 7'(crv); f = $realtobits(0.7);
    x_min = $realtobits(-bound); x_max = $realtobits(bound);
    min_error = $realtobits(err); max_gen = gens;
    start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    mn = 1.0e300;
    for (int i = 0; i < NP; i++) begin
      for (int j = 0; j < D; j++) begin
        rd_i = NW'(i); rd_j = DW'(j);
        @(negedge clk);
        v[j] = $bitstoreal(rd_x);
      end
      fxi = $bitstoreal(rd_fx);
      chk(rd_fx == $realtobits(objective(fn, v)), "stored fitness");
      if (fxi < mn) mn = fxi;
      if (i == int'(best_idx)) chk(fxi == $bitstoreal(best_fx), "best_idx");
    end
    chk($bitstoreal(best_fx) == mn, "best_fx is the population minimum");
    chk($bitstoreal(best_fx) < err || gen_count == gens, "stop reason");
    best = $bitstoreal(best_fx);
    $display("NP=%0d D=%0d f%0d: CR=%0d/128 generations=%0d best=%g cycles=%0d",
             NP, D, int'(fn) + 1, crv, gen_count, best, cycles);
  endtask
endmodule
