// dea_top: differential-evolution optimiser in binary64 arithmetic.
//
// The engine minimises one of six benchmark objectives over D real
// variables with a population of NP individuals, following the classic
// DE/rand/1/bin scheme: initial random population, then per generation and
// per individual i a mutant x_r1 + F*(x_r2 - x_r3) for each attribute chosen
// by the crossover test (rand < CR or j == jrand), a fitness evaluation of
// the trial vector, and greedy selection (replace when f(trial) <= f(x_i)).
// It stops when the best fitness drops below min_error or after max_gen
// generations.
//
// Structure (after the source design): population RAM PMem (NP*D words,
// address i*D + j), fitness RAM FXMem (NP words), the crossover unit,
// four cellular-automaton generators (RandNP for r1..r3, RandD for jrand,
// a 7-cell generator compared with CR, and Randf for initial values),
// the register file U holding the trial vector, registers i, j, r1..r3 and
// X_r1..X_r3, the register Minimal with the best fitness, one comparator
// whose A/B inputs are multiplexed between FXMem, Minimal and MinError, and
// the control FSM below. All six objective units are instantiated;
// func_sel chooses which one is started and read (the source design builds
// one objective per bitstream; the run-time choice is this design's).
//
// Choices of this design where the source is silent: the population is
// updated in place (a replaced individual is visible to later mutants of
// the same generation, since there is one PMem); one search interval
// [x_min, x_max) for all attributes; initial values are
// x_min + (r - 1)*(x_max - x_min) with r from Randf in [1, 2), computed on
// the crossover unit; an index draw that is out of range or repeats i or an
// earlier index is thrown away and redrawn on the next cycle; CR is a 7-bit
// integer (CR_real = cr/128) compared with a 7-cell generator (values
// 1..127), so cr = 0 still mutates the one attribute jrand; all generators
// advance every clock.
//
// Interface: drive the run inputs, pulse start for one cycle while idle;
// the inputs must stay stable while busy. done pulses at the end; best_fx,
// best_idx and gen_count then describe the result. While idle, rd_i/rd_j
// select a population word and a fitness value that appear on rd_x/rd_fx
// one cycle later.
module dea_top
  import dea_pkg::*;
#(
  parameter int unsigned NP      = 128,
  parameter int unsigned D       = 32,
  parameter int unsigned ADD_LAT = 7,
  parameter int unsigned MUL_LAT = 5,
  localparam int unsigned NW     = $clog2(NP),
  localparam int unsigned DW     = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned PW     = $clog2(NP * D)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  func_e         func_sel,
  input  logic [6:0]    cr,
  input  fp64_t         f,
  input  fp64_t         x_min,
  input  fp64_t         x_max,
  input  fp64_t         min_error,
  input  logic [31:0]   max_gen,
  output logic          busy,
  output logic          done,
  output fp64_t         best_fx,
  output logic [NW-1:0] best_idx,
  output logic [31:0]   gen_count,
  input  logic [NW-1:0] rd_i,
  input  logic [DW-1:0] rd_j,
  output fp64_t         rd_x,
  output fp64_t         rd_fx
);
  dea_state_e st;

  // ---------------- registers of the datapath ----------------
  logic [NW-1:0] i_q, r1_q, r2_q, r3_q;
  logic [DW-1:0] j_q, jrand_q;
  fp64_t         xr1_q, xr2_q, range_q, fu_q, minimal_q;
  fp64_t         u_q [D];
  logic          mutate;

  // ---------------- random number generators ----------------
  logic [15:0] rnp_state, rd_state;
  logic [6:0]  rcr_state;
  fp64_t       randf;

  ca_rng #(.CELLS(16), .RULES(16'hB962), .SEED(16'h0001)) u_rand_np (
    .clk, .rst_n, .en(1'b1), .state(rnp_state)
  );
  ca_rng #(.CELLS(16), .RULES(16'hB962), .SEED(16'h5A3C)) u_rand_d (
    .clk, .rst_n, .en(1'b1), .state(rd_state)
  );
  ca_rng #(.CELLS(7), .RULES(7'h32), .SEED(7'h01)) u_rand_cr (
    .clk, .rst_n, .en(1'b1), .state(rcr_state)
  );
  rand_float u_randf (.clk, .rst_n, .en(1'b1), .r(randf));

  logic [NW-1:0] rnp;
  logic [DW-1:0] rdv;
  logic          rnp_ok, rdv_ok;
  assign rnp    = rnp_state[NW-1:0];
  assign rnp_ok = (32'(rnp) < NP);
  assign rdv    = rd_state[DW-1:0];
  assign rdv_ok = (32'(rdv) < D);

  // ---------------- memories ----------------
  logic          pm_we, fm_we;
  logic [PW-1:0] pm_addr;
  logic [NW-1:0] fm_addr, pm_row;
  fp64_t         pm_x, pm_y, fm_y;

  dea_ram #(.WORDS(NP * D), .WIDTH(64)) u_pmem (
    .clk, .we(pm_we), .addr(pm_addr), .x(pm_x), .y(pm_y)
  );
  dea_ram #(.WORDS(NP), .WIDTH(64)) u_fxmem (
    .clk, .we(fm_we), .addr(fm_addr), .x(fu_q), .y(fm_y)
  );

  assign rd_x  = pm_y;
  assign rd_fx = fm_y;

  // ---------------- crossover ----------------
  logic  xo_start, xo_busy, xo_done;
  fp64_t xo_r1, xo_r2, xo_r3, xo_f, xo_v;

  crossover #(.ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_xo (
    .clk, .rst_n, .start(xo_start), .x_r1(xo_r1), .x_r2(xo_r2), .x_r3(xo_r3),
    .f(xo_f), .busy(xo_busy), .done(xo_done), .v(xo_v)
  );

  // ---------------- objective functions ----------------
  localparam int unsigned NFN = 6;
  logic          fn_start [NFN];
  logic [DW-1:0] fn_idx   [NFN];
  logic          fn_busy  [NFN];
  logic          fn_done  [NFN];
  fp64_t         fn_fx    [NFN];
  logic          fit_start, fit_done;
  fp64_t         fit_fx;

  always_comb
    for (int k = 0; k < NFN; k++) fn_start[k] = fit_start && (func_sel == func_e'(k));

  fit_sphere #(.D(D), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_f1 (
    .clk, .rst_n, .start(fn_start[0]), .x(u_q[fn_idx[0]]), .idx(fn_idx[0]),
    .busy(fn_busy[0]), .done(fn_done[0]), .fx(fn_fx[0])
  );
  fit_schwefel222 #(.D(D), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_f2 (
    .clk, .rst_n, .start(fn_start[1]), .x(u_q[fn_idx[1]]), .idx(fn_idx[1]),
    .busy(fn_busy[1]), .done(fn_done[1]), .fx(fn_fx[1])
  );
  fit_schwefel12 #(.D(D), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_f3 (
    .clk, .rst_n, .start(fn_start[2]), .x(u_q[fn_idx[2]]), .idx(fn_idx[2]),
    .busy(fn_busy[2]), .done(fn_done[2]), .fx(fn_fx[2])
  );
  fit_schwefel221 #(.D(D)) u_f4 (
    .clk, .rst_n, .start(fn_start[3]), .x(u_q[fn_idx[3]]), .idx(fn_idx[3]),
    .busy(fn_busy[3]), .done(fn_done[3]), .fx(fn_fx[3])
  );
  fit_rosenbrock #(.D(D), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_f5 (
    .clk, .rst_n, .start(fn_start[4]), .x(u_q[fn_idx[4]]), .idx(fn_idx[4]),
    .busy(fn_busy[4]), .done(fn_done[4]), .fx(fn_fx[4])
  );
  fit_step #(.D(D), .ADD_LAT(ADD_LAT), .MUL_LAT(MUL_LAT)) u_f6 (
    .clk, .rst_n, .start(fn_start[5]), .x(u_q[fn_idx[5]]), .idx(fn_idx[5]),
    .busy(fn_busy[5]), .done(fn_done[5]), .fx(fn_fx[5])
  );

  always_comb begin
    fit_done = 1'b0;
    fit_fx   = FP_ZERO;
    for (int k = 0; k < NFN; k++)
      if (func_sel == func_e'(k)) begin
        fit_done = fn_done[k];
        fit_fx   = fn_fx[k];
      end
  end

  // ---------------- shared comparator with input multiplexer ----------------
  fp64_t cmp_a, cmp_b;
  logic  cmp_lt;

  always_comb begin
    unique case (st)
      S_SELECT: begin cmp_a = fm_y;      cmp_b = fu_q;      end  // f(x_i) < f(u): keep x_i
      S_CHECK:  begin cmp_a = minimal_q; cmp_b = min_error; end  // stop test
      default:  begin cmp_a = fu_q;      cmp_b = minimal_q; end  // new best
    endcase
  end
  fp64_comp u_cmp (.a(cmp_a), .b(cmp_b), .lt(cmp_lt));

  // ---------------- control: combinational strobes ----------------
  always_comb begin
    xo_start  = 1'b0;
    xo_r1     = xr1_q;
    xo_r2     = xr2_q;
    xo_r3     = pm_y;
    xo_f      = f;
    fit_start = 1'b0;
    pm_we     = 1'b0;
    pm_x      = u_q[j_q];
    pm_row    = i_q;
    fm_we     = 1'b0;
    fm_addr   = busy ? i_q : rd_i;
    unique case (st)
      S_RANGE: begin  // x_max - x_min = 0 + 1.0 * (x_max - x_min)
        xo_start = 1'b1;
        xo_r1 = FP_ZERO; xo_r2 = x_max; xo_r3 = x_min; xo_f = FP_ONE;
      end
      S_INIT_X: begin // x_min + (r - 1) * (x_max - x_min)
        xo_start = 1'b1;
        xo_r1 = x_min; xo_r2 = randf; xo_r3 = FP_ONE; xo_f = range_q;
      end
      S_INIT_XW: begin
        pm_we = xo_done;
        pm_x  = xo_v;
      end
      S_INIT_FIT, S_FIT: fit_start = 1'b1;
      S_INIT_BEST: fm_we = 1'b1;
      S_DEC:    pm_row = r1_q;
      S_RD_R2:  pm_row = r2_q;
      S_RD_R3:  pm_row = r3_q;
      S_RD_R3D: xo_start = 1'b1;
      S_WB: begin
        pm_we = 1'b1;
        fm_we = (j_q == DW'(D - 1));
      end
      default: ;
    endcase
    pm_addr = busy ? PW'(32'(pm_row) * D + 32'(j_q))
                   : PW'(32'(rd_i) * D + 32'(rd_j));
  end

  assign mutate = (rcr_state < cr) || (j_q == jrand_q);

  // ---------------- control FSM ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_IDLE;
      busy <= 1'b0; done <= 1'b0;
      i_q <= '0; j_q <= '0; r1_q <= '0; r2_q <= '0; r3_q <= '0; jrand_q <= '0;
      xr1_q <= FP_ZERO; xr2_q <= FP_ZERO; range_q <= FP_ZERO; fu_q <= FP_ZERO;
      minimal_q <= FP_INF; best_idx <= '0; gen_count <= '0;
      for (int k = 0; k < D; k++) u_q[k] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          busy <= 1'b1;
          i_q <= '0; j_q <= '0; gen_count <= '0;
          minimal_q <= FP_INF;
          st <= S_RANGE;
        end
        S_RANGE:   st <= S_RANGE_W;
        S_RANGE_W: if (xo_done) begin range_q <= xo_v; st <= S_INIT_X; end
        // ---- generation and evaluation of the initial population ----
        S_INIT_X:  st <= S_INIT_XW;
        S_INIT_XW: if (xo_done) begin
          u_q[j_q] <= xo_v;
          if (j_q == DW'(D - 1)) begin j_q <= '0; st <= S_INIT_FIT; end
          else begin j_q <= j_q + 1'b1; st <= S_INIT_X; end
        end
        S_INIT_FIT:  st <= S_INIT_FITW;
        S_INIT_FITW: if (fit_done) begin fu_q <= fit_fx; st <= S_INIT_BEST; end
        S_INIT_BEST: begin
          if (cmp_lt || i_q == '0) begin minimal_q <= fu_q; best_idx <= i_q; end
          if (i_q == NW'(NP - 1)) begin i_q <= '0; st <= S_CHECK; end
          else begin i_q <= i_q + 1'b1; st <= S_INIT_X; end
        end
        // ---- test vector generation: r1, r2, r3 distinct and != i ----
        S_SEL_R1: if (rnp_ok && rnp != i_q) begin r1_q <= rnp; st <= S_SEL_R2; end
        S_SEL_R2: if (rnp_ok && rnp != i_q && rnp != r1_q) begin
          r2_q <= rnp; st <= S_SEL_R3;
        end
        S_SEL_R3: if (rnp_ok && rnp != i_q && rnp != r1_q && rnp != r2_q) begin
          r3_q <= rnp; st <= S_JRAND;
        end
        S_JRAND: if (rdv_ok) begin jrand_q <= rdv; j_q <= '0; st <= S_RD_I; end
        // ---- mutation and crossover, one attribute at a time ----
        S_RD_I: st <= S_DEC;                    // PMem[i][j] being read
        S_DEC: begin                            // pm_y = x_i,j
          if (mutate) st <= S_RD_R2;            // PMem[r1][j] being read
          else begin u_q[j_q] <= pm_y; st <= S_NEXT_J; end
        end
        S_RD_R2:  begin xr1_q <= pm_y; st <= S_RD_R3;  end
        S_RD_R3:  begin xr2_q <= pm_y; st <= S_RD_R3D; end
        S_RD_R3D: st <= S_XO_W;                 // crossover started with pm_y = x_r3,j
        S_XO_W: if (xo_done) begin u_q[j_q] <= xo_v; st <= S_NEXT_J; end
        S_NEXT_J: begin
          if (j_q == DW'(D - 1)) begin j_q <= '0; st <= S_FIT; end
          else begin j_q <= j_q + 1'b1; st <= S_RD_I; end
        end
        // ---- evaluation and selection ----
        S_FIT:   st <= S_FIT_W;
        S_FIT_W: if (fit_done) begin fu_q <= fit_fx; st <= S_SELECT; end
        S_SELECT: begin                         // fm_y = f(x_i)
          j_q <= '0;
          st  <= cmp_lt ? S_NEXT_I : S_WB;      // replace when f(u) <= f(x_i)
        end
        S_WB: begin
          if (j_q == DW'(D - 1)) begin j_q <= '0; st <= S_BEST; end
          else j_q <= j_q + 1'b1;
        end
        S_BEST: begin
          if (cmp_lt) begin minimal_q <= fu_q; best_idx <= i_q; end
          st <= S_NEXT_I;
        end
        S_NEXT_I: begin
          if (i_q == NW'(NP - 1)) begin
            i_q <= '0;
            gen_count <= gen_count + 1;
            st <= S_CHECK;
          end else begin
            i_q <= i_q + 1'b1;
            st <= S_SEL_R1;
          end
        end
        S_CHECK: begin
          if (cmp_lt || gen_count >= max_gen) begin
            busy <= 1'b0; done <= 1'b1; st <= S_IDLE;
          end else begin
            st <= S_SEL_R1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign best_fx = minimal_q;

  // handshake rules: the crossover unit and an objective unit are only
  // started while idle, and the FSM never waits on a unit it did not start
  a_xo_idle: assert property (@(posedge clk) disable iff (!rst_n) !(xo_start && xo_busy))
    else $error("dea_top: crossover started while busy");
  for (genvar k = 0; k < NFN; k++) begin : g_fn_chk
    a_fn_idle: assert property (@(posedge clk) disable iff (!rst_n) !(fn_start[k] && fn_busy[k]))
      else $error("dea_top: objective unit started while busy");
  end
  a_busy: assert property (@(posedge clk) disable iff (!rst_n) busy == (st != S_IDLE))
    else $error("dea_top: busy out of step with the FSM");

  // the index generator must be able to name every individual
  initial assert (NP >= 4 && NP <= 65536 && D >= 2 && D <= 65536)
    else $error("dea_top: NP must be 4..65536 and D 2..65536");
endmodule
