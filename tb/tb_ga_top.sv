// tb_ga_top: end-to-end test of the parallel GA at its default sizes.
//
// Four pipelines of 32 individuals solve the 64-item knapsack instance from
// ga_pkg. The testbench computes the exact optimum by dynamic programming,
// runs every pipeline through its initial population and NOFF offspring, and
// checks:
//   * all pipelines finish initialisation and send frames on the same clocks;
//   * each evaluates one offspring every B = ceil(N/M) clocks;
//   * each pipeline's best fitness is the true fitness of its best chromosome
//     and never falls; the global best is the largest of them;
//   * every population memory word holds its chromosome's true fitness;
//   * migration happens once every PERIOD GA frames in every pipeline;
//   * every mechanism occurred: crossover, mutation, offspring kept and sent
//     on, offspring rejected with a random individual sent instead, migrants
//     kept and migrants rejected;
//   * the best solution found reaches at least 95 % of the optimum.
module tb_ga_top;
  import ga_pkg::*;
  localparam int unsigned N = CHROM_BITS_DEF, M = BUS_BITS_DEF, POP = POP_SIZE_DEF;
  localparam int unsigned FW = FIT_BITS_DEF, P = N_PIPES_DEF, B = (N + M - 1) / M;
  localparam int unsigned PERIOD = 16;
  localparam int unsigned NOFF = 20000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [P-1:0] init_done;
  logic [P-1:0][FW-1:0] pipe_best_fit;
  logic [P-1:0][N-1:0] pipe_best_chrom;
  logic [P-1:0][31:0] pipe_n_offspring, pipe_n_replaced, pipe_n_migrants;
  logic [FW-1:0] best_fit;
  logic [N-1:0] best_chrom;

  ga_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int unsigned ref_fit(logic [N-1:0] c);
    int unsigned v, w, cap;
    v = 0; w = 0; cap = 0;
    for (int i = 0; i < N; i++) cap += 5 + ((13 * i + 7) % 23);
    cap = cap / 2;
    for (int i = 0; i < N; i++)
      if (c[i]) begin
        v += 4 + ((29 * i + 3) % 37);
        w += 5 + ((13 * i + 7) % 23);
      end
    return (w <= cap) ? v : 0;
  endfunction

  // exact optimum of the instance, 0/1 knapsack dynamic programming
  function automatic int unsigned optimum();
    int unsigned cap, best [];
    cap = 0;
    for (int i = 0; i < N; i++) cap += 5 + ((13 * i + 7) % 23);
    cap = cap / 2;
    best = new[cap + 1];
    foreach (best[c]) best[c] = 0;
    for (int i = 0; i < N; i++) begin
      int unsigned w, v;
      w = 5 + ((13 * i + 7) % 23);
      v = 4 + ((29 * i + 3) % 37);
      for (int c = int'(cap); c >= int'(w); c--)
        if (best[c - w] + v > best[c]) best[c] = best[c - w] + v;
    end
    return best[cap];
  endfunction

  // mechanism counters, per pipeline
  int n_cross [P], n_mut [P], n_kept_sent [P], n_random [P];
  int n_mig_kept [P], n_mig_rej [P], n_init_wr [P];
  logic [FW-1:0] prev_best [P];
  logic [P-1:0] mg_first_v;

  for (genvar p = 0; p < P; p++) begin : g_mon
    assign mg_first_v[p] = dut.g_pipe[p].u_pipe.mg_first;
    initial begin
      n_cross[p] = 0; n_mut[p] = 0; n_kept_sent[p] = 0; n_random[p] = 0;
      n_mig_kept[p] = 0; n_mig_rej[p] = 0; n_init_wr[p] = 0; prev_best[p] = '0;
    end
    always @(posedge clk) if (rst_n) begin
      if (dut.g_pipe[p].u_pipe.u_xover.i_valid && dut.g_pipe[p].u_pipe.u_xover.do_cross
          && dut.g_pipe[p].u_pipe.u_xover.i_first) n_cross[p]++;
      if (dut.g_pipe[p].u_pipe.u_mut.i_valid && dut.g_pipe[p].u_pipe.u_mut.hit) n_mut[p]++;
      if (dut.g_pipe[p].u_pipe.u_mgmt.slot_start && dut.g_pipe[p].u_pipe.u_mgmt.init_back) begin
        if (dut.g_pipe[p].u_pipe.u_mgmt.pend_valid) n_kept_sent[p]++; else n_random[p]++;
      end
      if (dut.g_pipe[p].u_pipe.u_mgmt.ret_done) begin
        if (dut.g_pipe[p].u_pipe.u_mgmt.i_kind == FRAME_INIT) n_init_wr[p]++;
        if (dut.g_pipe[p].u_pipe.u_mgmt.i_kind == FRAME_MIGRANT) begin
          if (dut.g_pipe[p].u_pipe.u_mgmt.accept) n_mig_kept[p]++; else n_mig_rej[p]++;
        end
      end
      if (pipe_best_fit[p] < prev_best[p]) begin
        failures++;
        $display("FAIL pipeline %0d best fitness fell", p);
      end
      prev_best[p] <= pipe_best_fit[p];
    end
  end

  // frames of all pipelines start on the same clocks
  always @(posedge clk) if (rst_n) begin
    if (mg_first_v != '0 && mg_first_v != '1) begin
      failures++;
      $display("FAIL pipelines out of step: %b", mg_first_v);
    end
  end

  initial begin
    repeat (NOFF * B * 2 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned opt, n0 [P], init_best;
  logic [FW-1:0] exp_best;
  initial begin
    opt = optimum();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&init_done);
    @(negedge clk);
    init_best = best_fit;
    wait (pipe_n_offspring[0] >= 20);
    @(negedge clk);
    for (int p = 0; p < P; p++) n0[p] = pipe_n_offspring[p];
    repeat (100 * B) @(negedge clk);
    for (int p = 0; p < P; p++)
      check("one offspring per B clocks", pipe_n_offspring[p] - n0[p], 100);
    wait (pipe_n_offspring[0] >= NOFF);
    @(negedge clk);
    exp_best = '0;
    for (int p = 0; p < P; p++) begin
      check("best_fit is the fitness of best_chrom", pipe_best_fit[p], ref_fit(pipe_best_chrom[p]));
      if (pipe_best_fit[p] > exp_best) exp_best = pipe_best_fit[p];
      for (int a = 0; a < POP; a++)
        case (p)
          0: check("stored fitness", dut.g_pipe[0].u_pipe.u_mgmt.pop_mem[a][B*M +: FW],
                   ref_fit(dut.g_pipe[0].u_pipe.u_mgmt.pop_mem[a][N-1:0]));
          1: check("stored fitness", dut.g_pipe[1].u_pipe.u_mgmt.pop_mem[a][B*M +: FW],
                   ref_fit(dut.g_pipe[1].u_pipe.u_mgmt.pop_mem[a][N-1:0]));
          2: check("stored fitness", dut.g_pipe[2].u_pipe.u_mgmt.pop_mem[a][B*M +: FW],
                   ref_fit(dut.g_pipe[2].u_pipe.u_mgmt.pop_mem[a][N-1:0]));
          default: check("stored fitness", dut.g_pipe[3].u_pipe.u_mgmt.pop_mem[a][B*M +: FW],
                   ref_fit(dut.g_pipe[3].u_pipe.u_mgmt.pop_mem[a][N-1:0]));
        endcase
      check("init writes", n_init_wr[p], POP);
      check("migration once per PERIOD GA frames",
            (pipe_n_migrants[p] * PERIOD <= pipe_n_offspring[p] + 2 * PERIOD) &&
            (pipe_n_migrants[p] * PERIOD + 2 * PERIOD >= pipe_n_offspring[p]), 1);
      check("crossover happened", n_cross[p] > 0, 1);
      check("mutation happened", n_mut[p] > 0, 1);
      check("kept offspring sent on", n_kept_sent[p] > 0, 1);
      check("random individual sent", n_random[p] > 0, 1);
      check("offspring rejected", pipe_n_offspring[p] > pipe_n_replaced[p], 1);
      check("migrant kept", n_mig_kept[p] > 0, 1);
      check("migrant rejected", n_mig_rej[p] > 0, 1);
      $display("pipe %0d: best %0d, offspring %0d, replaced %0d, migrants %0d (kept %0d, rejected %0d), crossovers %0d, mutated beats %0d, kept sent %0d, random sent %0d",
               p, pipe_best_fit[p], pipe_n_offspring[p], pipe_n_replaced[p], pipe_n_migrants[p],
               n_mig_kept[p], n_mig_rej[p], n_cross[p], n_mut[p], n_kept_sent[p], n_random[p]);
    end
    check("global best", best_fit, exp_best);
    check("global best chromosome", ref_fit(best_chrom), exp_best);
    check("improved over initial population", best_fit > init_best, 1);
    check("within 5 % of the optimum", best_fit * 100 >= opt * 95, 1);
    $display("optimum %0d, initial best %0d, best found %0d", opt, init_best, best_fit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
