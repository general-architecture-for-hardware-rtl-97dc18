// tb_ga_pipeline: end-to-end test of one GA pipeline (no immigration).
//
// Runs a single pipeline at its default sizes from reset through the initial
// population and NOFF offspring. Checks:
//   * ring latency: the first INIT frame returns to management 3 clocks after
//     it left (crossover, mutation, evaluation: one clock each);
//   * rate: once the initial population is in, one offspring is evaluated
//     every B = ceil(N/M) clocks;
//   * every returning fitness equals the knapsack fitness of the returning
//     chromosome, computed here;
//   * best_fit never falls, ends above its value at the end of
//     initialisation, and equals the fitness of best_chrom;
//   * at the end every memory word holds a chromosome with its true fitness;
//   * crossover, mutation, kept and rejected offspring all occurred.
// A second pipeline with N = 50, M = 16 (four beats, 14 padding bits in the
// last one) runs alongside and must keep the same rate, true fitness values
// in memory and a correct best chromosome.
module tb_ga_pipeline;
  import ga_pkg::*;
  localparam int unsigned N = CHROM_BITS_DEF, M = BUS_BITS_DEF, POP = POP_SIZE_DEF;
  localparam int unsigned FW = FIT_BITS_DEF, B = (N + M - 1) / M;
  localparam int unsigned NOFF = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic init_done;
  logic [FW-1:0] best_fit;
  logic [N-1:0] best_chrom;
  logic [31:0] n_offspring, n_replaced, n_migrants;
  logic mg_valid, mg_first;
  logic [M-1:0] mg_data;
  frame_kind_e mg_kind;

  ga_pipeline dut (
    .clk, .rst_n,
    .nb_valid(1'b0), .nb_first(1'b0), .nb_data('0), .nb_kind(FRAME_GA),
    .mg_valid, .mg_first, .mg_data, .mg_kind,
    .init_done, .best_fit, .best_chrom, .n_offspring, .n_replaced, .n_migrants
  );

  localparam int unsigned N2 = 50, M2 = 16, B2 = (N2 + M2 - 1) / M2;
  logic init_done2;
  logic [FW-1:0] best_fit2;
  logic [N2-1:0] best_chrom2;
  logic [31:0] n_off2, n_rep2, n_mig2;
  logic mg_valid2, mg_first2;
  logic [M2-1:0] mg_data2;
  frame_kind_e mg_kind2;

  ga_pipeline #(.N(N2), .M(M2), .SEED(32'h2468_ACE0)) dut2 (
    .clk, .rst_n,
    .nb_valid(1'b0), .nb_first(1'b0), .nb_data('0), .nb_kind(FRAME_GA),
    .mg_valid(mg_valid2), .mg_first(mg_first2), .mg_data(mg_data2), .mg_kind(mg_kind2),
    .init_done(init_done2), .best_fit(best_fit2), .best_chrom(best_chrom2),
    .n_offspring(n_off2), .n_replaced(n_rep2), .n_migrants(n_mig2)
  );

  always #5 clk = ~clk;

  // knapsack fitness of the first n items of c
  function automatic int unsigned ref_fit_n(logic [63:0] c, int n);
    int unsigned v, w, cap;
    v = 0; w = 0; cap = 0;
    for (int i = 0; i < n; i++) cap += 5 + ((13 * i + 7) % 23);
    cap = cap / 2;
    for (int i = 0; i < n; i++)
      if (c[i]) begin
        v += 4 + ((29 * i + 3) % 37);
        w += 5 + ((13 * i + 7) % 23);
      end
    return (w <= cap) ? v : 0;
  endfunction

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

  int edge_no = 0, first_out = -1, first_back = -1;
  int n_cross_beats = 0, n_mut_beats = 0, n_fit_checks = 0;
  logic [N-1:0] ret_chrom;
  int ret_beat = 0;
  logic [FW-1:0] prev_best = '0;

  always @(posedge clk) if (rst_n) begin
    edge_no++;
    if (first_out < 0 && dut.u_mgmt.o_valid) first_out = edge_no;
    if (first_back < 0 && dut.u_mgmt.i_valid) first_back = edge_no;
    if (dut.u_xover.i_valid && dut.u_xover.do_cross) n_cross_beats++;
    if (dut.u_mut.i_valid && dut.u_mut.hit) n_mut_beats++;
    if (dut.u_mgmt.i_valid) begin
      if (dut.u_mgmt.i_first) ret_beat = 0;
      ret_chrom[ret_beat*M +: M] = dut.u_mgmt.i_data;
      ret_beat++;
      if (dut.u_mgmt.i_last) begin
        check("returned fitness", dut.u_mgmt.i_off_fit, ref_fit(ret_chrom));
        n_fit_checks++;
      end
    end
    if (best_fit < prev_best) begin
      failures++;
      $display("FAIL best fitness fell from %0d to %0d", prev_best, best_fit);
    end
    prev_best = best_fit;
  end

  initial begin
    repeat (NOFF * B * 2 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned init_best, t0, n0, n20;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (init_done);
    @(negedge clk);
    init_best = best_fit;
    wait (n_offspring == 10);
    @(negedge clk);
    check("second pipeline initialised", init_done2, 1);
    t0 = edge_no; n0 = n_offspring; n20 = n_off2;
    repeat (100 * B) @(negedge clk);
    check("one offspring per B clocks", n_offspring - n0, 100);
    check("N=50, M=16: one offspring per 4 clocks", n_off2 - n20, 100 * B / B2);
    wait (n_offspring == NOFF);
    @(negedge clk);
    check("ring latency (clocks)", first_back - first_out, 3);
    check("best_fit is the fitness of best_chrom", best_fit, ref_fit(best_chrom));
    check("best improved over the initial population", best_fit > init_best, 1);
    for (int a = 0; a < POP; a++)
      check("stored fitness matches stored chromosome",
            dut.u_mgmt.pop_mem[a][B*M +: FW], ref_fit(dut.u_mgmt.pop_mem[a][N-1:0]));
    check("N=50: best_fit is the fitness of best_chrom", best_fit2, ref_fit_n(64'(best_chrom2), N2));
    for (int a = 0; a < POP; a++)
      check("N=50: stored fitness matches stored chromosome",
            dut2.u_mgmt.pop_mem[a][B2*M2 +: FW], ref_fit_n(64'(dut2.u_mgmt.pop_mem[a][N2-1:0]), N2));
    check("N=50: offspring kept", n_rep2 > 0, 1);
    check("crossover happened", n_cross_beats > 0, 1);
    check("mutation happened", n_mut_beats > 0, 1);
    check("offspring kept", n_replaced > 0, 1);
    check("offspring rejected", n_offspring > n_replaced, 1);
    check("no migration in a single pipeline", n_migrants, 0);
    $display("N=50, M=16 pipeline: best %0d after %0d offspring", best_fit2, n_off2);
    $display("initial best %0d, final best %0d after %0d offspring (%0d kept); crossover beats %0d, mutated beats %0d",
             init_best, best_fit, n_offspring, n_replaced, n_cross_beats, n_mut_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
