// tb_ga_islands: search efficiency with 1, 2 and 4 pipelines.
//
// Three copies of the parallel design, with N_PIPES = 1, 2 and 4, start from
// the same reset and solve the same 64-item knapsack instance. Every SAMPLE
// clocks the best fitness of each copy is printed, giving best fitness against
// run time for each pipeline count. Checks: each copy's best fitness is the
// true fitness of its best chromosome and never falls; every copy improves on
// its initial population; a copy with more pipelines, having evaluated more
// offspring in the same time, ends at least as close to the optimum as the
// single pipeline does, with some slack for chance.
module tb_ga_islands;
  import ga_pkg::*;
  localparam int unsigned N = CHROM_BITS_DEF, FW = FIT_BITS_DEF;
  localparam int unsigned SAMPLE = 2000, NSAMPLES = 16;

  logic clk = 1'b0, rst_n = 1'b0;

  logic [0:0] d1_init;           logic [1:0] d2_init;           logic [3:0] d4_init;
  logic [0:0][FW-1:0] f1;        logic [1:0][FW-1:0] f2;        logic [3:0][FW-1:0] f4;
  logic [0:0][N-1:0] c1;         logic [1:0][N-1:0] c2;         logic [3:0][N-1:0] c4;
  logic [0:0][31:0] o1, r1, m1;  logic [1:0][31:0] o2, r2, m2;  logic [3:0][31:0] o4, r4, m4;
  logic [FW-1:0] b1, b2, b4;
  logic [N-1:0] bc1, bc2, bc4;

  ga_top #(.N_PIPES(1)) u1 (.clk, .rst_n, .init_done(d1_init), .pipe_best_fit(f1),
    .pipe_best_chrom(c1), .pipe_n_offspring(o1), .pipe_n_replaced(r1), .pipe_n_migrants(m1),
    .best_fit(b1), .best_chrom(bc1));
  ga_top #(.N_PIPES(2)) u2 (.clk, .rst_n, .init_done(d2_init), .pipe_best_fit(f2),
    .pipe_best_chrom(c2), .pipe_n_offspring(o2), .pipe_n_replaced(r2), .pipe_n_migrants(m2),
    .best_fit(b2), .best_chrom(bc2));
  ga_top #(.N_PIPES(4)) u4 (.clk, .rst_n, .init_done(d4_init), .pipe_best_fit(f4),
    .pipe_best_chrom(c4), .pipe_n_offspring(o4), .pipe_n_replaced(r4), .pipe_n_migrants(m4),
    .best_fit(b4), .best_chrom(bc4));

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

  initial begin
    repeat (SAMPLE * NSAMPLES + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [FW-1:0] p1, p2, p4, i1, i2, i4;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d1_init[0] && (&d2_init) && (&d4_init));
    @(negedge clk);
    i1 = b1; i2 = b2; i4 = b4;
    p1 = b1; p2 = b2; p4 = b4;
    $display("clocks  best(1)  best(2)  best(4)");
    for (int s = 1; s <= NSAMPLES; s++) begin
      repeat (SAMPLE) @(negedge clk);
      $display("%6d  %7d  %7d  %7d", s * SAMPLE, b1, b2, b4);
      check("best never falls (1)", b1 >= p1, 1);
      check("best never falls (2)", b2 >= p2, 1);
      check("best never falls (4)", b4 >= p4, 1);
      check("best is true fitness (1)", b1, ref_fit(bc1));
      check("best is true fitness (2)", b2, ref_fit(bc2));
      check("best is true fitness (4)", b4, ref_fit(bc4));
      p1 = b1; p2 = b2; p4 = b4;
    end
    check("1 pipeline improves", b1 > i1, 1);
    check("2 pipelines improve", b2 > i2, 1);
    check("4 pipelines improve", b4 > i4, 1);
    check("4 pipelines at least as good as 1 (2 % slack)", b4 * 100 + 2 * b1 >= b1 * 100, 1);
    check("offspring rate scales with pipelines", o4[0] + o4[1] + o4[2] + o4[3], 4 * o1[0]);
    check("no migration with one pipeline", m1[0], 0);
    check("migration with two pipelines", m2[0] > 0 && m2[1] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
