// ga_top: parallel GA architecture, N_PIPES pipelines joined in a ring.
//
// Each pipeline is an island with its own population of POP individuals
// (island model). With more than one pipeline every pipeline has an
// immigration stage fed by the management output of pipeline i-1 (modulo
// N_PIPES), so individuals travel round the ring. All pipelines share clock
// and reset and run the same frame timing, with different random seeds.
//
// Outputs: per pipeline its best fitness so far, the matching chromosome and
// its counters; over all pipelines the best fitness and chromosome. The run
// starts at reset release and continues until reset: first every pipeline
// builds and evaluates its random initial population (init_done), then it
// evaluates one offspring every ceil(N/M) clocks.
//
// The ring of pipelines with immigration follows the architecture; the ring
// direction, the default of four pipelines (the largest count evaluated) and
// the outputs are this design's choices.
module ga_top
  import ga_pkg::*;
#(
  parameter int unsigned N        = CHROM_BITS_DEF,
  parameter int unsigned M        = BUS_BITS_DEF,
  parameter int unsigned POP      = POP_SIZE_DEF,
  parameter int unsigned FW       = FIT_BITS_DEF,
  parameter int unsigned N_PIPES  = N_PIPES_DEF,
  parameter int unsigned MUT_PROB = 32,
  parameter int unsigned PERIOD   = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  output logic [N_PIPES-1:0]              init_done,
  output logic [N_PIPES-1:0][FW-1:0]      pipe_best_fit,
  output logic [N_PIPES-1:0][N-1:0]       pipe_best_chrom,
  output logic [N_PIPES-1:0][31:0]        pipe_n_offspring,
  output logic [N_PIPES-1:0][31:0]        pipe_n_replaced,
  output logic [N_PIPES-1:0][31:0]        pipe_n_migrants,
  output logic [FW-1:0]                   best_fit,
  output logic [N-1:0]                    best_chrom
);
  logic [N_PIPES-1:0]         mg_valid, mg_first;
  logic [N_PIPES-1:0][M-1:0]  mg_data;
  frame_kind_e                mg_kind [N_PIPES];

  for (genvar p = 0; p < N_PIPES; p++) begin : g_pipe
    localparam int unsigned NB = (p + N_PIPES - 1) % N_PIPES;
    ga_pipeline #(
      .N(N), .M(M), .POP(POP), .FW(FW), .MUT_PROB(MUT_PROB),
      .MIGRATION(N_PIPES > 1), .PERIOD(PERIOD),
      .SEED(32'h1357_9BDF + 32'h0101_0101 * p)
    ) u_pipe (
      .clk, .rst_n,
      .nb_valid(mg_valid[NB]), .nb_first(mg_first[NB]),
      .nb_data(mg_data[NB]), .nb_kind(mg_kind[NB]),
      .mg_valid(mg_valid[p]), .mg_first(mg_first[p]),
      .mg_data(mg_data[p]), .mg_kind(mg_kind[p]),
      .init_done(init_done[p]),
      .best_fit(pipe_best_fit[p]), .best_chrom(pipe_best_chrom[p]),
      .n_offspring(pipe_n_offspring[p]), .n_replaced(pipe_n_replaced[p]),
      .n_migrants(pipe_n_migrants[p])
    );
  end

  always_comb begin
    best_fit   = pipe_best_fit[0];
    best_chrom = pipe_best_chrom[0];
    for (int unsigned p = 1; p < N_PIPES; p++) begin
      if (pipe_best_fit[p] > best_fit) begin
        best_fit   = pipe_best_fit[p];
        best_chrom = pipe_best_chrom[p];
      end
    end
  end
endmodule
