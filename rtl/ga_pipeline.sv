// ga_pipeline: one GA pipeline (an island of the parallel design).
//
// The four stages form a ring that streams individuals M bits per clock:
//
//   management -> [immigration] -> crossover -> mutation -> evaluation
//        ^                                                      |
//        +------ parent_worse address/fitness, offspring2 ------+
//
// Management sends one individual every B = ceil(N/M) clocks. Crossover
// combines it with the previous one (held in its register r), mutation
// changes the offspring at random, evaluation computes its fitness, and
// management keeps the offspring in place of the worse parent when it is
// fitter (simplified Minimal Generation Gap model). The immigration stage is
// present when MIGRATION is set; it then takes individuals from the
// neighbouring pipeline's management output (nb_*), and this pipeline's
// management output is brought out (mg_*) for the other neighbour. Without
// MIGRATION (the default, a single pipeline) the nb_* inputs are unused and
// n_migrants is constant zero.
//
// Timing: every stage has a latency of one clock; a frame of B beats leaves
// management every B clocks with no gaps once the initial population has been
// evaluated, so one offspring is evaluated every B clocks.
//
// The stage order and the data passed between stages follow the
// architecture; the stage internals are described in each module.
module ga_pipeline
  import ga_pkg::*;
#(
  parameter int unsigned N         = CHROM_BITS_DEF,
  parameter int unsigned M         = BUS_BITS_DEF,
  parameter int unsigned POP       = POP_SIZE_DEF,
  parameter int unsigned FW        = FIT_BITS_DEF,
  parameter int unsigned MUT_PROB  = 32,
  parameter bit          MIGRATION = 1'b0,
  parameter int unsigned PERIOD    = 16,
  parameter logic [31:0] SEED      = 32'h1357_9BDF,
  localparam int unsigned AW       = (POP > 1) ? $clog2(POP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // neighbour's management output (used when MIGRATION is set)
  input  logic          nb_valid,
  input  logic          nb_first,
  input  logic [M-1:0]  nb_data,
  input  frame_kind_e   nb_kind,
  // own management output, for the other neighbour
  output logic          mg_valid,
  output logic          mg_first,
  output logic [M-1:0]  mg_data,
  output frame_kind_e   mg_kind,
  // status
  output logic          init_done,
  output logic [FW-1:0] best_fit,
  output logic [N-1:0]  best_chrom,
  output logic [31:0]   n_offspring,
  output logic [31:0]   n_replaced,
  output logic [31:0]   n_migrants
);
  // the architecture assumes a chromosome at least one bus wide (n >= m)
  if (N < M) begin : g_bad_size
    $error("ga_pipeline: N (%0d) must be at least M (%0d)", N, M);
  end

  // stream: management -> immigration
  logic m_valid, m_first, m_last;
  logic [M-1:0] m_data;
  frame_kind_e m_kind;
  logic [AW-1:0] m_addr;
  logic [FW-1:0] m_fit;
  // stream: immigration -> crossover
  logic x_valid, x_first, x_last;
  logic [M-1:0] x_data;
  frame_kind_e x_kind;
  logic [AW-1:0] x_addr;
  logic [FW-1:0] x_fit;
  // stream: crossover -> mutation
  logic c_valid, c_first, c_last;
  logic [M-1:0] c_data;
  frame_kind_e c_kind;
  logic [AW-1:0] c_pw_addr;
  logic [FW-1:0] c_pw_fit;
  // stream: mutation -> evaluation
  logic u_valid, u_first, u_last;
  logic [M-1:0] u_data;
  frame_kind_e u_kind;
  logic [AW-1:0] u_pw_addr;
  logic [FW-1:0] u_pw_fit;
  // stream: evaluation -> management
  logic e_valid, e_first, e_last;
  logic [M-1:0] e_data;
  frame_kind_e e_kind;
  logic [AW-1:0] e_pw_addr;
  logic [FW-1:0] e_pw_fit, e_off_fit;

  ga_management #(.N(N), .M(M), .POP(POP), .FW(FW), .SEED(SEED ^ 32'hA5A5_0001)) u_mgmt (
    .clk, .rst_n,
    .o_valid(m_valid), .o_first(m_first), .o_last(m_last), .o_data(m_data),
    .o_kind(m_kind), .o_addr(m_addr), .o_fit(m_fit),
    .i_valid(e_valid), .i_first(e_first), .i_last(e_last), .i_data(e_data),
    .i_kind(e_kind), .i_pw_addr(e_pw_addr), .i_pw_fit(e_pw_fit), .i_off_fit(e_off_fit),
    .init_done, .best_fit, .best_chrom, .n_offspring, .n_replaced
  );

  assign mg_valid = m_valid;
  assign mg_first = m_first;
  assign mg_data  = m_data;
  assign mg_kind  = m_kind;

  if (MIGRATION) begin : g_imm
    ga_immigration #(.M(M), .POP(POP), .FW(FW), .PERIOD(PERIOD)) u_imm (
      .clk, .rst_n,
      .i_valid(m_valid), .i_first(m_first), .i_last(m_last), .i_data(m_data),
      .i_kind(m_kind), .i_addr(m_addr), .i_fit(m_fit),
      .nb_valid, .nb_first, .nb_data, .nb_kind,
      .o_valid(x_valid), .o_first(x_first), .o_last(x_last), .o_data(x_data),
      .o_kind(x_kind), .o_addr(x_addr), .o_fit(x_fit), .n_migrants
    );
  end else begin : g_no_imm
    // single pipeline: management feeds crossover directly; the neighbour
    // inputs are not used
    assign x_valid    = m_valid;
    assign x_first    = m_first;
    assign x_last     = m_last;
    assign x_data     = m_data;
    assign x_kind     = m_kind;
    assign x_addr     = m_addr;
    assign x_fit      = m_fit;
    assign n_migrants = '0;
  end

  ga_crossover #(.N(N), .M(M), .POP(POP), .FW(FW), .SEED(SEED ^ 32'h5A5A_0002)) u_xover (
    .clk, .rst_n,
    .i_valid(x_valid), .i_first(x_first), .i_last(x_last), .i_data(x_data),
    .i_kind(x_kind), .i_addr(x_addr), .i_fit(x_fit),
    .o_valid(c_valid), .o_first(c_first), .o_last(c_last), .o_data(c_data),
    .o_kind(c_kind), .o_pw_addr(c_pw_addr), .o_pw_fit(c_pw_fit)
  );

  ga_mutation #(.N(N), .M(M), .POP(POP), .FW(FW), .MUT_PROB(MUT_PROB),
                .SEED(SEED ^ 32'h3C3C_0003)) u_mut (
    .clk, .rst_n,
    .i_valid(c_valid), .i_first(c_first), .i_last(c_last), .i_data(c_data),
    .i_kind(c_kind), .i_pw_addr(c_pw_addr), .i_pw_fit(c_pw_fit),
    .o_valid(u_valid), .o_first(u_first), .o_last(u_last), .o_data(u_data),
    .o_kind(u_kind), .o_pw_addr(u_pw_addr), .o_pw_fit(u_pw_fit)
  );

  ga_eval_knapsack #(.N(N), .M(M), .POP(POP), .FW(FW)) u_eval (
    .clk, .rst_n,
    .i_valid(u_valid), .i_first(u_first), .i_last(u_last), .i_data(u_data),
    .i_kind(u_kind), .i_pw_addr(u_pw_addr), .i_pw_fit(u_pw_fit),
    .o_valid(e_valid), .o_first(e_first), .o_last(e_last), .o_data(e_data),
    .o_kind(e_kind), .o_pw_addr(e_pw_addr), .o_pw_fit(e_pw_fit), .o_off_fit(e_off_fit)
  );
endmodule
