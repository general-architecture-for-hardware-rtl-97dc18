// ga_management: population memory and replacement (simplified MGG model).
//
// The module holds POP individuals, each a chromosome of N bits (stored padded
// to B*M bits, B = ceil(N/M)) and its fitness, in one memory word. It has two
// independent sides:
//
// Return side (from the evaluation module). A frame brings the offspring
// chromosome M bits per beat, and on every beat the address and fitness of
// parent_worse; the offspring fitness is valid on the last beat. The beats are
// collected in a staging register. On the last beat the offspring fitness is
// compared with that of parent_worse: if it is strictly higher the offspring
// and its fitness overwrite parent_worse in memory and the offspring becomes
// the next individual sent out. INIT frames are always written; MIGRANT
// frames follow the same rule as offspring (the displaced local individual
// plays parent_worse).
//
// Send side (to the crossover module, through the immigration module in a
// parallel design). A frame of B beats leaves on every B clocks, back to back.
// The first POP frames are the initial population: random chromosomes, kind
// INIT, addresses 0..POP-1. The send side then waits until all of them have
// come back and been written, and from then on sends, at every frame start,
// the individual accepted last (if one is pending) or an individual picked at
// random. The memory word is read one clock before its frame starts.
//
// Timing: frames leave continuously at one per B clocks; a replacement is
// written on the clock of the returning frame's last beat and is sent at the
// next frame start after that clock. There is no back-pressure: every stage
// of the pipeline accepts one beat per clock.
//
// What follows the architecture: the memory of the population, the comparison
// with parent_worse, overwriting and forwarding the offspring, otherwise
// forwarding a random individual. This design's choices: the frame format,
// the initial population made by streaming INIT frames through the pipeline,
// strict "higher" comparison, the best-so-far register and the counters.
module ga_management
  import ga_pkg::*;
#(
  parameter int unsigned N        = CHROM_BITS_DEF,
  parameter int unsigned M        = BUS_BITS_DEF,
  parameter int unsigned POP      = POP_SIZE_DEF,
  parameter int unsigned FW       = FIT_BITS_DEF,
  parameter logic [31:0] SEED     = 32'h0BAD_5EED,
  localparam int unsigned AW      = (POP > 1) ? $clog2(POP) : 1,
  localparam int unsigned B       = (N + M - 1) / M
) (
  input  logic              clk,
  input  logic              rst_n,
  // to crossover / immigration
  output logic              o_valid,
  output logic              o_first,
  output logic              o_last,
  output logic [M-1:0]      o_data,
  output frame_kind_e       o_kind,
  output logic [AW-1:0]     o_addr,
  output logic [FW-1:0]     o_fit,
  // from evaluation
  input  logic              i_valid,
  input  logic              i_first,
  input  logic              i_last,
  input  logic [M-1:0]      i_data,
  input  frame_kind_e       i_kind,
  input  logic [AW-1:0]     i_pw_addr,
  input  logic [FW-1:0]     i_pw_fit,
  input  logic [FW-1:0]     i_off_fit,
  // status
  output logic              init_done,
  output logic [FW-1:0]     best_fit,
  output logic [N-1:0]      best_chrom,
  output logic [31:0]       n_offspring,
  output logic [31:0]       n_replaced
);
  localparam int unsigned PAD = B * M;
  localparam int unsigned BW  = (B > 1) ? $clog2(B) : 1;
  localparam int unsigned CW  = $clog2(POP + 1);

  logic [FW+PAD-1:0] pop_mem [POP];

  logic [M+15:0] rnd;
  ga_rng #(.OUT_W(M + 16), .SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(rnd)
  );

  // ---------------------------------------------------------------- return side
  logic [PAD-1:0] stage;
  logic [BW-1:0]  in_cnt;
  logic [BW-1:0]  in_idx;
  logic [PAD-1:0] full_chrom;
  logic           ret_done, accept;
  logic           pend_valid;
  logic [AW-1:0]  pend_addr;
  logic [CW-1:0]  init_wr_cnt;
  logic           best_valid;

  assign in_idx = i_first ? '0 : in_cnt;

  always_comb begin
    full_chrom = stage;
    full_chrom[in_idx*M +: M] = i_data;
  end

  assign ret_done = i_valid && i_last;
  assign accept   = ret_done && ((i_kind == FRAME_INIT) || (i_off_fit > i_pw_fit));

  always_ff @(posedge clk) begin
    if (i_valid) stage[in_idx*M +: M] <= i_data;
    if (accept)  pop_mem[i_pw_addr] <= {i_off_fit, full_chrom};
  end

  // ------------------------------------------------------------------ send side
  logic              out_active;
  logic [BW-1:0]     out_beat;
  frame_kind_e       out_kind;
  logic [AW-1:0]     out_addr;
  logic [FW+PAD-1:0] rd_q;
  logic [CW-1:0]     init_cnt;
  logic              slot_start;
  logic              init_sent, init_back;
  logic [AW-1:0]     rand_addr, ga_addr;

  assign slot_start = !out_active || (out_beat == BW'(B - 1));
  assign init_sent  = (init_cnt == CW'(POP));
  assign init_back  = (init_wr_cnt == CW'(POP));
  assign rand_addr  = AW'(rnd[M +: 16] % POP);
  assign ga_addr    = pend_valid ? pend_addr : rand_addr;
  assign init_done  = init_back;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_active  <= 1'b0;
      out_beat    <= '0;
      out_kind    <= FRAME_INIT;
      out_addr    <= '0;
      init_cnt    <= '0;
      init_wr_cnt <= '0;
      pend_valid  <= 1'b0;
      pend_addr   <= '0;
      in_cnt      <= '0;
      best_valid  <= 1'b0;
      best_fit    <= '0;
      best_chrom  <= '0;
      n_offspring <= '0;
      n_replaced  <= '0;
    end else begin
      // return side bookkeeping
      if (i_valid) in_cnt <= in_idx + BW'(1);
      if (ret_done && i_kind == FRAME_INIT) init_wr_cnt <= init_wr_cnt + CW'(1);
      if (ret_done && i_kind != FRAME_INIT) n_offspring <= n_offspring + 32'd1;
      if (accept && i_kind != FRAME_INIT)   n_replaced  <= n_replaced + 32'd1;
      if (accept && (!best_valid || i_off_fit > best_fit)) begin
        best_valid <= 1'b1;
        best_fit   <= i_off_fit;
        best_chrom <= full_chrom[N-1:0];
      end

      // send side
      if (slot_start) begin
        out_beat <= '0;
        if (!init_sent) begin
          out_active <= 1'b1;
          out_kind   <= FRAME_INIT;
          out_addr   <= AW'(init_cnt);
          init_cnt   <= init_cnt + CW'(1);
        end else if (!init_back) begin
          out_active <= 1'b0;
        end else begin
          out_active <= 1'b1;
          out_kind   <= FRAME_GA;
          out_addr   <= ga_addr;
        end
      end else begin
        out_beat <= out_beat + BW'(1);
      end

      // pending replacement: a new acceptance wins over consumption
      if (accept && i_kind != FRAME_INIT) begin
        pend_valid <= 1'b1;
        pend_addr  <= i_pw_addr;
      end else if (slot_start && init_sent && init_back) begin
        pend_valid <= 1'b0;
      end
    end
  end

  // memory read for the next frame, one clock ahead of its first beat
  always_ff @(posedge clk) begin
    if (slot_start && init_sent && init_back) rd_q <= pop_mem[ga_addr];
  end

  assign o_valid = out_active;
  assign o_first = out_active && (out_beat == '0);
  assign o_last  = out_active && (out_beat == BW'(B - 1));
  assign o_kind  = out_kind;
  assign o_addr  = out_addr;
  assign o_fit   = (out_kind == FRAME_INIT) ? '0 : rd_q[PAD +: FW];
  assign o_data  = (out_kind == FRAME_INIT) ? rnd[M-1:0] : rd_q[out_beat*M +: M];

  // a returning frame has exactly B beats
  a_ret_len: assert property (@(posedge clk) disable iff (!rst_n)
    (i_valid && i_last) |-> (in_idx == BW'(B - 1)));
  a_ret_first: assert property (@(posedge clk) disable iff (!rst_n)
    (i_valid && i_first) |-> !i_last || (B == 1));
endmodule
