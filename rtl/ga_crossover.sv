// ga_crossover: crossover stage with the parent register r.
//
// Register r holds the chromosome, address and fitness of the latest GA
// individual received from the management module (parent1). While the next
// individual (parent2) streams in, M bits per clock, each beat is combined with
// the matching beat of parent1 by uniform crossover: a fresh random mask picks,
// bit by bit, parent1 (mask bit 1) or parent2 (mask bit 0). The same clock
// overwrites that beat of r with parent2, so at the end of the frame r holds
// parent2, ready to be parent1 for the next frame. The fitness values of the
// two parents are compared and the address and fitness of the worse one
// (parent_worse, lower fitness; parent2 on a tie) go out with every beat of
// the offspring.
//
// INIT and MIGRANT frames pass unchanged, carrying their own address and
// fitness as parent_worse, and do not touch r. The first GA frame after reset
// (r still empty) also passes unchanged.
//
// Timing: one beat in and one beat out per clock, output registered, latency
// one clock.
//
// What follows the architecture: register r, crossover of the incoming
// chromosome with r, forwarding the worse parent's address and fitness. This
// design's choices: uniform crossover (the operator is not specified), tie
// rule, handling of INIT/MIGRANT frames and of the empty r.
module ga_crossover
  import ga_pkg::*;
#(
  parameter int unsigned N    = CHROM_BITS_DEF,
  parameter int unsigned M    = BUS_BITS_DEF,
  parameter int unsigned POP  = POP_SIZE_DEF,
  parameter int unsigned FW   = FIT_BITS_DEF,
  parameter logic [31:0] SEED = 32'hC0FF_EE01,
  localparam int unsigned AW  = (POP > 1) ? $clog2(POP) : 1,
  localparam int unsigned B   = (N + M - 1) / M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  input  logic          i_first,
  input  logic          i_last,
  input  logic [M-1:0]  i_data,
  input  frame_kind_e   i_kind,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_fit,
  output logic          o_valid,
  output logic          o_first,
  output logic          o_last,
  output logic [M-1:0]  o_data,
  output frame_kind_e   o_kind,
  output logic [AW-1:0] o_pw_addr,
  output logic [FW-1:0] o_pw_fit
);
  localparam int unsigned BW = (B > 1) ? $clog2(B) : 1;

  logic [M-1:0]  r_chrom [B];
  logic [AW-1:0] r_addr;
  logic [FW-1:0] r_fit;
  logic          r_valid;
  logic [BW-1:0] in_cnt, in_idx;
  logic [M-1:0]  mask, p1, off;
  logic          do_cross, p1_worse;

  ga_rng #(.OUT_W(M), .SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(mask)
  );

  assign in_idx   = i_first ? '0 : in_cnt;
  assign p1       = r_chrom[in_idx];
  assign do_cross = (i_kind == FRAME_GA) && r_valid;
  assign off      = do_cross ? ((p1 & mask) | (i_data & ~mask)) : i_data;
  assign p1_worse = do_cross && (r_fit < i_fit);

  always_ff @(posedge clk) begin
    if (i_valid && i_kind == FRAME_GA) r_chrom[in_idx] <= i_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      r_valid   <= 1'b0;
      r_addr    <= '0;
      r_fit     <= '0;
      o_valid   <= 1'b0;
      o_first   <= 1'b0;
      o_last    <= 1'b0;
      o_data    <= '0;
      o_kind    <= FRAME_INIT;
      o_pw_addr <= '0;
      o_pw_fit  <= '0;
    end else begin
      if (i_valid) in_cnt <= in_idx + BW'(1);
      if (i_valid && i_last && i_kind == FRAME_GA) begin
        r_valid <= 1'b1;
        r_addr  <= i_addr;
        r_fit   <= i_fit;
      end
      o_valid   <= i_valid;
      o_first   <= i_valid && i_first;
      o_last    <= i_valid && i_last;
      o_data    <= off;
      o_kind    <= i_kind;
      o_pw_addr <= p1_worse ? r_addr : i_addr;
      o_pw_fit  <= p1_worse ? r_fit  : i_fit;
    end
  end
endmodule
