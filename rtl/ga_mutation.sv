// ga_mutation: mutation stage.
//
// Each beat of an offspring (kind GA) is mutated with probability
// MUT_PROB/256: when a random byte is below MUT_PROB, one bit of the beat,
// chosen at random among the bits that belong to the chromosome (bit index
// below N), is inverted. The address and fitness of parent_worse pass with
// the chromosome. INIT and MIGRANT frames pass unchanged.
//
// Timing: one beat in and one beat out per clock, output registered, latency
// one clock.
//
// What follows the architecture: mutation of the offspring at a set
// probability and forwarding of parent_worse. This design's choices: the
// operator (at most one inverted bit per beat) and the probability scale.
module ga_mutation
  import ga_pkg::*;
#(
  parameter int unsigned N        = CHROM_BITS_DEF,
  parameter int unsigned M        = BUS_BITS_DEF,
  parameter int unsigned POP      = POP_SIZE_DEF,
  parameter int unsigned FW       = FIT_BITS_DEF,
  parameter int unsigned MUT_PROB = 32,     // out of 256, per beat
  parameter logic [31:0] SEED     = 32'h5EED_0003,
  localparam int unsigned AW      = (POP > 1) ? $clog2(POP) : 1,
  localparam int unsigned B       = (N + M - 1) / M
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  input  logic          i_first,
  input  logic          i_last,
  input  logic [M-1:0]  i_data,
  input  frame_kind_e   i_kind,
  input  logic [AW-1:0] i_pw_addr,
  input  logic [FW-1:0] i_pw_fit,
  output logic          o_valid,
  output logic          o_first,
  output logic          o_last,
  output logic [M-1:0]  o_data,
  output frame_kind_e   o_kind,
  output logic [AW-1:0] o_pw_addr,
  output logic [FW-1:0] o_pw_fit
);
  localparam int unsigned BW = (B > 1) ? $clog2(B) : 1;
  // bits of the chromosome in the last beat
  localparam int unsigned LAST_BITS = N - (B - 1) * M;

  logic [31:0]   rnd;
  logic [BW-1:0] in_cnt, in_idx;
  logic [15:0]   pos;
  logic          hit;
  logic [M-1:0]  flip;

  ga_rng #(.OUT_W(32), .SEED(SEED)) u_rng (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .rnd(rnd)
  );

  assign in_idx = i_first ? '0 : in_cnt;
  assign hit    = (i_kind == FRAME_GA) && (32'(rnd[7:0]) < MUT_PROB);
  assign pos    = (in_idx == BW'(B - 1)) ? 16'(rnd[31:8] % LAST_BITS)
                                         : 16'(rnd[31:8] % M);

  assign flip = hit ? (M'(1) << pos) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      o_valid   <= 1'b0;
      o_first   <= 1'b0;
      o_last    <= 1'b0;
      o_data    <= '0;
      o_kind    <= FRAME_INIT;
      o_pw_addr <= '0;
      o_pw_fit  <= '0;
    end else begin
      if (i_valid) in_cnt <= in_idx + BW'(1);
      o_valid   <= i_valid;
      o_first   <= i_valid && i_first;
      o_last    <= i_valid && i_last;
      o_data    <= i_data ^ flip;
      o_kind    <= i_kind;
      o_pw_addr <= i_pw_addr;
      o_pw_fit  <= i_pw_fit;
    end
  end
endmodule
