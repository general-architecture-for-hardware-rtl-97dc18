// ga_eval_knapsack: evaluation stage for the 0/1 knapsack problem.
//
// Bit i of the chromosome (bit j of beat k is item k*M + j) selects item i.
// Every clock the values and weights of the items selected in the incoming
// beat are added (M items per clock) to running sums, cleared by the first
// beat of a frame. The fitness is the value sum when the weight sum is within
// the capacity and 0 otherwise. Item values, weights and the capacity come
// from ga_pkg (ks_value, ks_weight, ks_capacity) and are constants after
// elaboration. Bits beyond N in the last beat are ignored.
//
// The chromosome, frame kind and parent_worse address/fitness pass through
// registered; the offspring fitness is valid on the output's last beat.
//
// Timing: one beat in and one beat out per clock, latency one clock; the
// fitness is ready with the last beat, so no extra clocks per frame.
//
// What follows the architecture: the evaluation module computes the fitness of
// the new individual and sends it with parent_worse's address and fitness to
// management, and the problem is a 64-item knapsack. This design's choices:
// the item values and weights, the capacity and the zero fitness of an
// overweight selection.
module ga_eval_knapsack
  import ga_pkg::*;
#(
  parameter int unsigned N   = CHROM_BITS_DEF,
  parameter int unsigned M   = BUS_BITS_DEF,
  parameter int unsigned POP = POP_SIZE_DEF,
  parameter int unsigned FW  = FIT_BITS_DEF,
  localparam int unsigned AW = (POP > 1) ? $clog2(POP) : 1,
  localparam int unsigned B  = (N + M - 1) / M
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
  output logic [FW-1:0] o_pw_fit,
  output logic [FW-1:0] o_off_fit
);
  localparam int unsigned BW  = (B > 1) ? $clog2(B) : 1;
  localparam int unsigned SW  = 32;
  localparam int unsigned CAP = ks_capacity(N);

  logic [BW-1:0] in_cnt, in_idx;
  logic [SW-1:0] beat_v, beat_w, acc_v, acc_w;

  assign in_idx = i_first ? '0 : in_cnt;

  always_comb begin
    beat_v = '0;
    beat_w = '0;
    for (int unsigned k = 0; k < B; k++) begin
      if (in_idx == BW'(k)) begin
        for (int unsigned j = 0; j < M; j++) begin
          if (k * M + j < N && i_data[j]) begin
            beat_v += SW'(ks_value(k * M + j));
            beat_w += SW'(ks_weight(k * M + j));
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      acc_v     <= '0;
      acc_w     <= '0;
      o_valid   <= 1'b0;
      o_first   <= 1'b0;
      o_last    <= 1'b0;
      o_data    <= '0;
      o_kind    <= FRAME_INIT;
      o_pw_addr <= '0;
      o_pw_fit  <= '0;
    end else begin
      if (i_valid) begin
        in_cnt <= in_idx + BW'(1);
        acc_v  <= (i_first ? '0 : acc_v) + beat_v;
        acc_w  <= (i_first ? '0 : acc_w) + beat_w;
      end
      o_valid   <= i_valid;
      o_first   <= i_valid && i_first;
      o_last    <= i_valid && i_last;
      o_data    <= i_data;
      o_kind    <= i_kind;
      o_pw_addr <= i_pw_addr;
      o_pw_fit  <= i_pw_fit;
    end
  end

  assign o_off_fit = (acc_w <= SW'(CAP)) ? FW'(acc_v) : '0;
endmodule
