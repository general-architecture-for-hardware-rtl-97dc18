// ga_immigration: individual exchange between neighbouring GA pipelines.
//
// Sits between the management module and the crossover module of its own
// pipeline and also sees the frames sent by the management module of the
// neighbouring pipeline. Normally it forwards its own pipeline's frames. It
// counts the GA frames it forwards; on every PERIOD-th one, if the neighbour
// is sending a GA frame that starts on the same clock, it forwards the
// neighbour's chromosome instead, as a MIGRANT frame. The migrant carries the
// address and fitness of the local individual it displaced, so the management
// module later keeps the migrant in that slot if, once evaluated, it is fitter
// than the displaced individual. When the neighbour has no frame ready the
// migration waits for the next own GA frame.
//
// All pipelines of a parallel design start from the same reset and send frames
// of the same length at the same rate, so their frames are aligned clock for
// clock; an assertion checks this at every migration.
//
// Timing: one beat in and one beat out per clock, output registered, latency
// one clock.
//
// What follows the architecture: the module's position between management and
// crossover, its connection to the neighbour's management module and the
// periodic reception of individuals. This design's choices: the period, how a
// migrant enters the population, the frame alignment.
module ga_immigration
  import ga_pkg::*;
#(
  parameter int unsigned M      = BUS_BITS_DEF,
  parameter int unsigned POP    = POP_SIZE_DEF,
  parameter int unsigned FW     = FIT_BITS_DEF,
  parameter int unsigned PERIOD = 16,
  localparam int unsigned AW    = (POP > 1) ? $clog2(POP) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // own management module
  input  logic          i_valid,
  input  logic          i_first,
  input  logic          i_last,
  input  logic [M-1:0]  i_data,
  input  frame_kind_e   i_kind,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_fit,
  // neighbouring pipeline's management module
  input  logic          nb_valid,
  input  logic          nb_first,
  input  logic [M-1:0]  nb_data,
  input  frame_kind_e   nb_kind,
  // to crossover
  output logic          o_valid,
  output logic          o_first,
  output logic          o_last,
  output logic [M-1:0]  o_data,
  output frame_kind_e   o_kind,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit,
  output logic [31:0]   n_migrants
);
  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] cnt;
  logic          due, start_mig, mig_hold, mig;

  assign due       = (cnt == PW'(PERIOD - 1));
  assign start_mig = i_valid && i_first && (i_kind == FRAME_GA) && due &&
                     nb_valid && nb_first && (nb_kind == FRAME_GA);
  assign mig       = i_first ? start_mig : mig_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      mig_hold   <= 1'b0;
      n_migrants <= '0;
      o_valid    <= 1'b0;
      o_first    <= 1'b0;
      o_last     <= 1'b0;
      o_data     <= '0;
      o_kind     <= FRAME_INIT;
      o_addr     <= '0;
      o_fit      <= '0;
    end else begin
      if (i_valid && i_first && i_kind == FRAME_GA) begin
        if (start_mig)  cnt <= '0;
        else if (!due)  cnt <= cnt + PW'(1);
      end
      if (i_valid && i_first) mig_hold <= start_mig;
      if (start_mig) n_migrants <= n_migrants + 32'd1;
      o_valid <= i_valid;
      o_first <= i_valid && i_first;
      o_last  <= i_valid && i_last;
      o_data  <= (i_valid && mig) ? nb_data : i_data;
      o_kind  <= (i_valid && mig) ? FRAME_MIGRANT : i_kind;
      o_addr  <= i_addr;
      o_fit   <= i_fit;
    end
  end

  // a migrant frame runs beat for beat with the neighbour's frame
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    (i_valid && !i_first && mig_hold) |-> (nb_valid && !nb_first));
endmodule
