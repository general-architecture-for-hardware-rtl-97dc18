// ga_pkg: types and constants shared by the genetic-algorithm pipeline.
//
// Every module of a GA pipeline streams one individual ("frame") as
// ceil(N/M) beats of M chromosome bits, one beat per clock, with side-band
// fields (frame kind, address, fitness) held constant over all beats of the
// frame. The frame kind tells the stages how to treat the chromosome:
//   FRAME_INIT    : a randomly generated chromosome of the initial population;
//                   crossover and mutation pass it unchanged and management
//                   writes it to the address it carries once it is evaluated.
//   FRAME_GA      : an ordinary individual taking part in crossover.
//   FRAME_MIGRANT : an individual received from the neighbouring pipeline;
//                   crossover and mutation pass it unchanged and management
//                   keeps it if it is fitter than the local individual it
//                   displaced.
// The frame kinds, the default sizes below and the knapsack instance are
// choices of this design; the streaming of M bits per clock and the default
// chromosome length of 64 bits (a 64-item knapsack) follow the architecture.
package ga_pkg;

  typedef enum logic [1:0] {
    FRAME_INIT    = 2'd0,
    FRAME_GA      = 2'd1,
    FRAME_MIGRANT = 2'd2
  } frame_kind_e;

  // Default sizes.
  localparam int unsigned CHROM_BITS_DEF = 64;  // n: 64-item knapsack
  localparam int unsigned BUS_BITS_DEF   = 8;   // m: bus width between modules
  localparam int unsigned POP_SIZE_DEF   = 32;  // individuals per pipeline
  localparam int unsigned FIT_BITS_DEF   = 16;  // fitness width
  localparam int unsigned N_PIPES_DEF    = 4;   // parallel pipelines (islands)

  // Knapsack instance, computed rather than tabulated:
  //   weight(i) = 5 + (13*i + 7) mod 23     (5 .. 27)
  //   value(i)  = 4 + (29*i + 3) mod 37     (4 .. 40)
  //   capacity  = floor(sum of all weights / 2)
  function automatic int unsigned ks_weight(int unsigned i);
    return 5 + ((13 * i + 7) % 23);
  endfunction

  function automatic int unsigned ks_value(int unsigned i);
    return 4 + ((29 * i + 3) % 37);
  endfunction

  function automatic int unsigned ks_capacity(int unsigned n_items);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < n_items; i++) s += ks_weight(i);
    return s / 2;
  endfunction

endpackage
