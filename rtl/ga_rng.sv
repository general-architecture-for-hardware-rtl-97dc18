// ga_rng: free-running pseudo-random source for the GA stages.
//
// OUT_W random bits per clock, made of ceil(OUT_W/32) independent 32-bit
// xorshift generators (x ^= x<<13; x ^= x>>17; x ^= x<<5). Each generator is
// seeded from SEED and its index; a zero seed is replaced so the state never
// sticks at zero. The output is the registered state, so it changes on every
// clock edge while `en` is high. The architecture needs random numbers for
// selection, crossover, mutation and the initial population but does not say
// how they are made: the generator is this design's choice.
module ga_rng #(
  parameter int unsigned OUT_W = 32,
  parameter logic [31:0] SEED  = 32'h1234_5678
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [OUT_W-1:0] rnd
);
  localparam int unsigned NG = (OUT_W + 31) / 32;

  logic [NG*32-1:0] state;

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] seed_of(int unsigned g);
    logic [31:0] s;
    s = SEED ^ (32'h9E37_79B9 * (g + 1));
    return (s == '0) ? 32'h0000_0001 : s;
  endfunction

  for (genvar g = 0; g < NG; g++) begin : g_gen
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  state[g*32 +: 32] <= seed_of(g);
      else if (en) state[g*32 +: 32] <= xorshift32(state[g*32 +: 32]);
    end
  end

  assign rnd = state[OUT_W-1:0];
endmodule
