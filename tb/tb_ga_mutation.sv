// tb_ga_mutation: self-checking test of the mutation stage.
//
// Two instances: one with MUT_PROB = 256 (every GA beat mutated) and one with
// MUT_PROB = 0 (never). Frames of all kinds are streamed back to back. Checks,
// one clock after each input beat: framing, kind and parent_worse pass
// unchanged; with probability 0 the data is unchanged; with probability 256 a
// GA beat differs in exactly one bit, lying inside the chromosome, and
// INIT/MIGRANT beats are unchanged. N = 60 leaves 4 padding bits in the last
// beat, which must never be flipped. A third instance with the default
// probability (32/256) must mutate some but not all GA beats.
module tb_ga_mutation;
  import ga_pkg::*;
  localparam int unsigned N = 60, M = 8, POP = 32, FW = 16;
  localparam int unsigned AW = $clog2(POP), B = (N + M - 1) / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_first = 1'b0, i_last = 1'b0;
  logic [M-1:0] i_data = '0;
  frame_kind_e i_kind = FRAME_GA;
  logic [AW-1:0] i_pw_addr = '0;
  logic [FW-1:0] i_pw_fit = '0;

  logic a_valid, a_first, a_last, z_valid, z_first, z_last, d_valid, d_first, d_last;
  logic [M-1:0] a_data, z_data, d_data;
  frame_kind_e a_kind, z_kind, d_kind;
  logic [AW-1:0] a_addr, z_addr, d_addr;
  logic [FW-1:0] a_fit, z_fit, d_fit;

  int checks = 0, failures = 0;
  int dflt_mut = 0, dflt_ga = 0;

  ga_mutation #(.N(N), .M(M), .POP(POP), .FW(FW), .MUT_PROB(256)) dut_all (
    .clk, .rst_n, .i_valid, .i_first, .i_last, .i_data, .i_kind, .i_pw_addr, .i_pw_fit,
    .o_valid(a_valid), .o_first(a_first), .o_last(a_last), .o_data(a_data),
    .o_kind(a_kind), .o_pw_addr(a_addr), .o_pw_fit(a_fit));
  ga_mutation #(.N(N), .M(M), .POP(POP), .FW(FW), .MUT_PROB(0)) dut_none (
    .clk, .rst_n, .i_valid, .i_first, .i_last, .i_data, .i_kind, .i_pw_addr, .i_pw_fit,
    .o_valid(z_valid), .o_first(z_first), .o_last(z_last), .o_data(z_data),
    .o_kind(z_kind), .o_pw_addr(z_addr), .o_pw_fit(z_fit));
  ga_mutation #(.N(N), .M(M), .POP(POP), .FW(FW)) dut_dflt (
    .clk, .rst_n, .i_valid, .i_first, .i_last, .i_data, .i_kind, .i_pw_addr, .i_pw_fit,
    .o_valid(d_valid), .o_first(d_first), .o_last(d_last), .o_data(d_data),
    .o_kind(d_kind), .o_pw_addr(d_addr), .o_pw_fit(d_fit));

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  logic e_valid = 1'b0, e_first, e_last;
  logic [M-1:0] e_data;
  frame_kind_e e_kind;
  logic [AW-1:0] e_addr;
  logic [FW-1:0] e_fit;

  always @(posedge clk) begin
    e_valid <= i_valid; e_first <= i_first; e_last <= i_last;
    e_data <= i_data; e_kind <= i_kind; e_addr <= i_pw_addr; e_fit <= i_pw_fit;
  end

  always @(negedge clk) if (rst_n) begin
    check("valid", a_valid, e_valid);
    check("valid0", z_valid, e_valid);
    if (e_valid) begin
      check("first", a_first, e_first);
      check("last", a_last, e_last);
      check("kind", a_kind, e_kind);
      check("pw_addr", a_addr, e_addr);
      check("pw_fit", a_fit, e_fit);
      check("first0", z_first, e_first);
      check("last0", z_last, e_last);
      check("kind0", z_kind, e_kind);
      check("pw_addr0", z_addr, e_addr);
      check("pw_fit0", z_fit, e_fit);
      check("data unchanged at p=0", z_data, e_data);
      if (e_kind == FRAME_GA) begin
        check("one bit flipped at p=1", $countones(a_data ^ e_data), 1);
        if (e_last) check("padding untouched", (a_data ^ e_data) >> (N - (B - 1) * M), 0);
        dflt_ga++;
        if (d_data != e_data) dflt_mut++;
      end else begin
        check("init/migrant unchanged", a_data, e_data);
        check("init/migrant unchanged (default)", d_data, e_data);
      end
    end
  end

  task automatic send(frame_kind_e k);
    logic [AW-1:0] a;
    logic [FW-1:0] f;
    a = AW'($urandom);
    f = FW'($urandom);
    for (int b = 0; b < B; b++) begin
      @(negedge clk);
      i_valid = 1'b1; i_first = (b == 0); i_last = (b == B - 1);
      i_data = M'($urandom); i_kind = k; i_pw_addr = a; i_pw_fit = f;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++) send(frame_kind_e'($urandom % 3));
    @(negedge clk);
    i_valid = 1'b0; i_first = 1'b0; i_last = 1'b0;
    repeat (3) @(negedge clk);
    // default rate 32/256 = 12.5 % of GA beats
    check("default rate mutates some beats", dflt_mut > dflt_ga / 20, 1);
    check("default rate leaves most beats", dflt_mut < dflt_ga / 4, 1);
    $display("default-rate mutations: %0d of %0d GA beats", dflt_mut, dflt_ga);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
