// tb_ga_eval_knapsack: self-checking test of the knapsack evaluation stage.
//
// Streams frames back to back (all-zero, all-one, single items, random) and
// checks every output beat one clock after its input beat: data, framing,
// kind and parent_worse fields pass unchanged, and on the last beat the
// fitness equals a reference computed here bit by bit from the item table
// (value sum, or 0 when the weight sum exceeds the capacity).
module tb_ga_eval_knapsack;
  import ga_pkg::*;
  localparam int unsigned N = 64, M = 8, POP = 32, FW = 16;
  localparam int unsigned AW = $clog2(POP), B = (N + M - 1) / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_first = 1'b0, i_last = 1'b0;
  logic [M-1:0] i_data = '0;
  frame_kind_e i_kind = FRAME_GA;
  logic [AW-1:0] i_pw_addr = '0;
  logic [FW-1:0] i_pw_fit = '0;
  logic o_valid, o_first, o_last;
  logic [M-1:0] o_data;
  frame_kind_e o_kind;
  logic [AW-1:0] o_pw_addr;
  logic [FW-1:0] o_pw_fit, o_off_fit;

  int checks = 0, failures = 0;

  ga_eval_knapsack #(.N(N), .M(M), .POP(POP), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  function automatic int unsigned ref_fit(logic [N-1:0] c);
    int unsigned v, w, cap;
    v = 0; w = 0; cap = 0;
    for (int i = 0; i < N; i++) cap += 5 + ((13 * i + 7) % 23);
    cap = cap / 2;
    for (int i = 0; i < N; i++)
      if (c[i]) begin
        v += 4 + ((29 * i + 3) % 37);
        w += 5 + ((13 * i + 7) % 23);
      end
    return (w <= cap) ? v : 0;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // expectation recorded at each rising edge, checked at the next falling edge
  logic e_valid = 1'b0, e_first, e_last;
  logic [M-1:0] e_data;
  frame_kind_e e_kind;
  logic [AW-1:0] e_addr;
  logic [FW-1:0] e_fit;
  logic [N-1:0] asm_chrom = '0;
  int beat_no = 0;
  int nonzero = 0, zero_over = 0;

  always @(posedge clk) begin
    e_valid <= i_valid; e_first <= i_first; e_last <= i_last;
    e_data <= i_data; e_kind <= i_kind; e_addr <= i_pw_addr; e_fit <= i_pw_fit;
    if (i_valid) begin
      if (i_first) beat_no = 0;
      asm_chrom[beat_no*M +: M] = i_data;
      beat_no++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check("valid", o_valid, e_valid);
    if (e_valid) begin
      check("data", o_data, e_data);
      check("first", o_first, e_first);
      check("last", o_last, e_last);
      check("kind", o_kind, e_kind);
      check("pw_addr", o_pw_addr, e_addr);
      check("pw_fit", o_pw_fit, e_fit);
      if (e_last) begin
        check("off_fit", o_off_fit, ref_fit(asm_chrom));
        if (o_off_fit != 0) nonzero++; else zero_over++;
      end
    end
  end

  task automatic send(logic [N-1:0] c);
    logic [AW-1:0] a;
    logic [FW-1:0] f;
    a = AW'($urandom);
    f = FW'($urandom);
    for (int b = 0; b < B; b++) begin
      @(negedge clk);
      i_valid = 1'b1; i_first = (b == 0); i_last = (b == B - 1);
      i_data = c[b*M +: M];
      i_kind = frame_kind_e'($urandom % 3);
      if (b == 0) begin i_pw_addr = a; i_pw_fit = f; end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send('0);
    send('1);
    for (int i = 0; i < N; i++) send(N'(1) << i);
    for (int k = 0; k < 300; k++) send({$urandom, $urandom} & {$urandom, $urandom} | {$urandom, $urandom} & {32'h0, $urandom});
    for (int k = 0; k < 200; k++) send({$urandom, $urandom});
    @(negedge clk);
    i_valid = 1'b0; i_first = 1'b0; i_last = 1'b0;
    repeat (4) @(negedge clk);
    // both outcomes of the capacity test must have been seen
    check("feasible frames seen", nonzero > 0, 1);
    check("overweight frames seen", zero_over > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
