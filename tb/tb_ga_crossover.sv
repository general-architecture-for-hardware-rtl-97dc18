// tb_ga_crossover: self-checking test of the crossover stage.
//
// A model of register r (chromosome, address, fitness, filled flag) is kept
// here. Frames of all kinds with random chromosomes, addresses and fitness
// values (small range, so ties occur) are streamed back to back. One clock
// after each input beat the output is checked: for a GA frame with r filled,
// every offspring bit must come from parent1 or parent2 and parent_worse must
// be the parent with the lower fitness (parent2 on a tie); otherwise the
// chromosome passes unchanged with the frame's own address and fitness. Bits
// taken from each parent are counted, and both must occur.
module tb_ga_crossover;
  import ga_pkg::*;
  localparam int unsigned N = 64, M = 8, POP = 32, FW = 16;
  localparam int unsigned AW = $clog2(POP), B = (N + M - 1) / M;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_first = 1'b0, i_last = 1'b0;
  logic [M-1:0] i_data = '0;
  frame_kind_e i_kind = FRAME_GA;
  logic [AW-1:0] i_addr = '0;
  logic [FW-1:0] i_fit = '0;
  logic o_valid, o_first, o_last;
  logic [M-1:0] o_data;
  frame_kind_e o_kind;
  logic [AW-1:0] o_pw_addr;
  logic [FW-1:0] o_pw_fit;

  int checks = 0, failures = 0;
  int from_p1 = 0, from_p2 = 0, p1_worse_cnt = 0, p2_worse_cnt = 0, ties = 0, crossed = 0;

  ga_crossover #(.N(N), .M(M), .POP(POP), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // model of register r
  logic [N-1:0]  r_chrom;
  logic [AW-1:0] r_addr;
  logic [FW-1:0] r_fit;
  logic          r_full = 1'b0;
  int            beat_no = 0;

  // expectation for the next falling edge
  logic e_valid = 1'b0, e_first, e_last, e_cross;
  logic [M-1:0] e_p1, e_p2;
  frame_kind_e e_kind;
  logic [AW-1:0] e_addr;
  logic [FW-1:0] e_fit;

  always @(posedge clk) begin
    e_valid <= i_valid; e_first <= i_first; e_last <= i_last; e_kind <= i_kind;
    e_p2 <= i_data;
    if (i_valid) begin
      if (i_first) beat_no = 0;
      e_p1 <= r_chrom[beat_no*M +: M];
      e_cross <= (i_kind == FRAME_GA) && r_full;
      if ((i_kind == FRAME_GA) && r_full && (r_fit < i_fit)) begin
        e_addr <= r_addr; e_fit <= r_fit;
      end else begin
        e_addr <= i_addr; e_fit <= i_fit;
      end
      if (i_kind == FRAME_GA) begin
        r_chrom[beat_no*M +: M] = i_data;
        if (i_last) begin
          r_full = 1'b1; r_addr = i_addr; r_fit = i_fit;
        end
      end
      beat_no++;
    end
  end

  always @(negedge clk) if (rst_n) begin
    check("valid", o_valid, e_valid);
    if (e_valid) begin
      check("first", o_first, e_first);
      check("last", o_last, e_last);
      check("kind", o_kind, e_kind);
      check("pw_addr", o_pw_addr, e_addr);
      check("pw_fit", o_pw_fit, e_fit);
      if (e_cross) begin
        check("offspring bits from a parent", (o_data ^ e_p1) & (o_data ^ e_p2), 0);
        from_p1 += $countones((o_data ~^ e_p1) & (e_p1 ^ e_p2));
        from_p2 += $countones((o_data ~^ e_p2) & (e_p1 ^ e_p2));
        if (e_first) begin
          crossed++;
          if (e_fit != i_fit || e_addr != i_addr) p1_worse_cnt++; else p2_worse_cnt++;
        end
      end else begin
        check("pass-through data", o_data, e_p2);
      end
    end
  end

  task automatic send(frame_kind_e k);
    logic [AW-1:0] a;
    logic [FW-1:0] f;
    a = AW'($urandom);
    f = FW'($urandom % 8);
    if (k == FRAME_GA && r_full && f == r_fit) ties++;
    for (int b = 0; b < B; b++) begin
      @(negedge clk);
      i_valid = 1'b1; i_first = (b == 0); i_last = (b == B - 1);
      i_data = M'($urandom); i_kind = k; i_addr = a; i_fit = f;
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
    send(FRAME_INIT);
    send(FRAME_GA);          // r empty: passes unchanged
    for (int k = 0; k < 500; k++)
      send(($urandom % 4 == 0) ? frame_kind_e'($urandom % 3) : FRAME_GA);
    @(negedge clk);
    i_valid = 1'b0; i_first = 1'b0; i_last = 1'b0;
    repeat (3) @(negedge clk);
    $display("crossovers %0d: parent1 worse %0d, parent2 worse %0d, ties %0d; bits from p1 %0d, from p2 %0d",
             crossed, p1_worse_cnt, p2_worse_cnt, ties, from_p1, from_p2);
    check("bits taken from parent1", from_p1 > 0, 1);
    check("bits taken from parent2", from_p2 > 0, 1);
    check("parent1 was worse", p1_worse_cnt > 0, 1);
    check("parent2 was worse", p2_worse_cnt > 0, 1);
    check("ties occurred", ties > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
