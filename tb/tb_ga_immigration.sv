// tb_ga_immigration: self-checking test of the immigration stage.
//
// Drives the own and the neighbour stream with aligned frames (the neighbour
// sometimes idle or sending INIT frames) and keeps a model of the migration
// counter (PERIOD = 4 here). One clock after each input beat the output must
// be the own frame, or, for a migration, the neighbour's chromosome as a
// MIGRANT frame with the own address and fitness. Migrations that had to wait
// for the neighbour are counted and must occur.
module tb_ga_immigration;
  import ga_pkg::*;
  localparam int unsigned M = 8, POP = 32, FW = 16, PERIOD = 4, B = 8;
  localparam int unsigned AW = $clog2(POP);

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_first = 1'b0, i_last = 1'b0;
  logic [M-1:0] i_data = '0;
  frame_kind_e i_kind = FRAME_GA;
  logic [AW-1:0] i_addr = '0;
  logic [FW-1:0] i_fit = '0;
  logic nb_valid = 1'b0, nb_first = 1'b0;
  logic [M-1:0] nb_data = '0;
  frame_kind_e nb_kind = FRAME_GA;
  logic o_valid, o_first, o_last;
  logic [M-1:0] o_data;
  frame_kind_e o_kind;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;
  logic [31:0] n_migrants;

  int checks = 0, failures = 0, migrations = 0, delayed = 0;

  ga_immigration #(.M(M), .POP(POP), .FW(FW), .PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int cnt = 0;
  logic mig_frame = 1'b0;
  logic e_valid = 1'b0, e_first, e_last;
  logic [M-1:0] e_data;
  frame_kind_e e_kind;
  logic [AW-1:0] e_addr;
  logic [FW-1:0] e_fit;

  always @(posedge clk) begin
    if (i_valid && i_first) begin
      mig_frame = 1'b0;
      if (i_kind == FRAME_GA) begin
        if (cnt == PERIOD - 1) begin
          if (nb_valid && nb_first && nb_kind == FRAME_GA) begin
            mig_frame = 1'b1; cnt = 0; migrations++;
          end else delayed++;
        end else cnt++;
      end
    end
    e_valid <= i_valid; e_first <= i_first; e_last <= i_last;
    e_addr <= i_addr; e_fit <= i_fit;
    e_data <= (i_valid && mig_frame) ? nb_data : i_data;
    e_kind <= (i_valid && mig_frame) ? FRAME_MIGRANT : i_kind;
  end

  always @(negedge clk) if (rst_n) begin
    check("valid", o_valid, e_valid);
    if (e_valid) begin
      check("first", o_first, e_first);
      check("last", o_last, e_last);
      check("kind", o_kind, e_kind);
      check("data", o_data, e_data);
      check("addr", o_addr, e_addr);
      check("fit", o_fit, e_fit);
    end
  end

  task automatic send(frame_kind_e k, bit nb_on, frame_kind_e nk);
    logic [AW-1:0] a;
    logic [FW-1:0] f;
    a = AW'($urandom);
    f = FW'($urandom);
    for (int b = 0; b < B; b++) begin
      @(negedge clk);
      i_valid = 1'b1; i_first = (b == 0); i_last = (b == B - 1);
      i_data = M'($urandom); i_kind = k; i_addr = a; i_fit = f;
      nb_valid = nb_on; nb_first = nb_on && (b == 0);
      nb_data = M'($urandom); nb_kind = nk;
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
    for (int k = 0; k < 5; k++) send(FRAME_INIT, 1'b1, FRAME_INIT);
    for (int k = 0; k < 400; k++)
      send(($urandom % 5 == 0) ? FRAME_MIGRANT : FRAME_GA,
           ($urandom % 4 != 0), ($urandom % 4 == 0) ? FRAME_INIT : FRAME_GA);
    @(negedge clk);
    i_valid = 1'b0; i_first = 1'b0; i_last = 1'b0; nb_valid = 1'b0; nb_first = 1'b0;
    repeat (3) @(negedge clk);
    $display("migrations %0d, waits for the neighbour %0d", migrations, delayed);
    check("migrant counter", n_migrants, migrations);
    check("migrations occurred", migrations > 10, 1);
    check("waits occurred", delayed > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
