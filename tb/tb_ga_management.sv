// tb_ga_management: self-checking test of the management module.
//
// The testbench stands in for the rest of the pipeline: every beat the module
// sends comes back L = 3 clocks later, as a returning frame whose contents the
// testbench chooses (for GA frames a random offspring chromosome, a random
// parent_worse address and random fitness values, so that offspring are both
// kept and rejected; some frames come back as MIGRANT). A model of the
// population memory is updated by the replacement rule. Checks:
//   * the first POP frames are INIT frames for addresses 0..POP-1;
//   * no GA frame leaves before every INIT frame has come back;
//   * GA frames then leave back to back, one every B clocks;
//   * every GA frame carries exactly the chromosome and fitness the model
//     holds for its address;
//   * after a kept offspring the next frame whose memory read follows the
//     write sends that offspring (address checked);
//   * counters, best fitness and best chromosome match the model.
module tb_ga_management;
  import ga_pkg::*;
  localparam int unsigned N = 64, M = 8, POP = 8, FW = 16, L = 3;
  localparam int unsigned AW = $clog2(POP), B = (N + M - 1) / M;

  typedef struct packed {
    logic          valid, first, last;
    logic [M-1:0]  data;
    frame_kind_e   kind;
    logic [AW-1:0] pw_addr;
    logic [FW-1:0] pw_fit, off_fit;
  } ret_beat_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic o_valid, o_first, o_last;
  logic [M-1:0] o_data;
  frame_kind_e o_kind;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;
  logic i_valid, i_first, i_last;
  logic [M-1:0] i_data;
  frame_kind_e i_kind;
  logic [AW-1:0] i_pw_addr;
  logic [FW-1:0] i_pw_fit, i_off_fit;
  logic init_done;
  logic [FW-1:0] best_fit;
  logic [N-1:0] best_chrom;
  logic [31:0] n_offspring, n_replaced;

  ret_beat_t dl [L];

  assign i_valid   = dl[L-1].valid;
  assign i_first   = dl[L-1].first;
  assign i_last    = dl[L-1].last;
  assign i_data    = dl[L-1].data;
  assign i_kind    = dl[L-1].kind;
  assign i_pw_addr = dl[L-1].pw_addr;
  assign i_pw_fit  = dl[L-1].pw_fit;
  assign i_off_fit = dl[L-1].off_fit;

  ga_management #(.N(N), .M(M), .POP(POP), .FW(FW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (edge %0d)", what, got, exp, edge_no);
    end
  endtask

  // population model
  logic [N-1:0]  ref_chrom [POP];
  logic [FW-1:0] ref_fit   [POP];
  int edge_no = 0;
  int init_sent = 0, init_back = 0, ga_frames = 0;
  int n_kept = 0, n_rejected = 0, n_returned = 0, pend_served = 0, random_sent = 0;
  logic          pend = 1'b0;
  logic [AW-1:0] pend_addr;
  int            pend_edge;
  logic [FW-1:0] m_best_fit = '0;
  logic [N-1:0]  m_best_chrom = '0;
  logic          m_best_valid = 1'b0;
  logic [N-1:0]  asm_chrom;
  int            in_beat = 0, out_beat = 0;
  logic [N-1:0]  f_chrom;
  logic [FW-1:0] f_fit;
  logic [AW-1:0] f_addr;
  frame_kind_e   f_kind;
  logic          ga_phase = 1'b0;
  ret_beat_t     nb;
  frame_kind_e   r_kind;
  logic [AW-1:0] r_addr;
  logic [FW-1:0] r_pw_fit, r_off_fit;

  always @(posedge clk) if (rst_n) begin
    edge_no++;
    // 1. returning frame as seen by the module at this edge
    if (i_valid) begin
      if (i_first) in_beat = 0;
      asm_chrom[in_beat*M +: M] = i_data;
      in_beat++;
      if (i_last) begin
        if (i_kind == FRAME_INIT) init_back++; else n_returned++;
        if (i_kind == FRAME_INIT || i_off_fit > i_pw_fit) begin
          ref_chrom[i_pw_addr] = asm_chrom;
          ref_fit[i_pw_addr]   = i_off_fit;
          if (!m_best_valid || i_off_fit > m_best_fit) begin
            m_best_valid = 1'b1; m_best_fit = i_off_fit; m_best_chrom = asm_chrom;
          end
          if (i_kind != FRAME_INIT) begin
            n_kept++; pend = 1'b1; pend_addr = i_pw_addr; pend_edge = edge_no;
          end
        end else n_rejected++;
      end
    end
    // 2. frame sent by the module
    if (ga_phase) check("GA frames back to back", o_valid, 1);
    if (o_valid) begin
      if (o_first) begin
        out_beat = 0;
        f_kind = o_kind; f_addr = o_addr;
        if (o_kind == FRAME_INIT) begin
          check("init address", o_addr, init_sent);
          init_sent++;
        end else begin
          check("kind GA", o_kind, FRAME_GA);
          check("GA frame only after all INIT frames are back", init_back, POP);
          ga_phase = 1'b1;
          ga_frames++;
          if (pend && pend_edge <= edge_no - 2) begin
            check("kept offspring sent next", o_addr, pend_addr);
            pend = 1'b0; pend_served++;
          end else random_sent++;
          f_chrom = ref_chrom[o_addr];
          f_fit   = ref_fit[o_addr];
        end
      end
      check("first", o_first, out_beat == 0);
      check("last", o_last, out_beat == B - 1);
      check("addr stable", o_addr, f_addr);
      check("kind stable", o_kind, f_kind);
      if (f_kind != FRAME_INIT) begin
        check("chromosome from memory", o_data, f_chrom[out_beat*M +: M]);
        check("fitness from memory", o_fit, f_fit);
      end
      // build the beat that returns L clocks later
      if (o_first) begin
        r_kind    = (o_kind == FRAME_INIT) ? FRAME_INIT
                  : (($urandom % 6 == 0) ? FRAME_MIGRANT : FRAME_GA);
        r_addr    = (o_kind == FRAME_INIT) ? o_addr : AW'($urandom);
        r_pw_fit  = (o_kind == FRAME_INIT) ? '0 : FW'($urandom % 1000);
        r_off_fit = FW'($urandom % 1000);
      end
      nb.valid = 1'b1; nb.first = o_first; nb.last = o_last;
      nb.data  = (o_kind == FRAME_INIT) ? o_data : M'($urandom);
      nb.kind  = r_kind; nb.pw_addr = r_addr; nb.pw_fit = r_pw_fit; nb.off_fit = r_off_fit;
      out_beat++;
    end else begin
      nb = '0;
    end
    dl[0] <= nb;
    for (int k = 1; k < L; k++) dl[k] <= dl[k-1];
  end

  initial begin
    for (int k = 0; k < L; k++) dl[k] = '0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (ga_frames == 400);
    @(negedge clk);
    $display("init %0d/%0d, GA frames %0d, kept %0d, rejected %0d, kept sent %0d, random sent %0d",
             init_sent, init_back, ga_frames, n_kept, n_rejected, pend_served, random_sent);
    check("init_done", init_done, 1);
    check("n_offspring", n_offspring, n_returned);
    check("n_replaced", n_replaced, n_kept);
    check("best_fit", best_fit, m_best_fit);
    check("best_chrom", best_chrom, m_best_chrom);
    check("offspring kept", n_kept > 0, 1);
    check("offspring rejected", n_rejected > 0, 1);
    check("kept offspring forwarded", pend_served > 0, 1);
    check("random individuals sent", random_sent > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
