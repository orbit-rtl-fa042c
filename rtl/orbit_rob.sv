// orbit_rob: one thread's reorder buffer with operand-readiness-based
// dispatch into the issue queue.
//
// Dispatch happens in two steps. Allocation (alloc_*) writes renamed
// instructions into the ROB in program order; their issue-queue entry is
// reserved by the core at the same time. The instruction then stays in the
// ROB until it may enter the issue queue. Each entry looks up its two
// source registers in the readiness arrays (src_preg -> act_rdy, pred_rdy)
// and one AND gate per entry combines the two answers. Under the active
// scheme an entry is eligible when:
//   - both sources are actually ready, or
//   - (Predict schemes) both are ready or predicted ready in one cycle, or
//   - (DelayACE schemes) the instruction carries the un-ACE tag.
// Eligible entries are offered oldest first, up to DISP_W per cycle
// (cand_*), even when older entries still wait: dispatch into the issue
// queue is out of order, commit stays in order. A granted candidate is
// marked as in the issue queue from the next cycle on.
//
// Completion reports (wb_*) for this thread mark entries done. The head
// run of done entries is offered for commit (head_done_n, commit_inst) and
// commit_n of them retire at the clock edge.
//
// Timing: everything registered; alloc, grant, wb and commit all take
// effect at the clock edge; cand_* are combinational from the state and
// the array lookups.
//
// From the text: ROB-resident waiting, reserved IQ entry, per-entry AND
// gate, out-of-order dispatch with in-order commit, the ACE-only rule. This
// design's choices: oldest-first candidate order and no squash (branch
// recovery is outside this model).
module orbit_rob
  import orbit_pkg::*;
#(
  parameter int unsigned TID      = 0,
  parameter int unsigned ROB_SIZE = ROB_SIZE_D,
  parameter int unsigned ALLOC_W  = WIDTH_D,
  parameter int unsigned DISP_W   = WIDTH_D,
  parameter int unsigned COMMIT_W = WIDTH_D,
  parameter int unsigned WB_W     = N_IALU_D + N_IMD_D + N_FPALU_D + N_FPMD_D + N_LS_D,
  localparam int unsigned CNT_W   = $clog2(ROB_SIZE + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  scheme_e          scheme,
  // allocation (all slots; this ROB takes those with inst.tid == TID)
  input  logic             alloc_v    [ALLOC_W],
  input  inst_t            alloc_inst [ALLOC_W],
  output logic [CNT_W-1:0] free_cnt,
  output logic [CNT_W-1:0] held_cnt,   // allocated, not yet in the issue queue
  // readiness lookup: entry e uses ports 2e (src1) and 2e+1 (src2)
  output preg_t            src_preg   [2*ROB_SIZE],
  input  logic             act_rdy    [2*ROB_SIZE],
  input  logic             pred_rdy   [2*ROB_SIZE],
  // dispatch candidates, oldest first
  output logic             cand_v     [DISP_W],
  output iq_op_t           cand_op    [DISP_W],
  output logic             cand_r1    [DISP_W],   // src1 actually ready now
  output logic             cand_r2    [DISP_W],   // src2 actually ready now
  output logic             cand_early [DISP_W],   // eligible only through prediction
  output logic             cand_unace [DISP_W],   // eligible only through the un-ACE rule
  input  logic             grant      [DISP_W],
  // completion
  input  logic             wb_v       [WB_W],
  input  wb_t              wb         [WB_W],
  // commit
  output logic [$clog2(COMMIT_W+1)-1:0] head_done_n,
  output inst_t            commit_inst [COMMIT_W],
  input  logic [$clog2(COMMIT_W+1)-1:0] commit_n
);

  typedef struct packed {
    logic  valid;
    logic  in_iq;
    logic  done;
    inst_t inst;
  } entry_t;

  entry_t           ent_q [ROB_SIZE];
  robi_t            head_q, tail_q;
  logic [CNT_W-1:0] count_q;

  function automatic robi_t wrap(int unsigned i);
    return robi_t'(i % ROB_SIZE);
  endfunction

  // ---- readiness: lookup addresses and the per-entry AND gate ----------
  logic use_pred, ace_only;
  logic rdy_act  [ROB_SIZE];   // both sources actually ready
  logic rdy_pred [ROB_SIZE];   // both ready or predicted ready
  logic elig     [ROB_SIZE];

  assign use_pred = scheme_predicts(scheme);
  assign ace_only = scheme_ace_only(scheme);

  always_comb
    for (int e = 0; e < ROB_SIZE; e++) begin
      src_preg[2*e]   = ent_q[e].inst.src1_v ? ent_q[e].inst.src1 : '0;
      src_preg[2*e+1] = ent_q[e].inst.src2_v ? ent_q[e].inst.src2 : '0;
    end

  always_comb begin
    for (int e = 0; e < ROB_SIZE; e++) begin
      logic a1, a2, p1, p2;
      a1 = !ent_q[e].inst.src1_v || act_rdy[2*e];
      a2 = !ent_q[e].inst.src2_v || act_rdy[2*e+1];
      p1 = a1 || (use_pred && pred_rdy[2*e]);
      p2 = a2 || (use_pred && pred_rdy[2*e+1]);
      rdy_act[e]  = a1 && a2;
      rdy_pred[e] = p1 && p2;
      elig[e] = ent_q[e].valid && !ent_q[e].in_iq &&
                (rdy_pred[e] || (ace_only && !ent_q[e].inst.ace));
    end
  end

  // ---- oldest-first candidate selection -------------------------------
  always_comb begin
    int unsigned n;
    n = 0;
    for (int d = 0; d < DISP_W; d++) begin
      cand_v[d]     = 1'b0;
      cand_op[d]    = '0;
      cand_r1[d]    = 1'b0;
      cand_r2[d]    = 1'b0;
      cand_early[d] = 1'b0;
      cand_unace[d] = 1'b0;
    end
    for (int k = 0; k < ROB_SIZE; k++) begin
      robi_t e;
      e = wrap(int'(head_q) + k);
      if (k < int'(count_q) && elig[e] && n < DISP_W) begin
        cand_v[n]          = 1'b1;
        cand_op[n].inst    = ent_q[e].inst;
        cand_op[n].rob_idx = e;
        cand_r1[n]         = !ent_q[e].inst.src1_v || act_rdy[2*e];
        cand_r2[n]         = !ent_q[e].inst.src2_v || act_rdy[2*e+1];
        cand_early[n]      = rdy_pred[e] && !rdy_act[e];
        cand_unace[n]      = !rdy_pred[e];
        n++;
      end
    end
  end

  // ---- commit window --------------------------------------------------------
  always_comb begin
    logic run;
    head_done_n = '0;
    run = 1'b1;
    for (int c = 0; c < COMMIT_W; c++) begin
      robi_t e;
      e = wrap(int'(head_q) + c);
      commit_inst[c] = ent_q[e].inst;
      if (run && c < int'(count_q) && ent_q[e].done) head_done_n = head_done_n + 1'b1;
      else run = 1'b0;
    end
  end

  // ---- state update -----------------------------------------------------------
  logic [CNT_W-1:0] n_alloc;
  always_comb begin
    n_alloc = '0;
    for (int a = 0; a < ALLOC_W; a++)
      if (alloc_v[a] && int'(alloc_inst[a].tid) == TID) n_alloc = n_alloc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      count_q <= '0;
      for (int e = 0; e < ROB_SIZE; e++) ent_q[e] <= '0;
    end else begin
      int unsigned t;
      // dispatch grants
      for (int d = 0; d < DISP_W; d++)
        if (cand_v[d] && grant[d]) ent_q[cand_op[d].rob_idx].in_iq <= 1'b1;
      // completion
      for (int w = 0; w < WB_W; w++)
        if (wb_v[w] && int'(wb[w].tid) == TID && int'(wb[w].rob_idx) < ROB_SIZE)
          ent_q[wb[w].rob_idx].done <= 1'b1;
      // commit
      for (int c = 0; c < COMMIT_W; c++)
        if (c < int'(commit_n)) ent_q[wrap(int'(head_q) + c)].valid <= 1'b0;
      // allocation
      t = 0;
      for (int a = 0; a < ALLOC_W; a++)
        if (alloc_v[a] && int'(alloc_inst[a].tid) == TID) begin
          ent_q[wrap(int'(tail_q) + t)] <= '{valid: 1'b1, in_iq: 1'b0, done: 1'b0,
                                             inst: alloc_inst[a]};
          t++;
        end
      head_q  <= wrap(int'(head_q) + int'(commit_n));
      tail_q  <= wrap(int'(tail_q) + int'(n_alloc));
      count_q <= count_q + n_alloc - CNT_W'(commit_n);
    end
  end

  always_comb begin
    held_cnt = '0;
    for (int e = 0; e < ROB_SIZE; e++)
      if (ent_q[e].valid && !ent_q[e].in_iq) held_cnt = held_cnt + 1'b1;
  end
  assign free_cnt = CNT_W'(ROB_SIZE) - count_q;

  // Allocation never exceeds the free space; commit never passes done entries.
  assert property (@(posedge clk) disable iff (!rst_n) n_alloc <= free_cnt);
  assert property (@(posedge clk) disable iff (!rst_n) commit_n <= head_done_n);

endmodule
