// orbit_core: the out-of-order back end of an SMT core with ORBIT dispatch.
//
// Renamed instructions of NTHREADS threads are allocated into per-thread
// reorder buffers (orbit_rob) up to WIDTH per cycle. They do not enter the
// shared issue queue at the same time: each waits in its ROB until its
// source operands are ready according to the selected scheme, looked up
// every cycle in the register ready-bit array (actual readiness) and the
// register timer array (predicted readiness). dispatch_select grants up to
// WIDTH of the ready instructions per cycle, across threads and out of
// program order, into the issue queue, whose entry was reserved at
// allocation. On that dispatch the destination timer is loaded with the
// predicted completion time (complete_time_pred). The issue queue issues to
// the function units (fu_pool); their write-backs set the ready bits, zero
// the timers, wake issue-queue entries and mark ROB entries done. Loads and
// stores leave through the memory port after address generation; the
// memory side first reports the remaining load latency (mem_upd_*, which
// re-times the load's destination timer) and later the completion
// (mem_done_*). Done instructions commit in order, up to WIDTH per cycle
// shared round-robin among the threads.
//
// Interface:
//   scheme          which of the six ORBIT schemes is active (static)
//   alloc_*         rename-stage output; accepted when alloc_ready is high
//                   (room for WIDTH more in every ROB and in the issue queue)
//   mem_*           load/store requests out, latency updates and completions in
//   commit_*        per thread: number committed this cycle and the
//                   instructions at the ROB head
//   stat_*          per-cycle counts for measuring issue-queue exposure
//
// From the text: the two-step dispatch with reserved issue-queue entry,
// the readiness arrays read by ROB segments, the timers and their load
// update, the six schemes, the machine sizes. This design's choices: the
// alloc_ready contract, the commit sharing, the memory-side handshake, the
// absence of squash/branch recovery, and leaving the timer unset for an
// instruction that entered the issue queue only through the un-ACE rule
// (a prediction counted from its dispatch would be too early).
module orbit_core
  import orbit_pkg::*;
#(
  parameter int unsigned NTHREADS = NTHREADS_D,
  parameter int unsigned ROB_SIZE = ROB_SIZE_D,
  parameter int unsigned IQ_SIZE  = IQ_SIZE_D,
  parameter int unsigned NPREGS   = NPREGS_D,
  parameter int unsigned WIDTH    = WIDTH_D,
  parameter int unsigned N_IALU   = N_IALU_D,
  parameter int unsigned N_IMD    = N_IMD_D,
  parameter int unsigned N_FPALU  = N_FPALU_D,
  parameter int unsigned N_FPMD   = N_FPMD_D,
  parameter int unsigned N_LS     = N_LS_D,
  localparam int unsigned NWB     = N_IALU + N_IMD + N_FPALU + N_FPMD,
  localparam int unsigned WB_W    = NWB + N_LS,
  localparam int unsigned CW      = $clog2(WIDTH + 1),
  localparam int unsigned RCW     = $clog2(ROB_SIZE + 1),
  localparam int unsigned ICW     = $clog2(IQ_SIZE + 1)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  scheme_e  scheme,
  // rename side
  input  logic     alloc_v    [WIDTH],
  input  inst_t    alloc_inst [WIDTH],
  output logic     alloc_ready,
  // memory side
  output logic     mem_req_v  [N_LS],
  output iq_op_t   mem_req_op [N_LS],
  input  logic     mem_upd_v    [N_LS],
  input  preg_t    mem_upd_preg [N_LS],
  input  timer_t   mem_upd_val  [N_LS],
  input  logic     mem_done_v [N_LS],
  input  wb_t      mem_done   [N_LS],
  // commit
  output logic [CW-1:0] commit_n    [NTHREADS],
  output inst_t         commit_inst [NTHREADS][WIDTH],
  // statistics
  output logic [ICW-1:0] stat_iq_count,
  output logic [ICW-1:0] stat_iq_wait,
  output logic [ICW-1:0] stat_iq_wait_ace,
  output logic [CW-1:0]  stat_disp_n,
  output logic [CW-1:0]  stat_disp_early_n,
  output logic [CW-1:0]  stat_disp_unace_n,
  output logic [CW-1:0]  stat_issue_n,
  output logic [RCW+2:0] stat_rob_held
);

  // ---- write-back bus ----------------------------------------------------------
  logic   wb_v   [WB_W];
  wb_t    wb     [WB_W];
  preg_t  wb_preg[WB_W];
  logic   wb_reg [WB_W];
  logic   fu_wb_v [NWB];
  wb_t    fu_wb   [NWB];

  always_comb
    for (int w = 0; w < WB_W; w++) begin
      if (w < NWB) begin
        wb_v[w] = fu_wb_v[w];
        wb[w]   = fu_wb[w];
      end else begin
        wb_v[w] = mem_done_v[w - NWB];
        wb[w]   = mem_done[w - NWB];
      end
      wb_preg[w] = wb[w].dst;
      wb_reg[w]  = wb_v[w] && wb[w].has_dst;
    end

  // ---- allocation --------------------------------------------------------------
  logic  alloc_go   [WIDTH];
  logic  alloc_clr  [WIDTH];
  preg_t alloc_preg [WIDTH];
  logic [RCW-1:0] rob_free [NTHREADS];
  logic [RCW-1:0] rob_held [NTHREADS];
  logic [ICW-1:0] iq_claim_q;    // issue-queue entries occupied or reserved
  logic [CW-1:0]  n_alloc, n_issue;

  always_comb begin
    alloc_ready = (int'(iq_claim_q) + WIDTH) <= IQ_SIZE;
    for (int t = 0; t < NTHREADS; t++)
      if (int'(rob_free[t]) < WIDTH) alloc_ready = 1'b0;
    n_alloc = '0;
    for (int a = 0; a < WIDTH; a++) begin
      alloc_go[a]   = alloc_v[a] && alloc_ready;
      alloc_clr[a]  = alloc_go[a] && alloc_inst[a].has_dst;
      alloc_preg[a] = alloc_inst[a].dst;
      if (alloc_go[a]) n_alloc = n_alloc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) iq_claim_q <= '0;
    else        iq_claim_q <= iq_claim_q + ICW'(n_alloc) - ICW'(n_issue);

  // ---- reorder buffers -----------------------------------------------------------
  preg_t  src_preg  [NTHREADS][2*ROB_SIZE];
  logic   act_rdy   [NTHREADS][2*ROB_SIZE];
  logic   pred_rdy  [NTHREADS][2*ROB_SIZE];
  logic   cand_v    [NTHREADS][WIDTH];
  iq_op_t cand_op   [NTHREADS][WIDTH];
  logic   cand_r1   [NTHREADS][WIDTH];
  logic   cand_r2   [NTHREADS][WIDTH];
  logic   cand_early[NTHREADS][WIDTH];
  logic   cand_unace[NTHREADS][WIDTH];
  logic   grant     [NTHREADS][WIDTH];
  logic [CW-1:0] head_done_n [NTHREADS];

  for (genvar t = 0; t < NTHREADS; t++) begin : g_rob
    orbit_rob #(
      .TID(t), .ROB_SIZE(ROB_SIZE), .ALLOC_W(WIDTH), .DISP_W(WIDTH),
      .COMMIT_W(WIDTH), .WB_W(WB_W)
    ) u_rob (
      .clk, .rst_n, .scheme,
      .alloc_v(alloc_go), .alloc_inst,
      .free_cnt(rob_free[t]), .held_cnt(rob_held[t]),
      .src_preg(src_preg[t]), .act_rdy(act_rdy[t]), .pred_rdy(pred_rdy[t]),
      .cand_v(cand_v[t]), .cand_op(cand_op[t]), .cand_r1(cand_r1[t]), .cand_r2(cand_r2[t]),
      .cand_early(cand_early[t]), .cand_unace(cand_unace[t]), .grant(grant[t]),
      .wb_v, .wb,
      .head_done_n(head_done_n[t]), .commit_inst(commit_inst[t]), .commit_n(commit_n[t])
    );
  end

  // ---- readiness arrays (one bank per thread's ROB) --------------------------
  ready_bit_array #(
    .NPREGS(NPREGS), .NBANKS(NTHREADS), .RPORTS(2*ROB_SIZE), .WB_W(WB_W), .ALLOC_W(WIDTH)
  ) u_ready (
    .clk, .rst_n,
    .alloc_v(alloc_clr), .alloc_preg,
    .wb_v(wb_reg), .wb_preg,
    .raddr(src_preg), .rdata(act_rdy)
  );

  logic   dset_v   [WIDTH];
  preg_t  dset_preg[WIDTH];
  timer_t dset_val [WIDTH];
  logic   upd_v    [N_LS];

  always_comb
    for (int l = 0; l < N_LS; l++)
      upd_v[l] = mem_upd_v[l] && scheme_predicts_loads(scheme);

  reg_timer_array #(
    .NPREGS(NPREGS), .NBANKS(NTHREADS), .RPORTS(2*ROB_SIZE), .WB_W(WB_W),
    .ALLOC_W(WIDTH), .SET_W(WIDTH), .UPD_W(N_LS)
  ) u_timer (
    .clk, .rst_n,
    .alloc_v(alloc_clr), .alloc_preg,
    .dset_v, .dset_preg, .dset_val,
    .upd_v, .upd_preg(mem_upd_preg), .upd_val(mem_upd_val),
    .wb_v(wb_reg), .wb_preg,
    .raddr(src_preg), .pred_rdy
  );

  // ---- dispatch into the issue queue -------------------------------------------
  logic sel_v    [WIDTH];
  tid_t sel_tid  [WIDTH];
  logic [$clog2(WIDTH)-1:0] sel_slot [WIDTH];

  dispatch_select #(.NTHREADS(NTHREADS), .DISP_W(WIDTH)) u_dsel (
    .clk, .rst_n, .cand_v, .grant, .sel_v, .sel_tid, .sel_slot
  );

  iq_op_t ins_op [WIDTH];
  logic   ins_r1 [WIDTH];
  logic   ins_r2 [WIDTH];
  logic   tset_v [WIDTH];

  always_comb begin
    stat_disp_n = '0; stat_disp_early_n = '0; stat_disp_unace_n = '0;
    for (int s = 0; s < WIDTH; s++) begin
      ins_op[s] = cand_op[sel_tid[s]][sel_slot[s]];
      ins_r1[s] = cand_r1[sel_tid[s]][sel_slot[s]];
      ins_r2[s] = cand_r2[sel_tid[s]][sel_slot[s]];
      // An instruction that entered only through the un-ACE rule is not yet
      // ready itself, so no completion time is predicted for it; its
      // consumers wait for its write-back.
      dset_v[s]    = sel_v[s] && tset_v[s] && !cand_unace[sel_tid[s]][sel_slot[s]];
      dset_preg[s] = ins_op[s].inst.dst;
      if (sel_v[s]) begin
        stat_disp_n = stat_disp_n + 1'b1;
        if (cand_early[sel_tid[s]][sel_slot[s]]) stat_disp_early_n = stat_disp_early_n + 1'b1;
        if (cand_unace[sel_tid[s]][sel_slot[s]]) stat_disp_unace_n = stat_disp_unace_n + 1'b1;
      end
    end
  end

  for (genvar s = 0; s < WIDTH; s++) begin : g_pred
    complete_time_pred u_ctp (
      .scheme, .inst(ins_op[s].inst), .set_v(tset_v[s]), .set_val(dset_val[s])
    );
  end

  // ---- issue queue and function units ------------------------------------------
  logic       iss_v  [WIDTH];
  iq_op_t     iss_op [WIDTH];
  logic [4:0] fu_free [NFU_CLASSES];
  logic [ICW-1:0] iq_ready_unused;

  issue_queue #(.IQ_SIZE(IQ_SIZE), .INS_W(WIDTH), .ISSUE_W(WIDTH), .WB_W(WB_W)) u_iq (
    .clk, .rst_n,
    .ins_v(sel_v), .ins_op, .ins_r1, .ins_r2,
    .wb_v, .wb, .fu_free,
    .iss_v, .iss_op,
    .count(stat_iq_count), .n_wait(stat_iq_wait), .n_wait_ace(stat_iq_wait_ace),
    .n_ready(iq_ready_unused)
  );

  always_comb begin
    n_issue = '0;
    for (int i = 0; i < WIDTH; i++) if (iss_v[i]) n_issue = n_issue + 1'b1;
  end
  assign stat_issue_n = n_issue;

  fu_pool #(
    .N_IALU(N_IALU), .N_IMD(N_IMD), .N_FPALU(N_FPALU), .N_FPMD(N_FPMD), .N_LS(N_LS),
    .ISSUE_W(WIDTH)
  ) u_fu (
    .clk, .rst_n, .iss_v, .iss_op, .fu_free,
    .wb_v(fu_wb_v), .wb(fu_wb), .mem_req_v, .mem_req_op
  );

  // ---- commit: WIDTH per cycle shared round-robin among threads -----------
  tid_t cstart_q;
  always_comb begin
    int unsigned left;
    left = WIDTH;
    for (int t = 0; t < NTHREADS; t++) commit_n[t] = '0;
    for (int k = 0; k < NTHREADS; k++) begin
      int unsigned t;
      t = (int'(cstart_q) + k) % NTHREADS;
      if (int'(head_done_n[t]) <= left) begin
        commit_n[t] = head_done_n[t];
        left = left - int'(head_done_n[t]);
      end else begin
        commit_n[t] = CW'(left);
        left = 0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cstart_q <= '0;
    else        cstart_q <= tid_t'((int'(cstart_q) + 1) % NTHREADS);

  always_comb begin
    stat_rob_held = '0;
    for (int t = 0; t < NTHREADS; t++) stat_rob_held = stat_rob_held + (RCW+3)'(rob_held[t]);
  end

  // The reservation keeps the issue queue from ever being over-committed.
  assert property (@(posedge clk) disable iff (!rst_n) int'(iq_claim_q) <= IQ_SIZE);
  assert property (@(posedge clk) disable iff (!rst_n) stat_iq_count <= iq_claim_q);

endmodule
