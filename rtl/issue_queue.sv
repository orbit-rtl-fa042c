// issue_queue: shared issue queue of the SMT core.
//
// Holds instructions of all threads between dispatch from the ROBs and
// issue to the function units. Each entry keeps a ready bit per source. A
// new entry takes the ready bits looked up at dispatch, ORed with any
// write-back of that register in the same cycle. Held entries wake up on
// the write-back broadcast (wb_*): a tag match sets the bit at the clock edge.
//
// Each cycle up to ISSUE_W entries whose sources are both ready issue,
// lowest entry index first, while the function-unit class of each still
// has a free unit (fu_free). Inserted instructions go to the lowest free
// entries; the core reserves an entry for every instruction when it is
// allocated in the ROB, so an insert always finds room (asserted).
//
// Under ORBIT almost every instruction arrives ready; n_wait / n_wait_ace
// count the entries that are still waiting for an operand, which is the
// quantity the dispatch schemes try to drive to zero.
//
// Timing: inserts and wake-ups are visible the next cycle, so an entry
// written at the end of cycle d can issue in cycle d+1.
//
// From the text: the 96 shared entries, the 8-wide issue. This design's
// choices: entry-index issue priority and tag-broadcast wake-up.
module issue_queue
  import orbit_pkg::*;
#(
  parameter int unsigned IQ_SIZE = IQ_SIZE_D,
  parameter int unsigned INS_W   = WIDTH_D,
  parameter int unsigned ISSUE_W = WIDTH_D,
  parameter int unsigned WB_W    = N_IALU_D + N_IMD_D + N_FPALU_D + N_FPMD_D + N_LS_D,
  localparam int unsigned CNT_W  = $clog2(IQ_SIZE + 1),
  localparam int unsigned INS_IW = (INS_W > 1) ? $clog2(INS_W) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ins_v   [INS_W],
  input  iq_op_t           ins_op  [INS_W],
  input  logic             ins_r1  [INS_W],
  input  logic             ins_r2  [INS_W],
  input  logic             wb_v    [WB_W],
  input  wb_t              wb      [WB_W],
  input  logic [4:0]       fu_free [NFU_CLASSES],
  output logic             iss_v   [ISSUE_W],
  output iq_op_t           iss_op  [ISSUE_W],
  output logic [CNT_W-1:0] count,
  output logic [CNT_W-1:0] n_wait,
  output logic [CNT_W-1:0] n_wait_ace,
  output logic [CNT_W-1:0] n_ready
);

  typedef struct packed {
    logic   valid;
    logic   r1;
    logic   r2;
    iq_op_t op;
  } iq_ent_t;

  iq_ent_t ent_q [IQ_SIZE];
  logic    issue_sel [IQ_SIZE];

  function automatic logic woken(preg_t p, logic wv [WB_W], wb_t w [WB_W]);
    logic hit;
    hit = 1'b0;
    for (int i = 0; i < WB_W; i++)
      if (wv[i] && w[i].has_dst && w[i].dst == p) hit = 1'b1;
    return hit;
  endfunction

  // ---- issue select -------------------------------------------------------------
  always_comb begin
    int unsigned n;
    logic [4:0] left [NFU_CLASSES];
    n = 0;
    for (int c = 0; c < NFU_CLASSES; c++) left[c] = fu_free[c];
    for (int i = 0; i < ISSUE_W; i++) begin
      iss_v[i]  = 1'b0;
      iss_op[i] = '0;
    end
    for (int e = 0; e < IQ_SIZE; e++) begin
      fu_e c;
      c = fu_class(ent_q[e].op.inst.op);
      issue_sel[e] = 1'b0;
      if (ent_q[e].valid && ent_q[e].r1 && ent_q[e].r2 && n < ISSUE_W && left[c] != '0) begin
        issue_sel[e] = 1'b1;
        iss_v[n]     = 1'b1;
        iss_op[n]    = ent_q[e].op;
        left[c]      = left[c] - 1'b1;
        n++;
      end
    end
  end

  // ---- wake-up matches, one comparator set per entry and per insert port --
  logic wk1 [IQ_SIZE], wk2 [IQ_SIZE];
  logic iwk1 [INS_W], iwk2 [INS_W];

  for (genvar e = 0; e < IQ_SIZE; e++) begin : g_wake
    assign wk1[e] = woken(ent_q[e].op.inst.src1, wb_v, wb);
    assign wk2[e] = woken(ent_q[e].op.inst.src2, wb_v, wb);
  end
  for (genvar i = 0; i < INS_W; i++) begin : g_iwake
    assign iwk1[i] = woken(ins_op[i].inst.src1, wb_v, wb);
    assign iwk2[i] = woken(ins_op[i].inst.src2, wb_v, wb);
  end

  // ---- insert placement -------------------------------------------------------------
  logic ins_here [IQ_SIZE];
  logic [INS_IW-1:0] ins_from [IQ_SIZE];

  // the free entry whose rank among free entries equals the rank of the
  // insert among the valid insert ports receives it
  logic [INS_IW-1:0] ins_rank [INS_W];
  always_comb begin
    int unsigned r;
    r = 0;
    for (int i = 0; i < INS_W; i++) begin
      ins_rank[i] = (INS_IW)'(r);
      if (ins_v[i]) r++;
    end
  end

  always_comb begin
    int unsigned f;
    f = 0;
    for (int e = 0; e < IQ_SIZE; e++) begin
      ins_here[e] = 1'b0;
      ins_from[e] = '0;
      if (!ent_q[e].valid) begin
        for (int i = 0; i < INS_W; i++)
          if (ins_v[i] && int'(ins_rank[i]) == f) begin
            ins_here[e] = 1'b1;
            ins_from[e] = (INS_IW)'(i);
          end
        f++;
      end
    end
  end

  // ---- state ----------------------------------------------------------------------
  logic ins_ok;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < IQ_SIZE; e++) ent_q[e] <= '0;
    end else begin
      for (int e = 0; e < IQ_SIZE; e++) begin
        if (ins_here[e])
          ent_q[e] <= '{valid: 1'b1,
                        r1: ins_r1[ins_from[e]] || !ins_op[ins_from[e]].inst.src1_v ||
                            iwk1[ins_from[e]],
                        r2: ins_r2[ins_from[e]] || !ins_op[ins_from[e]].inst.src2_v ||
                            iwk2[ins_from[e]],
                        op: ins_op[ins_from[e]]};
        else begin
          if (issue_sel[e]) ent_q[e].valid <= 1'b0;
          if (ent_q[e].valid && wk1[e]) ent_q[e].r1 <= 1'b1;
          if (ent_q[e].valid && wk2[e]) ent_q[e].r2 <= 1'b1;
        end
      end
    end
  end

  // ---- occupancy statistics ------------------------------------------------
  always_comb begin
    int unsigned nins;
    count = '0; n_wait = '0; n_wait_ace = '0; n_ready = '0;
    nins = 0;
    for (int e = 0; e < IQ_SIZE; e++)
      if (ent_q[e].valid) begin
        count = count + 1'b1;
        if (ent_q[e].r1 && ent_q[e].r2) n_ready = n_ready + 1'b1;
        else begin
          n_wait = n_wait + 1'b1;
          if (ent_q[e].op.inst.ace) n_wait_ace = n_wait_ace + 1'b1;
        end
      end
    for (int i = 0; i < INS_W; i++) if (ins_v[i]) nins++;
    ins_ok = (int'(count) + nins) <= IQ_SIZE;
  end

  assert property (@(posedge clk) disable iff (!rst_n) ins_ok)
    else $error("issue queue overflow: an insert found no free entry");

endmodule
