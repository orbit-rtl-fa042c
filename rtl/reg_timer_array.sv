// reg_timer_array: per-physical-register completion timers for predicted
// readiness.
//
// Every physical register has a countdown timer and a "set" flag. A waiting
// instruction may enter the issue queue when each source register's timer
// is set and reads 1 or 0: one cycle before the operand is produced, which
// is the time it takes to place an instruction into the issue queue.
//
// Life of a timer:
//   alloc      rename hands the register out: set=0, value=all ones; it does
//              not count while unset
//   dset       the producer enters the issue queue: set=1, value=predicted
//              completion time (see complete_time_pred); a load is given
//              the all-ones value
//   upd        a load has performed its cache access: value = cycles until
//              its data is written back (only if the timer is set and not
//              yet expired)
//   wb         the register is written back: value=0, so a late prediction
//              never holds an instruction back past actual readiness
//   otherwise  a set, non-zero timer counts down by one each cycle
// Priority within one cycle: alloc, wb, upd, dset, count-down.
// Reset: every register set and at 0 (architectural state is ready).
//
// Like the ready-bit array it is kept as NBANKS identical copies, each read
// by one ROB segment through RPORTS combinational ports (pred_rdy).
//
// From the text: one timer per physical register, initialisation at rename
// without counting, set at dispatch, count-down by one, ready-to-dispatch at
// one, all-ones for a dispatched load and its later update from the cache
// access, banks holding copies. This design's choices: timer width,
// forcing 0 at write-back, saturation at 0, one bank per thread.
module reg_timer_array
  import orbit_pkg::*;
#(
  parameter int unsigned NPREGS  = NPREGS_D,
  parameter int unsigned NBANKS  = NTHREADS_D,
  parameter int unsigned RPORTS  = 2 * ROB_SIZE_D,
  parameter int unsigned WB_W    = N_IALU_D + N_IMD_D + N_FPALU_D + N_FPMD_D + N_LS_D,
  parameter int unsigned ALLOC_W = WIDTH_D,
  parameter int unsigned SET_W   = WIDTH_D,
  parameter int unsigned UPD_W   = N_LS_D
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   alloc_v    [ALLOC_W],
  input  preg_t  alloc_preg [ALLOC_W],
  input  logic   dset_v     [SET_W],
  input  preg_t  dset_preg  [SET_W],
  input  timer_t dset_val   [SET_W],
  input  logic   upd_v      [UPD_W],
  input  preg_t  upd_preg   [UPD_W],
  input  timer_t upd_val    [UPD_W],
  input  logic   wb_v       [WB_W],
  input  preg_t  wb_preg    [WB_W],
  input  preg_t  raddr      [NBANKS][RPORTS],
  output logic   pred_rdy   [NBANKS][RPORTS]
);

  timer_t            val_q [NBANKS][NPREGS];
  logic [NPREGS-1:0] set_q [NBANKS];
  timer_t            val_d [NPREGS];
  logic [NPREGS-1:0] set_d;

  always_comb begin
    // count down
    for (int r = 0; r < NPREGS; r++) begin
      set_d[r] = set_q[0][r];
      val_d[r] = (set_q[0][r] && val_q[0][r] != '0) ? val_q[0][r] - timer_t'(1) : val_q[0][r];
    end
    for (int s = 0; s < SET_W; s++)
      if (dset_v[s] && int'(dset_preg[s]) < NPREGS) begin
        set_d[dset_preg[s]] = 1'b1;
        val_d[dset_preg[s]] = dset_val[s];
      end
    for (int u = 0; u < UPD_W; u++)
      if (upd_v[u] && int'(upd_preg[u]) < NPREGS)
        if (set_q[0][upd_preg[u]] && val_q[0][upd_preg[u]] != '0)
          val_d[upd_preg[u]] = upd_val[u];
    for (int w = 0; w < WB_W; w++)
      if (wb_v[w] && int'(wb_preg[w]) < NPREGS) begin
        set_d[wb_preg[w]] = 1'b1;
        val_d[wb_preg[w]] = '0;
      end
    for (int a = 0; a < ALLOC_W; a++)
      if (alloc_v[a] && int'(alloc_preg[a]) < NPREGS) begin
        set_d[alloc_preg[a]] = 1'b0;
        val_d[alloc_preg[a]] = '1;
      end
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        set_q[b] <= '1;
        for (int r = 0; r < NPREGS; r++) val_q[b][r] <= '0;
      end else begin
        set_q[b] <= set_d;
        for (int r = 0; r < NPREGS; r++) val_q[b][r] <= val_d[r];
      end

    for (genvar p = 0; p < RPORTS; p++) begin : g_port
      always_comb begin
        pred_rdy[b][p] = 1'b0;
        if (int'(raddr[b][p]) < NPREGS)
          pred_rdy[b][p] = set_q[b][raddr[b][p]] && (val_q[b][raddr[b][p]] <= timer_t'(1));
      end
    end
  end

endmodule
