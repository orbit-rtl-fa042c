// tb_reg_timer_array: directed and random test of the register timers.
//
// Directed part (register 5): after allocation the register is not
// predicted ready and does not count; a dispatch load of 3 makes it read
// not-ready for two cycles and ready in the third (value 1), i.e. exactly
// one cycle before the predicted completion; a load's all-ones value keeps
// it not ready until a cache-access update of 2 makes it ready two cycles
// later; a write-back makes it ready the next cycle.
// Random part: a model with the documented priorities (alloc, write-back,
// update, dispatch, count-down) predicts every read port of both banks.
module tb_reg_timer_array;
  import orbit_pkg::*;
  localparam int NP = 16, NB = 2, RP = 4, WW = 2, AW = 2, SW = 2, UW = 2;

  logic clk = 0, rst_n = 0;
  logic alloc_v [AW]; preg_t alloc_preg [AW];
  logic dset_v [SW];  preg_t dset_preg [SW]; timer_t dset_val [SW];
  logic upd_v [UW];   preg_t upd_preg [UW];  timer_t upd_val [UW];
  logic wb_v [WW];    preg_t wb_preg [WW];
  preg_t raddr [NB][RP];
  logic  pred_rdy [NB][RP];
  int checks = 0, failures = 0;
  logic m_set [NP]; int m_val [NP];

  reg_timer_array #(.NPREGS(NP), .NBANKS(NB), .RPORTS(RP), .WB_W(WW), .ALLOC_W(AW),
                    .SET_W(SW), .UPD_W(UW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int i = 0; i < 2; i++) begin
      alloc_v[i] = 0; dset_v[i] = 0; upd_v[i] = 0; wb_v[i] = 0;
      alloc_preg[i] = '0; dset_preg[i] = '0; upd_preg[i] = '0; wb_preg[i] = '0;
      dset_val[i] = '0; upd_val[i] = '0;
    end
  endtask

  task automatic expect_reg(int r, logic want, string what);
    for (int b = 0; b < NB; b++) raddr[b][0] = preg_t'(r);
    #1;
    for (int b = 0; b < NB; b++) begin
      checks++;
      if (pred_rdy[b][0] !== want) begin
        failures++;
        $display("%s: bank %0d reg %0d got %b want %b", what, b, r, pred_rdy[b][0], want);
      end
    end
  endtask

  // model step with the documented priorities
  task automatic model_step();
    int nv [NP]; logic ns [NP];
    for (int r = 0; r < NP; r++) begin
      ns[r] = m_set[r];
      nv[r] = (m_set[r] && m_val[r] > 0) ? m_val[r] - 1 : m_val[r];
    end
    for (int s = 0; s < SW; s++) if (dset_v[s]) begin ns[dset_preg[s]] = 1; nv[dset_preg[s]] = dset_val[s]; end
    for (int u = 0; u < UW; u++) if (upd_v[u] && m_set[upd_preg[u]] && m_val[upd_preg[u]] > 0)
      nv[upd_preg[u]] = upd_val[u];
    for (int w = 0; w < WW; w++) if (wb_v[w]) begin ns[wb_preg[w]] = 1; nv[wb_preg[w]] = 0; end
    for (int a = 0; a < AW; a++) if (alloc_v[a]) begin ns[alloc_preg[a]] = 0; nv[alloc_preg[a]] = 255; end
    m_set = ns; m_val = nv;
  endtask

  initial begin
    idle();
    for (int b = 0; b < NB; b++) for (int p = 0; p < RP; p++) raddr[b][p] = '0;
    for (int r = 0; r < NP; r++) begin m_set[r] = 1; m_val[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- directed ----
    @(negedge clk); expect_reg(5, 1, "after reset");
    alloc_v[0] = 1; alloc_preg[0] = 5;
    @(negedge clk); idle(); expect_reg(5, 0, "allocated");
    repeat (10) @(negedge clk);
    expect_reg(5, 0, "allocated, unset, still not ready");
    dset_v[0] = 1; dset_preg[0] = 5; dset_val[0] = 3;
    @(negedge clk); idle(); expect_reg(5, 0, "set 3, reads 3");
    @(negedge clk); expect_reg(5, 0, "reads 2");
    @(negedge clk); expect_reg(5, 1, "reads 1: ready to dispatch");
    // load: all ones then update
    alloc_v[0] = 1; alloc_preg[0] = 5;
    @(negedge clk); idle();
    dset_v[0] = 1; dset_preg[0] = 5; dset_val[0] = '1;
    @(negedge clk); idle();
    repeat (20) @(negedge clk);
    expect_reg(5, 0, "load predicted at all ones");
    upd_v[0] = 1; upd_preg[0] = 5; upd_val[0] = 2;
    @(negedge clk); idle(); expect_reg(5, 0, "updated to 2");
    @(negedge clk); expect_reg(5, 1, "update counted to 1");
    // write-back overrides a long prediction
    alloc_v[0] = 1; alloc_preg[0] = 5;
    @(negedge clk); idle();
    dset_v[0] = 1; dset_preg[0] = 5; dset_val[0] = 100;
    @(negedge clk); idle(); expect_reg(5, 0, "long prediction");
    wb_v[1] = 1; wb_preg[1] = 5;
    @(negedge clk); idle(); expect_reg(5, 1, "written back");
    // ---- random, against the model ----
    @(negedge clk);
    for (int r = 0; r < NP; r++) begin alloc_v[0] = 1; alloc_preg[0] = preg_t'(r); @(negedge clk); end
    idle();
    for (int r = 0; r < NP; r++) begin m_set[r] = 0; m_val[r] = 255; end
    @(negedge clk);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      for (int b = 0; b < NB; b++) for (int p = 0; p < RP; p++) raddr[b][p] = preg_t'($urandom_range(NP - 1));
      #1;
      for (int b = 0; b < NB; b++) for (int p = 0; p < RP; p++) begin
        logic want;
        want = m_set[raddr[b][p]] && m_val[raddr[b][p]] <= 1;
        checks++;
        if (pred_rdy[b][p] !== want) begin
          failures++;
          if (failures < 10) $display("rand cyc %0d reg %0d got %b want %b (set %b val %0d)", cyc,
                                      raddr[b][p], pred_rdy[b][p], want, m_set[raddr[b][p]], m_val[raddr[b][p]]);
        end
      end
      idle();
      for (int i = 0; i < 2; i++) begin
        alloc_v[i] = ($urandom_range(9) == 0); alloc_preg[i] = preg_t'($urandom_range(NP - 1));
        dset_v[i]  = ($urandom_range(3) == 0); dset_preg[i] = preg_t'($urandom_range(NP - 1));
        dset_val[i] = timer_t'($urandom_range(1, 6));
        upd_v[i]   = ($urandom_range(5) == 0); upd_preg[i] = preg_t'($urandom_range(NP - 1));
        upd_val[i] = timer_t'($urandom_range(0, 5));
        wb_v[i]    = ($urandom_range(5) == 0); wb_preg[i] = preg_t'($urandom_range(NP - 1));
      end
      model_step();
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
