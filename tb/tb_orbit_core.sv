// tb_orbit_core: end-to-end test of the ORBIT back end at its default size
// (4 threads, 96-entry ROBs, 96-entry issue queue, 8-wide, 640 registers).
//
// The testbench plays the rename stage and the memory side. Rename maps 8
// architectural registers per thread onto physical registers through a
// free list; a register is freed when the next writer of the same
// architectural register commits. The memory side answers each load one
// cycle after its request with the remaining latency (2, 12 or 200 cycles,
// standing for an L1 hit, an L2 hit and a memory access) and completes it
// that many cycles later; stores complete one cycle after the request.
//
// For each of the six schemes, after a reset:
//   1. a chain of dependent 1-cycle ALU instructions in one thread: the
//      issue interval must be 2 cycles under the Predict schemes (the
//      consumer was dispatched one cycle before its operand) and 3 cycles
//      under DelayALL/DelayACE (dispatched after write-back);
//   2. a load followed by a dependent ALU instruction: the consumer must
//      issue 1 cycle after the load's completion when loads are predicted
//      and 2 cycles after it when they are not;
//   3. a random four-thread mix until every thread has committed NINST
//      instructions.
// Checked throughout: in-order commit of every instruction of every thread;
// no instruction issues before both sources are written back; no waiting
// instruction ever sits in the issue queue under DelayALL, and no waiting
// ACE instruction under DelayALL/DelayACE; no early dispatch without
// prediction and no un-ACE bypass outside the DelayACE schemes.
// Each mechanism must occur at least once: early (predicted) dispatch,
// un-ACE bypass, out-of-order dispatch, dispatch congestion, load timer
// update, allocation stall on the issue-queue reservation.
module tb_orbit_core;
  import orbit_pkg::*;
  localparam int NT = NTHREADS_D, W = WIDTH_D, NLS = N_LS_D, NP = NPREGS_D;
  localparam int NARCH = 8;
  localparam int NINST = 300;   // random-phase instructions per thread

  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  logic alloc_v [W]; inst_t alloc_inst [W]; logic alloc_ready;
  logic mem_req_v [NLS]; iq_op_t mem_req_op [NLS];
  logic mem_upd_v [NLS]; preg_t mem_upd_preg [NLS]; timer_t mem_upd_val [NLS];
  logic mem_done_v [NLS]; wb_t mem_done [NLS];
  logic [3:0] commit_n [NT]; inst_t commit_inst [NT][W];
  logic [6:0] stat_iq_count, stat_iq_wait, stat_iq_wait_ace;
  logic [3:0] stat_disp_n, stat_disp_early_n, stat_disp_unace_n, stat_issue_n;
  logic [9:0] stat_rob_held;

  orbit_core dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 30) $display("[%0d] FAIL %s", cyc, msg); end
  endtask

  // ---------------- rename model ----------------
  preg_t map [NT][NARCH];
  preg_t freel [$];
  preg_t old_of [int];          // key: tid*65536 + seq
  int    seq_gen [NT], seq_com [NT];
  logic  written [NP];

  task automatic reset_model();
    freel.delete(); old_of.delete();
    for (int t = 0; t < NT; t++) begin
      seq_gen[t] = 0; seq_com[t] = 0;
      for (int r = 0; r < NARCH; r++) map[t][r] = preg_t'(t * NARCH + r);
    end
    for (int p = NT * NARCH; p < NP; p++) freel.push_back(preg_t'(p));
    for (int p = 0; p < NP; p++) written[p] = 1;
  endtask

  function automatic inst_t make_inst(int t, op_e op, logic ace, int s1, int s2, int d);
    inst_t i; i = '0;
    i.pc = 32'(seq_gen[t]); i.tid = tid_t'(t); i.op = op; i.ace = ace;
    i.src1_v = (s1 >= 0); i.src1 = (s1 >= 0) ? map[t][s1] : '0;
    i.src2_v = (s2 >= 0); i.src2 = (s2 >= 0) ? map[t][s2] : '0;
    i.has_dst = (d >= 0) && op != OP_STORE;
    if (i.has_dst) begin
      i.dst = freel.pop_front();
      old_of[t * 65536 + seq_gen[t]] = map[t][d];
      map[t][d] = i.dst;
      written[i.dst] = 0;
    end else old_of[t * 65536 + seq_gen[t]] = '1;
    seq_gen[t]++;
    return i;
  endfunction

  // ---------------- memory model ----------------
  typedef struct { int due; wb_t w; } pend_t;
  pend_t pend [$];
  logic  upd_n_v [NLS]; preg_t upd_n_p [NLS]; timer_t upd_n_val [NLS];

  // ---------------- mechanism counters ----------------
  int m_early, m_unace, m_ooo, m_congest, m_upd, m_iqstall;
  int max_disp_seq [NT];
  longint wait_sum; int run_cycles;
  int issue_cyc_of [int];       // key: tid*65536 + seq -> issue cycle
  int done_cyc_of  [int];       // key: tid*65536 + seq -> memory completion cycle

  // per-cycle monitor, sampled mid-cycle (inputs are changed on posedge+1)
  always @(negedge clk) if (rst_n) begin
    // issue: sources written back before this cycle
    for (int i = 0; i < W; i++) if (dut.iss_v[i]) begin
      inst_t x; x = dut.iss_op[i].inst;
      chk(!x.src1_v || written[x.src1], $sformatf("t%0d seq %0d issued before src1 %0d written", x.tid, x.pc, x.src1));
      chk(!x.src2_v || written[x.src2], $sformatf("t%0d seq %0d issued before src2 %0d written", x.tid, x.pc, x.src2));
      issue_cyc_of[int'(x.tid) * 65536 + int'(x.pc)] = cyc;
    end
    // dispatch bookkeeping
    begin
      int nc; nc = 0;
      for (int t = 0; t < NT; t++) for (int r = 0; r < W; r++) if (dut.cand_v[t][r]) nc++;
      if (nc > W) m_congest++;
    end
    for (int s = 0; s < W; s++) if (dut.sel_v[s]) begin
      inst_t x; x = dut.ins_op[s].inst;
      if (int'(x.pc) < max_disp_seq[x.tid]) m_ooo++;
      else max_disp_seq[x.tid] = int'(x.pc);
    end
    m_early += int'(stat_disp_early_n);
    m_unace += int'(stat_disp_unace_n);
    if (!scheme_predicts(scheme)) chk(stat_disp_early_n == 0, "early dispatch without prediction");
    if (!scheme_ace_only(scheme)) chk(stat_disp_unace_n == 0, "un-ACE bypass outside DelayACE schemes");
    if (scheme == S_DELAY_ALL) chk(stat_iq_wait == 0, "waiting instruction in the IQ under DelayALL");
    if (!scheme_predicts(scheme)) chk(stat_iq_wait_ace == 0, "waiting ACE instruction in the IQ under Delay schemes");
    if (int'(dut.iq_claim_q) + W > IQ_SIZE_D) m_iqstall++;
    wait_sum += stat_iq_wait; run_cycles++;
    // write-backs of this cycle become visible next cycle
    for (int w = 0; w < dut.WB_W; w++) if (dut.wb_v[w] && dut.wb[w].has_dst) written[dut.wb[w].dst] = 1;
    // commit: in order, then free the previous mapping
    for (int t = 0; t < NT; t++) for (int k = 0; k < int'(commit_n[t]); k++) begin
      int key; key = t * 65536 + int'(commit_inst[t][k].pc);
      chk(int'(commit_inst[t][k].pc[30:0]) == seq_com[t], $sformatf("t%0d committed seq %0d, expected %0d", t, commit_inst[t][k].pc, seq_com[t]));
      seq_com[t]++;
      if (old_of.exists(key) && old_of[key] != '1) freel.push_back(old_of[key]);
      old_of.delete(key);
    end
  end

  // memory side: requests are answered on the next cycle
  always @(posedge clk) begin
    #1;
    for (int l = 0; l < NLS; l++) begin
      mem_upd_v[l] = upd_n_v[l]; mem_upd_preg[l] = upd_n_p[l]; mem_upd_val[l] = upd_n_val[l];
      upd_n_v[l] = 0;
      mem_done_v[l] = 0; mem_done[l] = '0;
    end
    for (int l = 0; l < NLS; l++) if (mem_upd_v[l] && scheme_predicts_loads(scheme)) m_upd++;
    // requests seen in the previous cycle (sampled now from the registered unit outputs)
    for (int l = 0; l < NLS; l++) if (mem_req_v[l] && rst_n) begin
      pend_t p; int r; iq_op_t o; o = mem_req_op[l];
      p.w.tid = o.inst.tid; p.w.rob_idx = o.rob_idx; p.w.has_dst = o.inst.has_dst; p.w.dst = o.inst.dst;
      if (o.inst.op == OP_LOAD) begin
        int x; x = $urandom_range(99);
        r = (x < 80) ? 2 : (x < 95) ? 12 : 200;
        if (o.inst.pc[31]) r = 12;       // directed test load
        upd_n_v[l] = 1; upd_n_p[l] = o.inst.dst; upd_n_val[l] = timer_t'(r);
        p.due = cyc + 1 + r;
      end else p.due = cyc + 1;
      pend.push_back(p);
    end
    begin
      int used; used = 0;
      for (int k = 0; k < pend.size(); k++)
        if (pend[k].due <= cyc && used < NLS) begin
          mem_done_v[used] = 1; mem_done[used] = pend[k].w;
          done_cyc_of[int'(pend[k].w.tid) * 65536 + 0] = cyc;
          pend.delete(k); k--; used++;
        end
    end
  end

  task automatic do_reset();
    rst_n = 0;
    for (int a = 0; a < W; a++) begin alloc_v[a] = 0; alloc_inst[a] = '0; end
    for (int l = 0; l < NLS; l++) begin
      mem_upd_v[l] = 0; mem_upd_preg[l] = '0; mem_upd_val[l] = '0;
      upd_n_v[l] = 0; upd_n_p[l] = '0; upd_n_val[l] = '0;
      mem_done_v[l] = 0; mem_done[l] = '0;
    end
    pend.delete();
    reset_model();
    for (int t = 0; t < NT; t++) max_disp_seq[t] = -1;
    issue_cyc_of.delete(); done_cyc_of.delete();
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
  endtask

  // allocate one group of instructions (at most W) when the core is ready
  task automatic send(inst_t g [$]);
    @(posedge clk); #2;
    while (!alloc_ready) begin @(posedge clk); #2; end
    for (int a = 0; a < W; a++) begin
      alloc_v[a] = (a < g.size());
      alloc_inst[a] = (a < g.size()) ? g[a] : '0;
    end
    @(posedge clk); #2;
    for (int a = 0; a < W; a++) alloc_v[a] = 0;
  endtask

  task automatic wait_commit(int t, int n);
    int guard; guard = 0;
    while (seq_com[t] < n && guard < 5000) begin @(posedge clk); guard++; end
    chk(seq_com[t] >= n, $sformatf("thread %0d committed %0d of %0d", t, seq_com[t], n));
  endtask

  initial begin
    int stalls;
    scheme = S_DELAY_ALL;
    m_early = 0; m_unace = 0; m_ooo = 0; m_congest = 0; m_upd = 0; m_iqstall = 0;
    stalls = 0;
    for (int s = 0; s < 6; s++) begin
      scheme = scheme_e'(s);
      do_reset();
      wait_sum = 0; run_cycles = 0;
      // ---- 1. dependent ALU chain in thread 0 ----
      begin
        inst_t g [$];
        g.delete();
        for (int k = 0; k < 8; k++) g.push_back(make_inst(0, OP_IALU, 1'b1, 1, -1, 1));
        send(g);
        wait_commit(0, 8);
        for (int k = 1; k < 8; k++) begin
          int want; want = scheme_predicts(scheme) ? 2 : 3;
          chk(issue_cyc_of[k] - issue_cyc_of[k-1] == want,
              $sformatf("scheme %0d chain issue interval %0d, want %0d", s,
                        issue_cyc_of[k] - issue_cyc_of[k-1], want));
        end
      end
      // ---- 2. load (12-cycle answer) and its consumer in thread 1 ----
      begin
        inst_t g [$]; inst_t ld;
        g.delete();
        ld = make_inst(1, OP_LOAD, 1'b1, 2, -1, 3);
        ld.pc[31] = 1'b1;      // marks the directed load for the memory model
        g.push_back(ld);
        g.push_back(make_inst(1, OP_IALU, 1'b1, 3, -1, 4));
        seq_com[1] = 0;
        done_cyc_of.delete();
        send(g);
        repeat (60) @(posedge clk);
        begin
          int want; want = scheme_predicts_loads(scheme) ? 1 : 2;
          chk(done_cyc_of.exists(65536) && issue_cyc_of.exists(65536 + 1) &&
              issue_cyc_of[65536 + 1] - done_cyc_of[65536] == want,
              $sformatf("scheme %0d load consumer issued %0d cycles after load data, want %0d", s,
                        issue_cyc_of[65536 + 1] - done_cyc_of[65536], want));
        end
        // the directed load's pc carried a marker: its commit is checked by count only
        seq_com[1] = 2;
      end
      // ---- 3. random four-thread mix ----
      begin
        int base [NT]; int t0; int c0;
        for (int t = 0; t < NT; t++) base[t] = seq_gen[t];
        c0 = cyc;
        t0 = 0;
        while (1) begin
          inst_t g [$]; int left;
          g.delete();
          left = 0;
          for (int t = 0; t < NT; t++) left += base[t] + NINST - seq_gen[t];
          if (left == 0) break;
          for (int a = 0; a < W && freel.size() > W; a++) begin
            int t; int x; op_e op;
            t = (t0 + a) % NT;
            if (seq_gen[t] >= base[t] + NINST) continue;
            x = $urandom_range(99);
            op = (x < 40) ? OP_IALU : (x < 48) ? OP_BR : (x < 53) ? OP_IMUL : (x < 54) ? OP_IDIV :
                 (x < 62) ? OP_FPALU : (x < 67) ? OP_FPMUL : (x < 68) ? OP_FPDIV :
                 (x < 90) ? OP_LOAD : OP_STORE;
            g.push_back(make_inst(t, op, $urandom_range(99) < 70,
                                  int'($urandom_range(NARCH - 1)),
                                  ($urandom_range(1) == 0) ? int'($urandom_range(NARCH - 1)) : -1,
                                  (op == OP_STORE || op == OP_BR) ? -1 : int'($urandom_range(NARCH - 1))));
          end
          t0 = (t0 + 1) % NT;
          if (!alloc_ready) stalls++;
          send(g);
        end
        for (int t = 0; t < NT; t++) wait_commit(t, base[t] + NINST);
        $display("scheme %0d: %0d instructions in %0d cycles, mean waiting IQ entries %0d.%02d",
                 s, NT * NINST, cyc - c0, int'(wait_sum / run_cycles),
                 int'((wait_sum * 100 / run_cycles) % 100));
      end
    end
    $display("mechanisms: early=%0d unace=%0d ooo=%0d congest=%0d load_upd=%0d iq_resv_stall=%0d alloc_stall=%0d",
             m_early, m_unace, m_ooo, m_congest, m_upd, m_iqstall, stalls);
    chk(m_early > 0, "predicted (early) dispatch never happened");
    chk(m_unace > 0, "un-ACE bypass never happened");
    chk(m_ooo > 0, "out-of-order dispatch never happened");
    chk(m_congest > 0, "dispatch congestion never happened");
    chk(m_upd > 0, "load timer update never happened");
    chk(m_iqstall > 0, "issue-queue reservation never limited allocation");
    chk(stalls > 0, "allocation never stalled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
