// tb_orbit_rob: random test of one thread's ROB and its dispatch rule.
//
// A small ROB (8 entries, 2-wide allocate, dispatch and commit) of thread 1
// is run under each of the six schemes in turn. The testbench drives the
// readiness lookups from two random per-register tables (actual and
// predicted) and keeps its own age-ordered list of entries. Each cycle it
// checks the lookup addresses, the candidates (the oldest eligible entries
// under the scheme's rule, with their early / un-ACE flags), the done run
// at the head and the committed instructions, and the free and held
// counts. Allocation slots of other threads must be ignored. Grants,
// completions and commits are random.
module tb_orbit_rob;
  import orbit_pkg::*;
  localparam int RS = 8, AW = 2, DW = 2, CWD = 2, WW = 2, T = 1;
  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  logic alloc_v [AW]; inst_t alloc_inst [AW];
  logic [3:0] free_cnt, held_cnt;
  preg_t src_preg [2*RS];
  logic act_rdy [2*RS], pred_rdy [2*RS];
  logic cand_v [DW]; iq_op_t cand_op [DW]; logic cand_r1 [DW], cand_r2 [DW], cand_early [DW], cand_unace [DW];
  logic grant [DW];
  logic wb_v [WW]; wb_t wb [WW];
  logic [1:0] head_done_n; inst_t commit_inst [CWD]; logic [1:0] commit_n;
  int checks = 0, failures = 0;

  orbit_rob #(.TID(T), .ROB_SIZE(RS), .ALLOC_W(AW), .DISP_W(DW), .COMMIT_W(CWD), .WB_W(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic act [32], pred [32];
  always_comb for (int p = 0; p < 2*RS; p++) begin
    act_rdy[p]  = act[src_preg[p][4:0]];
    pred_rdy[p] = pred[src_preg[p][4:0]];
  end

  typedef struct { inst_t inst; int idx; logic in_iq; logic done; } ment_t;
  ment_t m [$];
  int tail;

  task automatic chk(logic c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%0t: %s", $time, msg); end
  endtask

  initial begin
    int pc; pc = 1; tail = 0;
    scheme = S_DELAY_ALL;
    for (int r = 0; r < 32; r++) begin act[r] = 0; pred[r] = 0; end
    for (int a = 0; a < AW; a++) begin alloc_v[a] = 0; alloc_inst[a] = '0; end
    for (int d = 0; d < DW; d++) grant[d] = 0;
    for (int w = 0; w < WW; w++) begin wb_v[w] = 0; wb[w] = '0; end
    commit_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int n, nh, held;
      @(negedge clk);
      scheme = scheme_e'((cyc / 1000) % 6);
      for (int r = 0; r < 32; r++) begin
        act[r] = $urandom_range(2) == 0;
        pred[r] = act[r] || ($urandom_range(1) == 0);
      end
      for (int a = 0; a < AW; a++) alloc_v[a] = 0;
      for (int w = 0; w < WW; w++) wb_v[w] = 0;
      for (int d = 0; d < DW; d++) grant[d] = 0;
      commit_n = 0;
      #1;
      // lookup addresses
      foreach (m[k]) begin
        chk(src_preg[2*m[k].idx] == (m[k].inst.src1_v ? m[k].inst.src1 : preg_t'(0)), "src1 lookup address");
        chk(src_preg[2*m[k].idx+1] == (m[k].inst.src2_v ? m[k].inst.src2 : preg_t'(0)), "src2 lookup address");
      end
      // expected candidates
      n = 0; held = 0;
      foreach (m[k]) begin
        logic a1, a2, p1, p2, ra, rp, el;
        if (!m[k].in_iq) held++;
        a1 = !m[k].inst.src1_v || act[m[k].inst.src1[4:0]];
        a2 = !m[k].inst.src2_v || act[m[k].inst.src2[4:0]];
        p1 = a1 || (scheme >= S_PREDICT_ALL && pred[m[k].inst.src1[4:0]]);
        p2 = a2 || (scheme >= S_PREDICT_ALL && pred[m[k].inst.src2[4:0]]);
        ra = a1 && a2; rp = p1 && p2;
        el = !m[k].in_iq && (rp || ((scheme == S_DELAY_ACE || scheme == S_PREDICT_ALL_DELAY_ACE ||
                                     scheme == S_PREDICT_NON_LOAD_DELAY_ACE) && !m[k].inst.ace));
        if (el && n < DW) begin
          chk(cand_v[n] && cand_op[n].inst.pc == m[k].inst.pc, $sformatf("candidate %0d should be pc %0d", n, m[k].inst.pc));
          chk(int'(cand_op[n].rob_idx) == m[k].idx, "candidate rob index");
          chk(cand_r1[n] == a1 && cand_r2[n] == a2, "candidate ready bits");
          chk(cand_early[n] == (rp && !ra) && cand_unace[n] == !rp, "candidate early/unace flags");
          n++;
        end
      end
      for (int d = n; d < DW; d++) chk(!cand_v[d], "extra candidate");
      chk(int'(held_cnt) == held, "held count");
      chk(int'(free_cnt) == RS - m.size(), "free count");
      // head done run and commit window
      nh = 0;
      for (int k = 0; k < CWD && k < m.size(); k++) begin
        if (m[k].done && nh == k) nh++;
      end
      chk(int'(head_done_n) == nh, $sformatf("head_done_n %0d want %0d", head_done_n, nh));
      for (int k = 0; k < nh; k++) chk(commit_inst[k].pc == m[k].inst.pc, "commit order");
      // random grant / completion / commit / allocation for the next edge
      for (int d = 0; d < n; d++) if ($urandom_range(1) == 0) begin
        grant[d] = 1;
        foreach (m[k]) if (m[k].inst.pc == cand_op[d].inst.pc) m[k].in_iq = 1;
      end
      for (int w = 0; w < WW; w++) begin
        int k; k = $urandom_range(m.size() > 0 ? m.size() - 1 : 0);
        if (m.size() > 0 && m[k].in_iq && !m[k].done && $urandom_range(1) == 0) begin
          wb_v[w] = 1; wb[w].tid = tid_t'(T); wb[w].rob_idx = robi_t'(m[k].idx);
          m[k].done = 1;
        end
      end
      commit_n = 2'($urandom_range(nh));
      for (int k = 0; k < int'(commit_n); k++) void'(m.pop_front());
      for (int a = 0; a < AW; a++) begin
        alloc_inst[a] = '0;
        alloc_inst[a].pc = pc;
        alloc_inst[a].tid = ($urandom_range(3) == 0) ? tid_t'(2) : tid_t'(T);
        alloc_inst[a].op = op_e'($urandom_range(8));
        alloc_inst[a].ace = $urandom_range(1);
        alloc_inst[a].src1_v = $urandom_range(3) != 0;
        alloc_inst[a].src1 = preg_t'($urandom_range(31));
        alloc_inst[a].src2_v = $urandom_range(1);
        alloc_inst[a].src2 = preg_t'($urandom_range(31));
        alloc_inst[a].has_dst = 1;
        alloc_inst[a].dst = preg_t'($urandom_range(31));
        // allocation may use only the space free before this cycle's commits
        if ($urandom_range(1) == 0 && int'(free_cnt) > a + 1) begin
          alloc_v[a] = 1; pc++;
          if (alloc_inst[a].tid == tid_t'(T)) begin
            m.push_back('{inst: alloc_inst[a], idx: tail, in_iq: 0, done: 0});
            tail = (tail + 1) % RS;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
