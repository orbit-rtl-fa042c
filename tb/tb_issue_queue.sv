// tb_issue_queue: random test of the shared issue queue.
//
// A small queue (8 entries, 2 inserts, 2 issues, 2 write-back ports) gets
// random instructions whose sources are fresh registers that become ready
// on random write-backs. The testbench keeps its own list of entries and a
// readiness bit per register. Each cycle it checks: every issued
// instruction is in the list and has both sources ready; none issues twice;
// the queue issues as many as it can (the smaller of the issue width and
// the ready entries of classes with free units), so a woken instruction
// issues the cycle after its operand is written back; no instruction of a
// class without free units issues; and the entry, waiting and ACE-waiting
// counts match the list.
module tb_issue_queue;
  import orbit_pkg::*;
  localparam int Q = 8, IW = 2, SW = 2, WW = 2;
  logic clk = 0, rst_n = 0;
  logic ins_v [IW]; iq_op_t ins_op [IW]; logic ins_r1 [IW]; logic ins_r2 [IW];
  logic wb_v [WW];  wb_t wb [WW];
  logic [4:0] fu_free [NFU_CLASSES];
  logic iss_v [SW]; iq_op_t iss_op [SW];
  logic [3:0] count, n_wait, n_wait_ace, n_ready;
  int checks = 0, failures = 0;

  issue_queue #(.IQ_SIZE(Q), .INS_W(IW), .ISSUE_W(SW), .WB_W(WW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic rdy [1024];
  int next_reg;
  iq_op_t lst [$];

  function automatic logic ent_ready(iq_op_t o);
    return (!o.inst.src1_v || rdy[o.inst.src1]) && (!o.inst.src2_v || rdy[o.inst.src2]);
  endfunction

  initial begin
    int pc; int blocked;
    pc = 1; next_reg = 1;
    for (int r = 0; r < 1024; r++) rdy[r] = 1;
    for (int i = 0; i < IW; i++) begin ins_v[i] = 0; ins_op[i] = '0; ins_r1[i] = 0; ins_r2[i] = 0; end
    for (int w = 0; w < WW; w++) begin wb_v[w] = 0; wb[w] = '0; end
    for (int c = 0; c < NFU_CLASSES; c++) fu_free[c] = 8;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int nready, ni, nw, nwa, occ;
      @(negedge clk);
      for (int i = 0; i < IW; i++) ins_v[i] = 0;
      for (int w = 0; w < WW; w++) wb_v[w] = 0;
      blocked = (cyc % 7 == 0) ? int'($urandom_range(4)) : -1;
      for (int c = 0; c < NFU_CLASSES; c++) fu_free[c] = (c == blocked) ? 5'd0 : 5'd8;
      #1;
      // counts
      nw = 0; nwa = 0;
      foreach (lst[k]) if (!ent_ready(lst[k])) begin nw++; if (lst[k].inst.ace) nwa++; end
      checks += 3;
      if (int'(count) != lst.size()) begin failures++; $display("cyc %0d count %0d want %0d", cyc, count, lst.size()); end
      if (int'(n_wait) != nw) begin failures++; $display("cyc %0d n_wait %0d want %0d", cyc, n_wait, nw); end
      if (int'(n_wait_ace) != nwa) begin failures++; $display("cyc %0d n_wait_ace %0d want %0d", cyc, n_wait_ace, nwa); end
      // issues (an issuing entry is freed only at the clock edge)
      occ = lst.size();
      nready = 0;
      foreach (lst[k]) if (ent_ready(lst[k]) && int'(fu_class(lst[k].inst.op)) != blocked) nready++;
      ni = 0;
      for (int s = 0; s < SW; s++) if (iss_v[s]) begin
        int hit; hit = -1;
        ni++;
        foreach (lst[k]) if (lst[k].inst.pc == iss_op[s].inst.pc) hit = k;
        checks++;
        if (hit < 0) begin failures++; $display("cyc %0d issued unknown/duplicate pc %0d", cyc, iss_op[s].inst.pc); end
        else begin
          if (!ent_ready(lst[hit]) || int'(fu_class(lst[hit].inst.op)) == blocked) begin
            failures++; $display("cyc %0d issued pc %0d not ready or class blocked", cyc, iss_op[s].inst.pc);
          end
          lst.delete(hit);
        end
      end
      checks++;
      if (ni != ((nready < SW) ? nready : SW)) begin
        failures++; $display("cyc %0d issued %0d with %0d ready", cyc, ni, nready);
      end
      // write-backs of random waiting registers
      for (int w = 0; w < WW; w++) if ($urandom_range(2) == 0 && next_reg > 1) begin
        int r; r = $urandom_range(next_reg - 1, (next_reg > 12) ? next_reg - 12 : 1);
        wb_v[w] = 1; wb[w] = '0; wb[w].has_dst = 1; wb[w].dst = preg_t'(r);
      end
      // inserts that fit
      for (int i = 0; i < IW; i++) if ($urandom_range(1) == 0 && occ + i < Q) begin
        iq_op_t o; o = '0;
        o.inst.pc = pc; pc++;
        o.inst.op = op_e'($urandom_range(8));
        o.inst.ace = $urandom_range(1);
        o.inst.src1_v = $urandom_range(3) != 0;
        o.inst.src2_v = $urandom_range(1);
        o.inst.src1 = preg_t'((next_reg > 6) ? $urandom_range(next_reg - 1, next_reg - 6) : 0);
        o.inst.src2 = preg_t'((next_reg > 6) ? $urandom_range(next_reg - 1, next_reg - 6) : 0);
        o.inst.has_dst = 1;
        o.inst.dst = preg_t'(next_reg);
        rdy[next_reg] = 0; next_reg++;
        ins_v[i] = 1; ins_op[i] = o;
        ins_r1[i] = rdy[o.inst.src1]; ins_r2[i] = rdy[o.inst.src2];
      end
      // the model: write-backs land at the edge, inserts join the list
      for (int w = 0; w < WW; w++) if (wb_v[w]) rdy[wb[w].dst] = 1;
      for (int i = 0; i < IW; i++) if (ins_v[i]) lst.push_back(ins_op[i]);
      if (next_reg > 1000) begin
        // drain and restart register numbering
        for (int w = 0; w < WW; w++) wb_v[w] = 0;
        for (int i = 0; i < IW; i++) ins_v[i] = 0;
        for (int r = 0; r < 1024; r++) rdy[r] = 1;
        for (int r = 1; r < 1024; r++) begin
          @(negedge clk); wb_v[0] = 1; wb[0].has_dst = 1; wb[0].dst = preg_t'(r);
        end
        @(negedge clk); wb_v[0] = 0;
        repeat (10) @(negedge clk);
        lst.delete();
        next_reg = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
