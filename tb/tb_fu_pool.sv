// tb_fu_pool: random test of the function-unit pool's latencies and
// occupancy.
//
// Each cycle the testbench issues random operations, never more of a class
// than fu_free allows. A list of operations in flight predicts, for every
// cycle, the free-unit count of each class (units of the evaluated machine:
// 8 ALU, 4 int mul/div, 8 FP add, 4 FP mul/div, 4 load/store) and exactly
// which operations complete: an op issued in cycle i completes in cycle
// i+L with L = 1 (ALU, branch), 3 (int multiply), 20 (int divide),
// 2 (FP add), 4 (FP multiply), 12 (FP divide); loads and stores appear on
// the memory request port in cycle i+1.
module tb_fu_pool;
  import orbit_pkg::*;
  localparam int W = 8, NWB = 24, NLS = 4;
  logic clk = 0, rst_n = 0;
  logic   iss_v [W];  iq_op_t iss_op [W];
  logic [4:0] fu_free [NFU_CLASSES];
  logic   wb_v [NWB]; wb_t wb [NWB];
  logic   mem_req_v [NLS]; iq_op_t mem_req_op [NLS];
  int checks = 0, failures = 0;

  fu_pool dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lat_of(op_e op);
    case (op)
      OP_IMUL: return 3;  OP_IDIV: return 20; OP_FPALU: return 2;
      OP_FPMUL: return 4; OP_FPDIV: return 12; default: return 1;
    endcase
  endfunction
  function automatic int cls_of(op_e op);
    case (op)
      OP_IMUL, OP_IDIV: return 1; OP_LOAD, OP_STORE: return 2;
      OP_FPALU: return 3; OP_FPMUL, OP_FPDIV: return 4; default: return 0;
    endcase
  endfunction
  int units [5] = '{8, 4, 4, 8, 4};

  // in-flight list
  int f_pc [$]; int f_iss [$]; int f_fin [$]; int f_cls [$];

  initial begin
    int cyc; int pc;
    cyc = 0; pc = 1;
    for (int i = 0; i < W; i++) begin iss_v[i] = 0; iss_op[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      int busy [5]; int left [5]; int seen;
      @(negedge clk);
      for (int i = 0; i < W; i++) iss_v[i] = 0;
      #1;
      // free-unit counts
      for (int c = 0; c < 5; c++) busy[c] = 0;
      for (int k = 0; k < f_pc.size(); k++) if (f_iss[k] < cyc && cyc < f_fin[k]) busy[f_cls[k]]++;
      for (int c = 0; c < 5; c++) begin
        checks++;
        if (int'(fu_free[c]) != units[c] - busy[c]) begin
          failures++;
          if (failures < 10) $display("cyc %0d class %0d free %0d want %0d", cyc, c, fu_free[c], units[c]-busy[c]);
        end
        left[c] = units[c] - busy[c];
      end
      // completions due now
      seen = 0;
      for (int u = 0; u < NWB; u++) if (wb_v[u]) begin
        int hit; hit = -1;
        for (int k = 0; k < f_pc.size(); k++) if (f_pc[k] == int'(wb[u].rob_idx) + 128 * int'(wb[u].tid)) hit = k;
        checks++;
        if (hit < 0 || f_fin[hit] != cyc || f_cls[hit] == 2) begin
          failures++;
          if (failures < 10) $display("cyc %0d unexpected wb on unit %0d", cyc, u);
        end else seen++;
      end
      for (int l = 0; l < NLS; l++) if (mem_req_v[l]) begin
        int hit; hit = -1;
        for (int k = 0; k < f_pc.size(); k++) if (f_pc[k] == int'(mem_req_op[l].rob_idx) + 128 * int'(mem_req_op[l].inst.tid)) hit = k;
        checks++;
        if (hit < 0 || f_fin[hit] != cyc || f_cls[hit] != 2) begin
          failures++;
          if (failures < 10) $display("cyc %0d unexpected mem req", cyc);
        end else seen++;
      end
      begin
        int due; due = 0;
        for (int k = 0; k < f_pc.size(); k++) if (f_fin[k] == cyc) due++;
        checks++;
        if (due != seen) begin failures++; if (failures < 10) $display("cyc %0d %0d due, %0d seen", cyc, due, seen); end
      end
      // drop finished
      for (int k = f_pc.size() - 1; k >= 0; k--) if (f_fin[k] <= cyc) begin
        f_pc.delete(k); f_iss.delete(k); f_fin.delete(k); f_cls.delete(k);
      end
      // new issues (ids are unique among ops in flight)
      for (int i = 0; i < W; i++) begin
        op_e op; int c;
        op = op_e'($urandom_range(8));
        c = cls_of(op);
        if ($urandom_range(3) != 0 && left[c] > 0) begin
          left[c]--;
          iss_v[i] = 1;
          iss_op[i] = '0;
          iss_op[i].inst.op = op;
          iss_op[i].inst.has_dst = 1;
          iss_op[i].inst.tid = tid_t'(pc / 128);
          iss_op[i].rob_idx = robi_t'(pc % 128);
          f_pc.push_back(pc); f_iss.push_back(cyc); f_cls.push_back(c);
          f_fin.push_back(cyc + ((c == 2) ? 1 : lat_of(op)));
          pc = (pc + 1) % 512;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
