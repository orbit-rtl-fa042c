// fu_pool: the core's function units, modelled for timing.
//
// The pool has N_IALU integer ALUs, N_IMD integer multiply/divide units,
// N_FPALU FP adders, N_FPMD FP multiply/divide/sqrt units and N_LS
// load/store address units. Register values are not carried: a unit only
// holds the instruction for its latency (orbit_pkg::fu_latency) and then
// reports completion. An issued op goes to the lowest free unit of its
// class; fu_free tells the issue queue how many units of each class can
// accept an op this cycle (a unit finishing this cycle counts as free, so a
// 1-cycle unit accepts one op per cycle). Units are not pipelined.
//
// Completions of ALU/MUL/DIV units leave on wb_* (unit order: IALU, IMD,
// FPALU, FPMD): issued in cycle i, reported during cycle i+latency and
// written into the readiness state at the end of it. A load/store unit
// computes the address in one cycle and hands the op to the memory side on
// mem_req_*; its completion comes back from there.
//
// From the text: the unit counts per class. This design's choices: the
// latencies, non-pipelined units, lowest-free-unit assignment.
module fu_pool
  import orbit_pkg::*;
#(
  parameter int unsigned N_IALU  = N_IALU_D,
  parameter int unsigned N_IMD   = N_IMD_D,
  parameter int unsigned N_FPALU = N_FPALU_D,
  parameter int unsigned N_FPMD  = N_FPMD_D,
  parameter int unsigned N_LS    = N_LS_D,
  parameter int unsigned ISSUE_W = WIDTH_D,
  localparam int unsigned NWB    = N_IALU + N_IMD + N_FPALU + N_FPMD,
  localparam int unsigned NU     = NWB + N_LS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       iss_v   [ISSUE_W],
  input  iq_op_t     iss_op  [ISSUE_W],
  output logic [4:0] fu_free [NFU_CLASSES],
  output logic       wb_v    [NWB],
  output wb_t        wb      [NWB],
  output logic       mem_req_v  [N_LS],
  output iq_op_t     mem_req_op [N_LS]
);

  function automatic fu_e unit_class(int unsigned u);
    if (u < N_IALU)                 return FU_IALU;
    if (u < N_IALU + N_IMD)         return FU_IMD;
    if (u < N_IALU + N_IMD + N_FPALU) return FU_FPALU;
    if (u < NWB)                    return FU_FPMD;
    return FU_LS;
  endfunction

  logic   busy_q [NU];
  timer_t cnt_q  [NU];
  iq_op_t op_q   [NU];
  logic   fin    [NU];
  logic   take   [NU];
  int unsigned take_slot [NU];

  always_comb begin
    for (int c = 0; c < NFU_CLASSES; c++) fu_free[c] = '0;
    for (int u = 0; u < NU; u++) begin
      fin[u] = busy_q[u] && cnt_q[u] == timer_t'(1);
      if (!busy_q[u] || fin[u]) fu_free[unit_class(u)] = fu_free[unit_class(u)] + 1'b1;
    end
  end

  // assign each issued op to the lowest free unit of its class
  always_comb begin
    logic placed;
    placed = 1'b0;
    for (int u = 0; u < NU; u++) begin
      take[u]      = 1'b0;
      take_slot[u] = 0;
    end
    for (int i = 0; i < ISSUE_W; i++)
      if (iss_v[i]) begin
        placed = 1'b0;
        for (int u = 0; u < NU; u++)
          if (!placed && !take[u] && (!busy_q[u] || fin[u]) &&
              unit_class(u) == fu_class(iss_op[i].inst.op)) begin
            take[u]      = 1'b1;
            take_slot[u] = i;
            placed       = 1'b1;
          end
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int u = 0; u < NU; u++) begin
        busy_q[u] <= 1'b0;
        cnt_q[u]  <= '0;
        op_q[u]   <= '0;
      end
    end else begin
      for (int u = 0; u < NU; u++) begin
        if (take[u]) begin
          busy_q[u] <= 1'b1;
          op_q[u]   <= iss_op[take_slot[u]];
          cnt_q[u]  <= (unit_class(u) == FU_LS) ? timer_t'(1)
                                                : fu_latency(iss_op[take_slot[u]].inst.op);
        end else if (fin[u]) begin
          busy_q[u] <= 1'b0;
        end else if (busy_q[u]) begin
          cnt_q[u] <= cnt_q[u] - timer_t'(1);
        end
      end
    end

  for (genvar u = 0; u < NWB; u++) begin : g_wb
    assign wb_v[u]       = fin[u];
    assign wb[u].tid     = op_q[u].inst.tid;
    assign wb[u].rob_idx = op_q[u].rob_idx;
    assign wb[u].has_dst = op_q[u].inst.has_dst;
    assign wb[u].dst     = op_q[u].inst.dst;
  end
  for (genvar l = 0; l < N_LS; l++) begin : g_mem
    assign mem_req_v[l]  = fin[NWB + l];
    assign mem_req_op[l] = op_q[NWB + l];
  end

endmodule
