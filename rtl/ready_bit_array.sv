// ready_bit_array: multi-banked, multi-ported register-readiness bit array.
//
// One bit per physical register says whether its value has been written
// back. Instructions waiting in the reorder buffer look their source
// registers up here every cycle to decide whether they may enter the issue
// queue. To give every ROB entry its own read path, the array is kept as
// NBANKS identical copies; each ROB segment (here: each thread's ROB) reads
// its own copy through RPORTS combinational read ports.
//
// Write side (all copies alike, visible the cycle after):
//   wb_v/wb_preg       a result is written back: the bit is set
//   alloc_v/alloc_preg the register is handed out by rename: the bit is cleared
// A clear and a set of the same register in one cycle cannot happen in a
// correct pipeline; the clear wins.
// Reset makes every register ready (architectural state is valid).
//
// From the text: the bit array, its update at write-back, the banks as
// copies serving ROB segments. This design's choices: one bank per thread,
// clear on allocation, all-ready at reset.
module ready_bit_array
  import orbit_pkg::*;
#(
  parameter int unsigned NPREGS  = NPREGS_D,
  parameter int unsigned NBANKS  = NTHREADS_D,
  parameter int unsigned RPORTS  = 2 * ROB_SIZE_D,
  parameter int unsigned WB_W    = N_IALU_D + N_IMD_D + N_FPALU_D + N_FPMD_D + N_LS_D,
  parameter int unsigned ALLOC_W = WIDTH_D
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  alloc_v    [ALLOC_W],
  input  preg_t alloc_preg [ALLOC_W],
  input  logic  wb_v       [WB_W],
  input  preg_t wb_preg    [WB_W],
  input  preg_t raddr      [NBANKS][RPORTS],
  output logic  rdata      [NBANKS][RPORTS]
);

  logic [NPREGS-1:0] bits_q [NBANKS];
  logic [NPREGS-1:0] bits_d;

  // Next state is the same for every copy; it is computed once from copy 0.
  always_comb begin
    bits_d = bits_q[0];
    for (int w = 0; w < WB_W; w++)
      if (wb_v[w] && int'(wb_preg[w]) < NPREGS) bits_d[wb_preg[w]] = 1'b1;
    for (int a = 0; a < ALLOC_W; a++)
      if (alloc_v[a] && int'(alloc_preg[a]) < NPREGS) bits_d[alloc_preg[a]] = 1'b0;
  end

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) bits_q[b] <= '1;
      else        bits_q[b] <= bits_d;

    for (genvar p = 0; p < RPORTS; p++) begin : g_port
      assign rdata[b][p] = (int'(raddr[b][p]) < NPREGS) ? bits_q[b][raddr[b][p]] : 1'b0;
    end
  end

endmodule
