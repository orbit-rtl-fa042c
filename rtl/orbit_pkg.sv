// orbit_pkg: types and constants shared by the ORBIT dispatch back end.
//
// ORBIT (operand-readiness-based instruction dispatch) keeps instructions in
// the reorder buffer until their source operands are ready (or, with
// prediction, one cycle before they will be), so that the issue queue holds
// almost no instructions that are only waiting. This package holds the
// machine sizes of the evaluated SMT core (8-wide, 96-entry issue queue,
// 96-entry ROB per thread, the function-unit mix), the six dispatch schemes,
// the renamed-instruction record and the function-unit latencies.
//
// The sizes in the first block follow the evaluated machine configuration.
// The thread count (4) follows the four-program workloads. The physical
// register count, the op classes and all latencies are this design's own
// choices (the text gives none); they are the usual values of a
// SimpleScalar-style out-of-order model.
package orbit_pkg;

  // ---- machine configuration -------------------------------------------
  localparam int unsigned NTHREADS_D = 4;    // four programs per workload
  localparam int unsigned ROB_SIZE_D = 96;   // ROB entries per thread
  localparam int unsigned IQ_SIZE_D  = 96;   // shared issue queue entries
  localparam int unsigned WIDTH_D    = 8;    // fetch / dispatch / issue / commit width
  localparam int unsigned N_IALU_D   = 8;    // integer ALUs
  localparam int unsigned N_IMD_D    = 4;    // integer multiply/divide units
  localparam int unsigned N_LS_D     = 4;    // load/store (address) units
  localparam int unsigned N_FPALU_D  = 8;    // FP adders
  localparam int unsigned N_FPMD_D   = 4;    // FP multiply/divide/sqrt units

  // Physical registers: 4 threads x 64 architectural registers (32 int +
  // 32 FP) plus one rename register per ROB entry of all threads.
  localparam int unsigned NPREGS_D   = 640;
  localparam int unsigned PREG_W     = 10;   // wide enough for up to 1024 registers
  localparam int unsigned TID_W      = 2;    // up to 4 threads
  localparam int unsigned ROBI_W     = 7;    // up to 128 ROB entries per thread
  localparam int unsigned TIMER_W    = 8;    // timer counts up to 255 cycles

  typedef logic [PREG_W-1:0]  preg_t;
  typedef logic [TID_W-1:0]   tid_t;
  typedef logic [ROBI_W-1:0]  robi_t;
  typedef logic [TIMER_W-1:0] timer_t;

  // ---- dispatch schemes ---------------------------------------------------
  // The six ORBIT techniques. DelayALL / DelayACE wait for actual operand
  // readiness; the Predict variants use the per-register timers; *_non_load
  // does not predict load completion; *_DelayACE lets un-ACE instructions
  // enter the issue queue without waiting.
  typedef enum logic [2:0] {
    S_DELAY_ALL                 = 3'd0,
    S_DELAY_ACE                 = 3'd1,
    S_PREDICT_ALL               = 3'd2,   // PredictALL (Predict_DelayALL)
    S_PREDICT_NON_LOAD          = 3'd3,   // Predict_non_load (_DelayALL)
    S_PREDICT_ALL_DELAY_ACE     = 3'd4,   // PredictALL_DelayACE (Predict_DelayACE)
    S_PREDICT_NON_LOAD_DELAY_ACE = 3'd5
  } scheme_e;

  function automatic logic scheme_predicts(scheme_e s);
    return s inside {S_PREDICT_ALL, S_PREDICT_NON_LOAD,
                     S_PREDICT_ALL_DELAY_ACE, S_PREDICT_NON_LOAD_DELAY_ACE};
  endfunction

  function automatic logic scheme_ace_only(scheme_e s);
    return s inside {S_DELAY_ACE, S_PREDICT_ALL_DELAY_ACE, S_PREDICT_NON_LOAD_DELAY_ACE};
  endfunction

  function automatic logic scheme_predicts_loads(scheme_e s);
    return s inside {S_PREDICT_ALL, S_PREDICT_ALL_DELAY_ACE};
  endfunction

  // ---- operations -----------------------------------------------------------
  typedef enum logic [3:0] {
    OP_IALU  = 4'd0,
    OP_BR    = 4'd1,
    OP_IMUL  = 4'd2,
    OP_IDIV  = 4'd3,
    OP_FPALU = 4'd4,
    OP_FPMUL = 4'd5,
    OP_FPDIV = 4'd6,
    OP_LOAD  = 4'd7,
    OP_STORE = 4'd8
  } op_e;

  typedef enum logic [2:0] {
    FU_IALU  = 3'd0,
    FU_IMD   = 3'd1,
    FU_LS    = 3'd2,
    FU_FPALU = 3'd3,
    FU_FPMD  = 3'd4
  } fu_e;
  localparam int unsigned NFU_CLASSES = 5;

  function automatic fu_e fu_class(op_e op);
    case (op)
      OP_IMUL, OP_IDIV:   return FU_IMD;
      OP_FPALU:           return FU_FPALU;
      OP_FPMUL, OP_FPDIV: return FU_FPMD;
      OP_LOAD, OP_STORE:  return FU_LS;
      default:            return FU_IALU;
    endcase
  endfunction

  // Cycles a unit is busy with an op; for a load or store this is the
  // address computation only, the memory access follows outside.
  function automatic timer_t fu_latency(op_e op);
    case (op)
      OP_IMUL:  return timer_t'(3);
      OP_IDIV:  return timer_t'(20);
      OP_FPALU: return timer_t'(2);
      OP_FPMUL: return timer_t'(4);
      OP_FPDIV: return timer_t'(12);
      default:  return timer_t'(1);
    endcase
  endfunction

  // Renamed instruction as it leaves the rename stage. pc only identifies
  // the instruction; ace is the 1-bit vulnerability tag carried in the ISA.
  typedef struct packed {
    logic [31:0] pc;
    tid_t        tid;
    op_e         op;
    logic        ace;
    logic        has_dst;
    preg_t       dst;
    logic        src1_v;
    preg_t       src1;
    logic        src2_v;
    preg_t       src2;
  } inst_t;

  // Instruction as held in the issue queue and the function units.
  typedef struct packed {
    inst_t inst;
    robi_t rob_idx;
  } iq_op_t;

  // Completion report: marks the ROB entry done and, with has_dst, writes
  // the destination register back.
  typedef struct packed {
    tid_t  tid;
    robi_t rob_idx;
    logic  has_dst;
    preg_t dst;
  } wb_t;

endpackage
