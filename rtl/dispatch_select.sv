// dispatch_select: shares the dispatch bandwidth among the threads' ROBs.
//
// Every thread's ROB offers up to DISP_W eligible instructions, oldest
// first (cand_v[t][0..], contiguous from slot 0). At most DISP_W of all
// offers enter the issue queue per cycle. The offers are taken round by
// round: in round r each thread in turn (starting at a rotating thread)
// gets its r-th oldest offer granted while bandwidth lasts. The start thread
// advances by one every cycle.
//
// Outputs: grant[t][r] back to the ROBs, and the granted offers as a
// compact list sel_v/sel_tid/sel_slot (slot 0 upwards) for the issue-queue
// write port. Combinational except the rotating start pointer.
//
// From the text: the dispatch-bandwidth limit ("the maximum number of
// dispatched instructions can not exceed the processor dispatch
// bandwidth"). This design's choice: the round-robin interleaving.
module dispatch_select
  import orbit_pkg::*;
#(
  parameter int unsigned NTHREADS = NTHREADS_D,
  parameter int unsigned DISP_W   = WIDTH_D
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cand_v   [NTHREADS][DISP_W],
  output logic grant    [NTHREADS][DISP_W],
  output logic sel_v    [DISP_W],
  output tid_t sel_tid  [DISP_W],
  output logic [$clog2(DISP_W)-1:0] sel_slot [DISP_W]
);

  tid_t start_q;

  always_comb begin
    int unsigned n;
    n = 0;
    for (int t = 0; t < NTHREADS; t++)
      for (int r = 0; r < DISP_W; r++) grant[t][r] = 1'b0;
    for (int s = 0; s < DISP_W; s++) begin
      sel_v[s]    = 1'b0;
      sel_tid[s]  = '0;
      sel_slot[s] = '0;
    end
    for (int r = 0; r < DISP_W; r++)
      for (int k = 0; k < NTHREADS; k++) begin
        int unsigned t;
        t = (int'(start_q) + k) % NTHREADS;
        if (cand_v[t][r] && n < DISP_W) begin
          grant[t][r]  = 1'b1;
          sel_v[n]     = 1'b1;
          sel_tid[n]   = tid_t'(t);
          sel_slot[n]  = ($clog2(DISP_W))'(r);
          n++;
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) start_q <= '0;
    else        start_q <= tid_t'((int'(start_q) + 1) % NTHREADS);

endmodule
