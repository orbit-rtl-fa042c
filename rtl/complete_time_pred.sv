// complete_time_pred: predicted completion time of an instruction entering
// the issue queue (the adder of the prediction path).
//
// When an instruction is dispatched into the issue queue, the timer of its
// destination register is loaded with
//     dispatch-to-issue delay + issue-to-execute delay + function-unit latency
// where the latency comes from the opcode. Stores have no consumer and
// get no prediction. A load gets the largest value the timer holds (all
// ones) until its cache access tells the real latency; under the
// *_non_load schemes it gets no prediction at all, so its consumers wait
// for the actual write-back. Under DelayALL / DelayACE no timer is set.
// Function-unit conflicts and issue-bandwidth contention are ignored
// (issue latency is taken as zero), as in the text.
//
// Purely combinational. From the text: the sum, the opcode lookup, the
// store, load and non-load rules. This design's choices: the delay values
// (D2I = 1, I2E = 0 match this design's pipeline, where an instruction
// entering the issue queue at the end of cycle d can issue in d+1 and a
// unit issued in cycle i writes back at the end of i+latency).
module complete_time_pred
  import orbit_pkg::*;
#(
  parameter int unsigned D2I = 1,   // dispatch-to-issue delay
  parameter int unsigned I2E = 0    // issue-to-execute delay
) (
  input  scheme_e scheme,
  input  inst_t   inst,
  output logic    set_v,      // load the destination timer
  output timer_t  set_val
);

  always_comb begin
    set_v   = 1'b0;
    set_val = '1;
    if (scheme_predicts(scheme) && inst.has_dst && inst.op != OP_STORE) begin
      if (inst.op == OP_LOAD) begin
        set_v   = scheme_predicts_loads(scheme);
        set_val = '1;
      end else begin
        set_v   = 1'b1;
        set_val = timer_t'(D2I) + timer_t'(I2E) + fu_latency(inst.op);
      end
    end
  end

endmodule
