// itr_recovery: retry / abort controller of the ITR checker.
//
// It watches the commit of the trace at the head of the ITR ROB.
//  * NORMAL state, head trace has retry set (commit_fault): the decode
//    signals of this trace or the signature recorded for it earlier are
//    faulty. flush pulses with restart_pc = the trace start PC, so the core
//    empties its pipeline and refetches from the faulting trace; the state
//    becomes RETRY and remembers the PC.
//  * RETRY state, the retried trace commits cleanly (commit_ack at the same
//    PC): the fault was transient and has gone; recovered pulses.
//  * RETRY state, the retried trace mismatches again (commit_fault at the
//    same PC): the fault is re-detected, so the recorded signature is the
//    faulty one. abort_req pulses (the core aborts or rolls back to a safe
//    checkpoint) together with flush, and rec_fault asks the ITR ROB to
//    overwrite the faulty recorded signature with the new one.
//  * RETRY state, a different trace faults first: treated as a new fault
//    (flush and retry that trace).
// All outputs are combinational in the commit cycle; the state changes at
// the next clock edge. restart_pc is the head start PC passed through and
// rec_fault equals abort_req: both are kept as named outputs so that the
// core and the ITR ROB see the controller's decision, not its inputs.
//
// The flush-and-retry, the abort on re-detection and the recovery on a clean
// retry follow the design. Matching the retried trace by start PC and
// re-recording the signature on abort are this design's own choices.
module itr_recovery
  import itr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic commit_ack,
  input  logic commit_fault,
  input  pc_t  head_pc,
  output logic flush,
  output pc_t  restart_pc,
  output logic abort_req,
  output logic recovered,
  output logic rec_fault,
  output logic retrying
);

  typedef enum logic {NORMAL, RETRY} state_e;

  state_e state_q;
  pc_t    retry_pc_q;

  logic same_trace;
  assign same_trace = (state_q == RETRY) && (head_pc == retry_pc_q);

  assign flush      = commit_fault;
  assign restart_pc = head_pc;
  assign abort_req  = commit_fault && same_trace;
  assign rec_fault  = abort_req;
  assign recovered  = commit_ack && same_trace;
  assign retrying   = (state_q == RETRY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= NORMAL;
      retry_pc_q <= '0;
    end else if (commit_fault && !abort_req) begin
      state_q    <= RETRY;
      retry_pc_q <= head_pc;
    end else if (abort_req || recovered) begin
      state_q    <= NORMAL;
    end
  end

endmodule
