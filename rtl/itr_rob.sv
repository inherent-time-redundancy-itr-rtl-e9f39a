// itr_rob: the ITR reorder buffer, an in-order queue of trace signatures.
//
// Traces completed by the signature generator are dispatched at the tail (up
// to WIDTH per cycle, slot 0 oldest) with chk = miss = retry = 0; each gets a
// tag (disp_tag, index plus wrap bit) that the core keeps with the branch that
// ends the trace. Holding signatures here until commit keeps wrong-path
// traces out of the ITR cache.
//
// Check: the oldest unchecked entry is looked up in the ITR cache through its
// read port, one lookup per cycle, with the answer one cycle later. A miss
// sets chk and miss; a hit sets chk, and sets retry if the recorded signature
// differs from the entry's.
//
// Commit: the core raises commit_req when it wants to retire the trace at the
// head; head_ready says the head has been checked. With commit_req and
// head_ready:
//  * retry = 0: commit_ack; the entry leaves and, if miss was set, its
//    signature is recorded in the ITR cache (rec_en / rec_pc / rec_sig).
//  * retry = 1: commit_fault; the entry stays and the recovery unit decides.
//    If it asks for rec_fault, the head signature is recorded as well.
//
// Squash: squash_valid with squash_tail (the tag after the trace ending in the
// mispredicted branch) drops every younger entry. flush empties the queue.
// A squash or flush blocks dispatch in its cycle; a pending lookup for a
// dropped entry is discarded. disp_room says WIDTH entries are free.
//
// The fields Start PC, Signature, chk, miss, retry and the check / record
// roles follow the design; DEPTH, the tagging and squash interface and the
// one-lookup-per-cycle order are this design's own choices.
module itr_rob
  import itr_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned PTR_W = $clog2(DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // dispatch
  input  logic [WIDTH-1:0] disp_valid,
  input  trace_t           disp_trace [WIDTH],
  output logic             disp_room,
  output logic [PTR_W-1:0] disp_tag   [WIDTH],
  // wrong-path squash and full flush
  input  logic             squash_valid,
  input  logic [PTR_W-1:0] squash_tail,
  input  logic             flush,
  // ITR cache check port
  output logic             chk_en,
  output pc_t              chk_pc,
  input  logic             chk_valid,
  input  logic             chk_hit,
  input  sig_t             chk_sig,
  // commit
  input  logic             commit_req,
  output logic             head_ready,
  output logic             commit_ack,
  output logic             commit_fault,
  output logic             head_miss,
  output pc_t              head_pc,
  input  logic             rec_fault,
  // ITR cache record port
  output logic             rec_en,
  output pc_t              rec_pc,
  output sig_t             rec_sig,
  // occupancy
  output logic [PTR_W-1:0] count
);

  localparam int unsigned IDX_W = PTR_W - 1;
  typedef logic [PTR_W-1:0] ptr_t;

  rob_entry_t ent_q [DEPTH];
  ptr_t       head_q, tail_q, chkp_q;   // chkp: oldest entry not yet looked up
  logic       req_q;                    // a lookup is in flight
  ptr_t       req_ptr_q;                // ... for this entry

  function automatic logic [IDX_W-1:0] ix(ptr_t p);
    return IDX_W'(p);
  endfunction

  assign count     = tail_q - head_q;
  assign disp_room = (ptr_t'(DEPTH) - count) >= ptr_t'(WIDTH);

  // Tags of the dispatched traces.
  always_comb begin
    for (int unsigned j = 0; j < WIDTH; j++) disp_tag[j] = tail_q + ptr_t'(j);
  end

  // Lookup issue: oldest unchecked entry, if any.
  assign chk_en = (chkp_q != tail_q) && !flush && !squash_valid;
  assign chk_pc = ent_q[ix(chkp_q)].start_pc;

  // Head status and commit decision.
  rob_entry_t head_e;
  assign head_e       = ent_q[ix(head_q)];
  assign head_pc      = head_e.start_pc;
  assign head_miss    = head_e.miss;
  assign head_ready   = (head_q != tail_q) && head_e.chk;
  assign commit_ack   = commit_req && head_ready && !head_e.retry;
  assign commit_fault = commit_req && head_ready &&  head_e.retry;
  assign rec_en       = (commit_ack && head_e.miss) || (commit_fault && rec_fault);
  assign rec_pc       = head_e.start_pc;
  assign rec_sig      = head_e.sig;

  // Is pointer p within [head, lim)?
  function automatic logic in_range(ptr_t p, ptr_t lim, ptr_t h);
    return ptr_t'(p - h) < ptr_t'(lim - h);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q    <= '0;
      tail_q    <= '0;
      chkp_q    <= '0;
      req_q     <= 1'b0;
      req_ptr_q <= '0;
      for (int unsigned i = 0; i < DEPTH; i++) ent_q[i] <= '0;
    end else if (flush) begin
      head_q <= '0;
      tail_q <= '0;
      chkp_q <= '0;
      req_q  <= 1'b0;
    end else begin
      // Lookup result for the entry in flight.
      if (req_q && chk_valid && !squash_valid) begin
        ent_q[ix(req_ptr_q)].chk   <= 1'b1;
        ent_q[ix(req_ptr_q)].miss  <= !chk_hit;
        ent_q[ix(req_ptr_q)].retry <= chk_hit && (chk_sig != ent_q[ix(req_ptr_q)].sig);
      end
      req_q     <= chk_en;
      req_ptr_q <= chkp_q;
      if (chk_en) chkp_q <= chkp_q + 1'b1;

      if (commit_ack) head_q <= head_q + 1'b1;

      if (squash_valid) begin
        // Entries at squash_tail and younger are wrong-path. Any lookup in
        // flight is redone from the oldest unchecked surviving entry.
        tail_q <= squash_tail;
        if (req_q && in_range(req_ptr_q, squash_tail, head_q)) chkp_q <= req_ptr_q;
        else if (in_range(chkp_q, squash_tail, head_q))        chkp_q <= chkp_q;
        else                                                 chkp_q <= squash_tail;
      end else begin
        ptr_t t;
        t = tail_q;
        for (int unsigned j = 0; j < WIDTH; j++) begin
          if (disp_valid[j] && disp_room) begin
            ent_q[ix(t)].start_pc <= disp_trace[j].start_pc;
            ent_q[ix(t)].sig      <= disp_trace[j].sig;
            ent_q[ix(t)].chk      <= 1'b0;
            ent_q[ix(t)].miss     <= 1'b0;
            ent_q[ix(t)].retry    <= 1'b0;
            t = t + 1'b1;
          end
        end
        tail_q <= t;
      end
    end
  end

endmodule
