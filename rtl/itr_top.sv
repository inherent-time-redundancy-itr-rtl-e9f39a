// itr_top: ITR checker for the fetch and decode stages of a superscalar core.
//
// Programs repeat: the same trace (instructions from a start PC up to a
// branch, at most 16 long) is decoded again and again, and its decode signals
// do not depend on data. The checker folds the decode signals of each trace
// into an XOR signature (itr_sig_gen), queues the signatures in program order
// (itr_rob), looks each one up by start PC in a cache of signatures seen
// before (itr_cache), and at commit either records a new signature (cache
// miss) or, on a mismatch, has the core flush and refetch from the faulting
// trace (itr_recovery). A mismatch that repeats on the retry means the
// recorded signature was the faulty one and the core must abort or roll back.
//
// Interface to the core:
//  * decode side: dec_valid / dec_pc / dec_sig carry up to WIDTH decoded
//    instructions per cycle, lane 0 oldest, lanes contiguous; dec_ready says
//    the group is taken (there is room in the ITR ROB). A trace completed in
//    the group is reported on disp_valid[j] with its ROB tag disp_tag[j].
//  * branch recovery: squash_valid / squash_tail drop every trace younger than
//    the one ending in the mispredicted branch (squash_tail = that trace's
//    tag + 1); the partly built trace is dropped as well.
//  * commit side: commit_req asks to retire the oldest trace; head_ready says
//    it has been checked; commit_ack says it retired. commit_unchecked marks a
//    retiring trace that missed (its faults could not be caught).
//  * recovery: flush with restart_pc asks the core to flush and refetch;
//    abort_req (with flush) reports a fault found again on the retry;
//    recovered reports a retry that passed. sig_evicted pulses when a
//    recorded signature is evicted by another trace.
// Timing: a cache lookup takes one cycle; flush, abort_req, recovered and
// commit_ack are combinational in the commit cycle.
//
// Defaults: 4-wide decode and a 32-entry ITR ROB are this design's choices;
// the 2048-signature, 2-way ITR cache is the design's size.
module itr_top
  import itr_pkg::*;
#(
  parameter int unsigned WIDTH         = 4,
  parameter int unsigned ROB_DEPTH     = 32,
  parameter int unsigned CACHE_ENTRIES = 2048,
  parameter int unsigned CACHE_WAYS    = 2,
  localparam int unsigned TAG_W        = $clog2(ROB_DEPTH) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // decode stage
  input  logic [WIDTH-1:0] dec_valid,
  input  pc_t              dec_pc     [WIDTH],
  input  dec_sig_t         dec_sig    [WIDTH],
  output logic             dec_ready,
  output logic [WIDTH-1:0] disp_valid,
  output logic [TAG_W-1:0] disp_tag   [WIDTH],
  // branch misprediction recovery
  input  logic             squash_valid,
  input  logic [TAG_W-1:0] squash_tail,
  // commit
  input  logic             commit_req,
  output logic             head_ready,
  output logic             commit_ack,
  output logic             commit_unchecked,
  // fault handling
  output logic             flush,
  output pc_t              restart_pc,
  output logic             abort_req,
  output logic             recovered,
  output logic             retrying,
  output logic             sig_evicted
);

  trace_t           trace     [WIDTH];
  logic             rob_room;
  logic             chk_en, chk_valid, chk_hit;
  pc_t              chk_pc;
  sig_t             chk_sig;
  logic             commit_fault, head_miss, rec_fault;
  pc_t              head_pc;
  logic             rec_en;
  pc_t              rec_pc;
  sig_t             rec_sig;
  logic [TAG_W-1:0] rob_count;

  itr_sig_gen #(.WIDTH(WIDTH)) u_sig_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .flush     (flush || squash_valid),
    .in_valid  (dec_valid),
    .in_pc     (dec_pc),
    .in_dec    (dec_sig),
    .out_room  (rob_room),
    .in_ready  (dec_ready),
    .out_valid (disp_valid),
    .out_trace (trace)
  );

  itr_rob #(.DEPTH(ROB_DEPTH), .WIDTH(WIDTH)) u_rob (
    .clk          (clk),
    .rst_n        (rst_n),
    .disp_valid   (disp_valid),
    .disp_trace   (trace),
    .disp_room    (rob_room),
    .disp_tag     (disp_tag),
    .squash_valid (squash_valid),
    .squash_tail  (squash_tail),
    .flush        (flush),
    .chk_en       (chk_en),
    .chk_pc       (chk_pc),
    .chk_valid    (chk_valid),
    .chk_hit      (chk_hit),
    .chk_sig      (chk_sig),
    .commit_req   (commit_req),
    .head_ready   (head_ready),
    .commit_ack   (commit_ack),
    .commit_fault (commit_fault),
    .head_miss    (head_miss),
    .head_pc      (head_pc),
    .rec_fault    (rec_fault),
    .rec_en       (rec_en),
    .rec_pc       (rec_pc),
    .rec_sig      (rec_sig),
    .count        (rob_count)
  );

  itr_cache #(.ENTRIES(CACHE_ENTRIES), .WAYS(CACHE_WAYS)) u_cache (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_en    (chk_en),
    .rd_pc    (chk_pc),
    .rd_valid (chk_valid),
    .rd_hit   (chk_hit),
    .rd_sig   (chk_sig),
    .wr_en    (rec_en),
    .wr_pc    (rec_pc),
    .wr_sig   (rec_sig),
    .wr_evict (sig_evicted)
  );

  itr_recovery u_recovery (
    .clk          (clk),
    .rst_n        (rst_n),
    .commit_ack   (commit_ack),
    .commit_fault (commit_fault),
    .head_pc      (head_pc),
    .flush        (flush),
    .restart_pc   (restart_pc),
    .abort_req    (abort_req),
    .recovered    (recovered),
    .rec_fault    (rec_fault),
    .retrying     (retrying)
  );

  assign commit_unchecked = commit_ack && head_miss;

  // The ITR ROB never holds more than ROB_DEPTH traces.
  a_rob_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                rob_count <= TAG_W'(ROB_DEPTH));

endmodule
