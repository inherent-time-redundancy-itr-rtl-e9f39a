// tb_itr_top: end-to-end test of the ITR checker at its default sizes
// (4-wide decode, 32-entry ITR ROB, 2048-signature 2-way ITR cache).
//
// The testbench is the core. It owns a program of 48 static traces (start
// PCs chosen so that three traces share each of 16 cache sets, which forces
// evictions; lengths 1..16, most ending in a branch, some running to the
// 16-instruction limit) and walks them at random, feeding their decode
// signals four per cycle. It injects transient single-bit faults into the
// decode signals of some dynamic traces (never into the branch / jump flags,
// so that trace boundaries stay as the program defines them), squashes
// younger traces now and then as a mispredicted branch would, and commits
// traces at a random rate. It follows the checker's requests to flush and
// refetch from restart_pc.
//
// Reference rules checked on every commit-side event:
//  * a faulty trace never retires as checked (it either misses or is caught);
//  * a clean trace is flagged only if the cache holds a faulty signature for
//    it (a faulty trace that missed earlier and was recorded);
//  * a flush restarts at the oldest in-flight trace;
//  * a retried trace ends in "recovered" when the recorded signature is good
//    and in "abort" when it is the faulty one.
// Each mechanism (hit, miss/record, eviction, mismatch flush, recovery,
// abort, squash, ROB-full stall, 16-instruction trace end, several traces
// completed in one cycle) must occur at least once.
module tb_itr_top;
  import itr_pkg::*;

  localparam int unsigned W      = 4;
  localparam int unsigned TAG_W  = 6;
  localparam int unsigned NTR    = 48;
  localparam int unsigned CYCLES = 30000;

  logic             clk = 0, rst_n;
  logic [W-1:0]     dec_valid;
  pc_t              dec_pc  [W];
  dec_sig_t         dec_sig [W];
  logic             dec_ready;
  logic [W-1:0]     disp_valid;
  logic [TAG_W-1:0] disp_tag [W];
  logic             squash_valid;
  logic [TAG_W-1:0] squash_tail;
  logic             commit_req, head_ready, commit_ack, commit_unchecked;
  logic             flush, abort_req, recovered, retrying, sig_evicted;
  pc_t              restart_pc;

  itr_top dut (.*);

  always #5 clk = ~clk;

  // ---- static program ----
  pc_t      tr_pc  [NTR];
  int       tr_len [NTR];
  dec_sig_t tr_ins [NTR][16];

  // ---- dynamic state ----
  typedef struct {
    int               id;
    bit               faulty;
    bit               retried;
    logic [TAG_W-1:0] tag;
  } dyn_t;

  dyn_t inflight [$];     // dispatched, not yet committed, oldest first
  typedef struct {
    int id;
    bit faulty;
    int fault_pos;
    int fault_bit;
    bit retried;
  } plan_t;
  plan_t plan [$];        // traces about to be decoded, plan[0] in progress
  int    cur_pos;         // next instruction of plan[0]
  bit    poisoned [NTR];  // cache holds a faulty signature for this trace
  bit    seen [NTR];

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_flush = 0, n_recov = 0, n_abort = 0;
  int n_squash = 0, n_full = 0, n_len16 = 0, n_multi = 0, n_detect = 0, n_inject = 0;

  task automatic fail(string msg);
    failures++;
    $display("%0t: %s", $time, msg);
  endtask

  function automatic int id_of(pc_t pc);
    for (int i = 0; i < NTR; i++) if (tr_pc[i] == pc) return i;
    return -1;
  endfunction

  // Queue trace id for decoding; faults are injected only on fresh instances.
  task automatic add_trace(int id, bit retried);
    plan_t t;
    int    pct;
    pct = seen[id] ? 3 : 15;
    t.id        = id;
    t.retried   = retried;
    t.faulty    = !retried && ($urandom_range(99) < pct);
    t.fault_pos = $urandom_range(tr_len[id] - 1);
    // any bit except the branch / jump flags (bits 52 and 51)
    do t.fault_bit = $urandom_range(63); while (t.fault_bit == 52 || t.fault_bit == 51);
    plan.push_back(t);
  endtask

  task automatic restart(int id, bit retried);
    plan.delete();
    cur_pos = 0;
    add_trace(id, retried);
  endtask

  initial begin
    #20_000_000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // build the program
    for (int k = 0; k < NTR; k++) begin
      tr_pc[k]  = 32'h0040_0000 + 32'((k % 16) * 'h40) + 32'((k / 16) * 'h1000);
      tr_len[k] = (k % 6 == 5) ? 16 : 1 + $urandom_range(12);
      for (int i = 0; i < 16; i++) begin
        tr_ins[k][i] = dec_sig_t'({$urandom, $urandom});
        tr_ins[k][i].flags.is_branch = 1'b0;
        tr_ins[k][i].flags.is_uncond = 1'b0;
      end
      if (tr_len[k] < 16) tr_ins[k][tr_len[k]-1].flags.is_branch = 1'b1;
      poisoned[k] = 0;
      seen[k]     = 0;
    end
    rst_n = 0; dec_valid = '0; squash_valid = 0; squash_tail = '0; commit_req = 0;
    for (int i = 0; i < W; i++) begin dec_pc[i] = '0; dec_sig[i] = '0; end
    restart($urandom_range(NTR - 1), 0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int   nv, got, pos;
      int   done_ids [$];
      bit   done_f [$];
      bit   done_r [$];
      bit   sq;
      @(negedge clk);
      done_ids.delete(); done_f.delete(); done_r.delete();
      // ---- squash decision: drop the traces after a random in-flight one ----
      sq = (inflight.size() > 1) && ($urandom_range(99) < 2);
      squash_valid = 0;
      // ---- commit request ----
      // slow-commit phases fill the ITR ROB
      commit_req = (inflight.size() > 0) && ($urandom_range(99) < ((cyc % 3000) < 400 ? 3 : 45));
      // ---- decode group: walk the planned traces ----
      while (plan.size() <= W) add_trace($urandom_range(NTR - 1), 0);
      begin
        int k, p2;
        k = 0; p2 = cur_pos;
        nv = $urandom_range(1, W);
        dec_valid = '0;
        for (int i = 0; i < W; i++) begin
          if (i < nv) begin
            dec_valid[i] = 1'b1;
            dec_pc[i]    = tr_pc[plan[k].id] + 32'(4 * p2);
            dec_sig[i]   = tr_ins[plan[k].id][p2];
            if (plan[k].faulty && p2 == plan[k].fault_pos)
              dec_sig[i][plan[k].fault_bit] = ~dec_sig[i][plan[k].fault_bit];
            p2++;
            if (p2 == tr_len[plan[k].id]) begin k++; p2 = 0; end
          end else begin
            dec_pc[i] = '0; dec_sig[i] = '0;
          end
        end
      end
      #1;
      // ---- squash ----
      if (sq && !flush) begin
        int keep;
        keep = $urandom_range(inflight.size() - 1, 1);
        if (commit_ack && keep == 0) keep = 1;
        squash_valid = 1;
        squash_tail  = inflight[keep - 1].tag + 1'b1;
        #1;
      end
      // ---- commit-side checks ----
      if (flush) begin
        dyn_t h;
        h = inflight[0];
        n_flush++;
        checks++;
        if (restart_pc != tr_pc[h.id]) fail("restart_pc is not the oldest trace");
        if (abort_req) begin
          n_abort++;
          checks++;
          if (!(h.retried && !h.faulty && poisoned[h.id])) fail("unexpected abort");
          poisoned[h.id] = 0;
        end else begin
          checks++;
          if (h.faulty) n_detect++;
          else if (!poisoned[h.id]) fail("clean trace flagged against a good signature");
          if (h.retried) fail("retried trace flagged without abort");
        end
      end else if (commit_ack) begin
        dyn_t h;
        h = inflight[0];
        checks++;
        if (h.faulty && !commit_unchecked) fail("faulty trace retired as checked");
        if (commit_unchecked) begin n_miss++; poisoned[h.id] = h.faulty; end
        else n_hit++;
        if (recovered) begin
          n_recov++;
          checks++;
          if (!h.retried) fail("recovered on a trace that was not retried");
        end else if (h.retried && !commit_unchecked) begin
          checks++;
          fail("retried trace passed without recovered");
        end
      end
      if (sig_evicted) n_evict++;
      if (!dec_ready && !flush && !squash_valid) n_full++;
      // ---- dispatch bookkeeping: traces completed by the accepted group ----
      if (dec_ready) begin
        pos = cur_pos;
        for (int i = 0; i < nv; i++) begin
          pos++;
          if (pos == tr_len[plan[0].id]) begin
            done_ids.push_back(plan[0].id); done_f.push_back(plan[0].faulty);
            done_r.push_back(plan[0].retried);
            seen[plan[0].id] = 1;
            if (tr_len[plan[0].id] == 16) n_len16++;
            if (plan[0].faulty) n_inject++;
            void'(plan.pop_front());
            pos = 0;
          end
        end
        cur_pos = pos;
      end
      got = 0;
      for (int j = 0; j < W; j++) if (disp_valid[j]) got++;
      checks++;
      if (got != done_ids.size()) fail($sformatf("%0d traces dispatched, expected %0d", got, done_ids.size()));
      if (got > 1) n_multi++;
      // ---- state update at the clock edge ----
      if (flush) begin
        dyn_t h;
        h = inflight[0];
        inflight.delete();
        // after an abort the core rolls back and runs the trace afresh
        restart(h.id, !abort_req);
      end else begin
        if (commit_ack) void'(inflight.pop_front());
        if (squash_valid) begin
          n_squash++;
          while (inflight.size() > 0 && inflight[inflight.size()-1].tag != squash_tail - 1'b1)
            void'(inflight.pop_back());
          restart($urandom_range(NTR - 1), 0);
        end else begin
          for (int j = 0; j < got && j < done_ids.size(); j++)
            inflight.push_back('{id: done_ids[j], faulty: done_f[j], retried: done_r[j], tag: disp_tag[j]});
        end
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_evict == 0 || n_detect == 0 || n_recov == 0 || n_abort == 0 ||
        n_squash == 0 || n_full == 0 || n_len16 == 0 || n_multi == 0) begin
      fail("a mechanism never happened");
    end
    $display("injected %0d detected %0d | hits %0d misses %0d evictions %0d | flushes %0d recoveries %0d aborts %0d",
             n_inject, n_detect, n_hit, n_miss, n_evict, n_flush, n_recov, n_abort);
    $display("squashes %0d rob-full %0d 16-instr traces %0d multi-trace cycles %0d",
             n_squash, n_full, n_len16, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
