// tb_itr_rob: self-checking test of the ITR ROB (8 entries, 4-wide).
// The testbench plays the ITR cache (a table of recorded signatures answering
// one cycle after each lookup, with occasional corrupted answers to cause
// mismatches) and the core (random dispatch, commit requests, squashes to a
// random surviving tag, flushes). A queue model predicts lookup order, the
// chk / miss / retry outcome of every entry, commit_ack / commit_fault,
// records, tags and occupancy.
module tb_itr_rob;
  import itr_pkg::*;

  localparam int unsigned D = 8;
  localparam int unsigned W = 4;
  localparam int unsigned PW = $clog2(D) + 1;

  logic clk = 0, rst_n;
  logic [W-1:0]  disp_valid;
  trace_t        disp_trace [W];
  logic          disp_room;
  logic [PW-1:0] disp_tag [W];
  logic          squash_valid;
  logic [PW-1:0] squash_tail;
  logic          flush;
  logic          chk_en;
  pc_t           chk_pc;
  logic          chk_valid, chk_hit;
  sig_t          chk_sig;
  logic          commit_req, head_ready, commit_ack, commit_fault, head_miss;
  pc_t           head_pc;
  logic          rec_fault, rec_en;
  pc_t           rec_pc;
  sig_t          rec_sig;
  logic [PW-1:0] count;

  itr_rob #(.DEPTH(D), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    logic [PW-1:0] tag;
    pc_t  pc;
    sig_t sig;
    bit   issued, chk, miss, retry;
  } m_entry_t;

  m_entry_t      q [$];
  logic [PW-1:0] m_tail;
  sig_t          cmap [pc_t];

  int checks = 0, failures = 0;
  int n_ack = 0, n_fault = 0, n_rec = 0, n_squash = 0, n_flush = 0, n_full = 0, n_hit = 0;

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit last_fault; bit resp_pending; bit resp_hit; sig_t resp_sig; logic [PW-1:0] resp_tag;
    rst_n = 0; disp_valid = '0; squash_valid = 0; squash_tail = '0; flush = 0;
    chk_valid = 0; chk_hit = 0; chk_sig = '0; commit_req = 0; rec_fault = 0;
    for (int j = 0; j < W; j++) disp_trace[j] = '0;
    m_tail = '0; resp_pending = 0; last_fault = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      bit exp_ready, exp_ack, exp_fault, exp_room, exp_chk_en, exp_rec;
      int head_i, ndisp, keep, first_unchecked;
      @(negedge clk);
      // ---- drive inputs ----
      chk_valid = resp_pending;
      chk_hit   = resp_hit;
      chk_sig   = resp_sig;
      // the core flushes after a faulting commit, and now and then on its own
      flush        = last_fault || ($urandom_range(999) < 5);
      squash_valid = 0;
      commit_req   = ($urandom_range(99) < 50);
      rec_fault    = $urandom_range(1);
      ndisp        = $urandom_range(W);
      for (int j = 0; j < W; j++) begin
        disp_valid[j] = (j < ndisp);
        disp_trace[j].start_pc = 32'h2000 + 32'(4 * $urandom_range(11));
        // a trace's signature depends on its PC; now and then a faulty one
        disp_trace[j].sig      = {32'h0, disp_trace[j].start_pc} * 64'h9E37_79B9_7F4A_7C15;
        if ($urandom_range(99) < 3) disp_trace[j].sig[$urandom_range(63)] ^= 1'b1;
      end
      // ---- model: combinational expectations ----
      exp_room  = (D - q.size()) >= W;
      exp_ready = (q.size() > 0) && q[0].chk;
      exp_ack   = commit_req && exp_ready && !q[0].retry;
      exp_fault = commit_req && exp_ready &&  q[0].retry;
      if (!exp_room) n_full++;
      if (($urandom_range(99) < 4) && !flush) begin
        int lo;
        lo = exp_ack ? 1 : 0;
        keep = $urandom_range(q.size(), lo);
        squash_valid = 1;
        squash_tail  = (q.size() > 0 ? q[0].tag : m_tail) + PW'(keep);
      end
      first_unchecked = -1;
      foreach (q[i]) if (!q[i].issued && first_unchecked < 0) first_unchecked = i;
      exp_chk_en = (first_unchecked >= 0) && !flush && !squash_valid;
      exp_rec    = (exp_ack && q[0].miss) || (exp_fault && rec_fault);
      #1;
      expect_eq("count", count, q.size());
      expect_eq("disp_room", disp_room, exp_room);
      expect_eq("head_ready", head_ready, exp_ready);
      expect_eq("commit_ack", commit_ack, exp_ack);
      expect_eq("commit_fault", commit_fault, exp_fault);
      expect_eq("rec_en", rec_en, exp_rec);
      expect_eq("chk_en", chk_en, exp_chk_en);
      if (exp_chk_en) expect_eq("chk_pc", chk_pc, q[first_unchecked].pc);
      if (exp_rec) begin
        expect_eq("rec_pc", rec_pc, q[0].pc);
        expect_eq("rec_sig", rec_sig, q[0].sig);
      end
      if (exp_ready) expect_eq("head_miss", head_miss, q[0].miss);
      for (int j = 0; j < W; j++) expect_eq("disp_tag", disp_tag[j], PW'(m_tail + PW'(j)));
      // ---- model: clock edge ----
      if (exp_ack) n_ack++;
      if (exp_fault) n_fault++;
      last_fault = exp_fault;
      if (exp_rec) begin n_rec++; cmap[q[0].pc] = q[0].sig; end
      if (flush) begin
        n_flush++;
        q.delete();
        m_tail = '0;
        resp_pending = 0;
        continue;
      end
      // lookup answer of this cycle
      if (resp_pending && !squash_valid) begin
        foreach (q[i]) if (q[i].tag == resp_tag) begin
          q[i].chk   = 1;
          q[i].miss  = !resp_hit;
          q[i].retry = resp_hit && (resp_sig != q[i].sig);
        end
      end else if (resp_pending && squash_valid) begin
        foreach (q[i]) if (q[i].tag == resp_tag) q[i].issued = 0;
      end
      // next lookup answer, produced by the testbench cache
      resp_pending = exp_chk_en;
      if (exp_chk_en) begin
        q[first_unchecked].issued = 1;
        resp_tag = q[first_unchecked].tag;
        resp_hit = cmap.exists(q[first_unchecked].pc);
        resp_sig = resp_hit ? cmap[q[first_unchecked].pc] : '0;
        if (resp_hit) n_hit++;
        if (resp_hit && $urandom_range(99) < 3) resp_sig[$urandom_range(63)] ^= 1'b1;
      end
      if (exp_ack) void'(q.pop_front());
      if (squash_valid) begin
        n_squash++;
        // drop entries at or after squash_tail
        begin
          automatic m_entry_t kept [$];
          logic [PW-1:0] h;
          h = (q.size() > 0) ? q[0].tag : squash_tail;
          foreach (q[i]) if (PW'(q[i].tag - h) < PW'(squash_tail - h)) kept.push_back(q[i]);
          q = kept;
        end
        m_tail = squash_tail;
      end else if (exp_room) begin
        for (int j = 0; j < W; j++) if (disp_valid[j]) begin
          q.push_back('{tag: m_tail, pc: disp_trace[j].start_pc, sig: disp_trace[j].sig,
                        issued: 0, chk: 0, miss: 0, retry: 0});
          m_tail++;
        end
      end
    end
    checks++;
    if (n_ack == 0 || n_fault == 0 || n_rec == 0 || n_squash == 0 || n_flush == 0 || n_full == 0 || n_hit == 0) begin
      failures++; $display("an ITR ROB case never happened");
    end
    $display("commits %0d faults %0d records %0d squashes %0d flushes %0d full %0d hits %0d",
             n_ack, n_fault, n_rec, n_squash, n_flush, n_full, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
