// tb_itr_sig_gen: self-checking test of the trace signature generator.
// Random decode groups (0..4 valid lanes), random branch density (including
// long branch-free runs that hit the 16-instruction limit), random
// back-pressure and random flushes. A per-instruction reference model builds
// the expected traces; every emitted trace (start PC, signature, order) and
// the number of traces per cycle is compared against it.
module tb_itr_sig_gen;
  import itr_pkg::*;

  localparam int unsigned W = 4;

  logic           clk = 0;
  logic           rst_n;
  logic           flush;
  logic [W-1:0]   in_valid;
  pc_t            in_pc  [W];
  dec_sig_t       in_dec [W];
  logic           out_room;
  logic           in_ready;
  logic [W-1:0]   out_valid;
  trace_t         out_trace [W];

  int checks = 0, failures = 0;
  int n_len_limit = 0, n_branch_end = 0, n_multi = 0, n_flush = 0;

  itr_sig_gen #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  // reference state
  sig_t   r_acc = '0;
  pc_t    r_start = '0;
  int     r_len = 0;
  pc_t    pc = 32'h0040_0000;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    trace_t exp_q [$];
    int     br_pct;
    rst_n = 0; flush = 0; in_valid = '0; out_room = 0;
    for (int i = 0; i < W; i++) begin in_pc[i] = '0; in_dec[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int nv, got;
      @(negedge clk);
      br_pct   = ((cyc / 500) % 2 == 0) ? 20 : 1;
      flush    = ($urandom_range(99) < 2);
      out_room = ($urandom_range(99) < 85);
      nv       = $urandom_range(W);
      in_valid = '0;
      for (int i = 0; i < W; i++) begin
        in_valid[i] = (i < nv);
        in_pc[i]    = pc + 32'(4 * i);
        in_dec[i]   = dec_sig_t'({$urandom, $urandom});
        in_dec[i].flags.is_branch = ($urandom_range(99) < br_pct);
        in_dec[i].flags.is_uncond = ($urandom_range(99) < 1);
      end
      #1;
      // check ready
      checks++;
      if (in_ready !== (out_room && !flush)) begin
        failures++; $display("ready mismatch at cycle %0d", cyc);
      end
      // reference
      exp_q.delete();
      if (flush) n_flush++;
      if (out_room && !flush) begin
        for (int i = 0; i < nv; i++) begin
          if (r_len == 0) r_start = in_pc[i];
          r_acc ^= sig_t'(in_dec[i]);
          r_len++;
          if (in_dec[i].flags.is_branch || in_dec[i].flags.is_uncond || r_len == 16) begin
            if (!(in_dec[i].flags.is_branch || in_dec[i].flags.is_uncond)) n_len_limit++;
            else n_branch_end++;
            exp_q.push_back('{start_pc: r_start, sig: r_acc});
            r_acc = '0; r_len = 0;
          end
        end
        pc += 32'(4 * nv);
      end
      got = 0;
      for (int j = 0; j < W; j++) if (out_valid[j]) got++;
      checks++;
      if (got != exp_q.size()) begin
        failures++; $display("cycle %0d: %0d traces, expected %0d", cyc, got, exp_q.size());
      end
      if (got > 1) n_multi++;
      for (int j = 0; j < exp_q.size() && j < W; j++) begin
        checks++;
        if (!out_valid[j] || out_trace[j] != exp_q[j]) begin
          failures++;
          $display("cycle %0d slot %0d: got pc=%h sig=%h, expected pc=%h sig=%h", cyc, j,
                   out_trace[j].start_pc, out_trace[j].sig, exp_q[j].start_pc, exp_q[j].sig);
        end
      end
      if (flush) begin r_acc = '0; r_len = 0; end
    end
    checks++;
    if (n_len_limit == 0 || n_branch_end == 0 || n_multi == 0 || n_flush == 0) begin
      failures++; $display("a trace-end case never happened");
    end
    $display("traces: branch-ended %0d, 16-limit %0d, multi-trace cycles %0d, flushes %0d",
             n_branch_end, n_len_limit, n_multi, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
