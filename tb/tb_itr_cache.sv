// tb_itr_cache: self-checking test of the ITR signature cache.
// Two instances with the same random stream of check (read) and record
// (write) requests: a small 2-way cache (16 signatures) that evicts often and
// a 4-way one (16 signatures). A reference model keeps each set as a list
// ordered from most to least recently used and predicts hit, signature
// (one cycle after the lookup) and eviction for every request.
module tb_itr_cache;
  import itr_pkg::*;

  logic clk = 0;
  logic rst_n;
  logic rd_en, wr_en;
  pc_t  rd_pc, wr_pc;
  sig_t wr_sig;

  logic rd_valid_a, rd_hit_a, wr_evict_a;
  sig_t rd_sig_a;
  logic rd_valid_b, rd_hit_b, wr_evict_b;
  sig_t rd_sig_b;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_update = 0;

  itr_cache #(.ENTRIES(16), .WAYS(2)) dut_a (
    .clk, .rst_n, .rd_en, .rd_pc, .rd_valid(rd_valid_a), .rd_hit(rd_hit_a), .rd_sig(rd_sig_a),
    .wr_en, .wr_pc, .wr_sig, .wr_evict(wr_evict_a));
  itr_cache #(.ENTRIES(16), .WAYS(4)) dut_b (
    .clk, .rst_n, .rd_en, .rd_pc, .rd_valid(rd_valid_b), .rd_hit(rd_hit_b), .rd_sig(rd_sig_b),
    .wr_en, .wr_pc, .wr_sig, .wr_evict(wr_evict_b));

  always #5 clk = ~clk;

  class ref_cache;
    int sets, ways;
    pc_t  tags [int][$];   // per set, MRU first
    sig_t sigs [int][$];
    function new(int s, int w); sets = s; ways = w; endfunction
    function int set_of(pc_t pc); return int'((pc >> 2) % sets); endfunction
    function int find(int s, pc_t pc);
      if (!tags.exists(s)) return -1;
      foreach (tags[s][i]) if (tags[s][i] == pc) return i;
      return -1;
    endfunction
    function void touch(int s, int i);
      pc_t t; sig_t g;
      t = tags[s][i]; g = sigs[s][i];
      tags[s].delete(i); sigs[s].delete(i);
      tags[s].push_front(t); sigs[s].push_front(g);
    endfunction
    // returns eviction flag
    function bit write(pc_t pc, sig_t sg);
      int s, i;
      s = set_of(pc); i = find(s, pc);
      if (i >= 0) begin sigs[s][i] = sg; touch(s, i); return 0; end
      if (!tags.exists(s)) begin tags[s] = {}; sigs[s] = {}; end
      tags[s].push_front(pc); sigs[s].push_front(sg);
      if (tags[s].size() > ways) begin
        void'(tags[s].pop_back()); void'(sigs[s].pop_back());
        return 1;
      end
      return 0;
    endfunction
  endclass

  ref_cache ra, rb;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rd(string nm, logic v, logic h, sig_t s, bit ev, bit eh, sig_t es);
    checks++;
    if (v !== ev || (ev && (h !== eh || (eh && s !== es)))) begin
      failures++;
      $display("%s read: valid=%0b hit=%0b sig=%h, expected valid=%0b hit=%0b sig=%h",
               nm, v, h, s, ev, eh, es);
    end
  endtask

  initial begin
    bit   pv; bit ph_a, ph_b; sig_t ps_a, ps_b;
    ra = new(8, 2);
    rb = new(4, 4);
    rst_n = 0; rd_en = 0; wr_en = 0; rd_pc = '0; wr_pc = '0; wr_sig = '0;
    pv = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int sa, sb, ia, ib; bit eva, evb;
      @(negedge clk);
      // results of last cycle's lookup
      check_rd("2-way", rd_valid_a, rd_hit_a, rd_sig_a, pv, ph_a, ps_a);
      check_rd("4-way", rd_valid_b, rd_hit_b, rd_sig_b, pv, ph_b, ps_b);
      // new requests: PCs from a pool of 40 traces
      rd_en  = ($urandom_range(99) < 70);
      wr_en  = ($urandom_range(99) < 40);
      rd_pc  = 32'h1000 + 32'(4 * $urandom_range(39));
      wr_pc  = 32'h1000 + 32'(4 * $urandom_range(39));
      wr_sig = {$urandom, $urandom};
      #1;
      // expected lookup results, from the contents before this cycle's write
      pv = rd_en;
      sa = ra.set_of(rd_pc); ia = ra.find(sa, rd_pc);
      sb = rb.set_of(rd_pc); ib = rb.find(sb, rd_pc);
      ph_a = (ia >= 0); ps_a = ph_a ? ra.sigs[sa][ia] : '0;
      ph_b = (ib >= 0); ps_b = ph_b ? rb.sigs[sb][ib] : '0;
      if (rd_en) begin if (ph_a) n_hit++; else n_miss++; end
      // LRU update of a check hit (skipped when a record goes to the same set)
      if (rd_en && ph_a && !(wr_en && ra.set_of(wr_pc) == sa)) ra.touch(sa, ia);
      if (rd_en && ph_b && !(wr_en && rb.set_of(wr_pc) == sb)) rb.touch(sb, ib);
      if (wr_en) begin
        if (ra.find(ra.set_of(wr_pc), wr_pc) >= 0) n_update++;
        eva = ra.write(wr_pc, wr_sig);
        evb = rb.write(wr_pc, wr_sig);
        if (eva) n_evict++;
        checks++;
        if (wr_evict_a !== eva || wr_evict_b !== evb) begin
          failures++;
          $display("cycle %0d: evict %0b/%0b, expected %0b/%0b", cyc, wr_evict_a, wr_evict_b, eva, evb);
        end
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_evict == 0 || n_update == 0) begin
      failures++; $display("a cache case never happened");
    end
    $display("hits %0d misses %0d evictions %0d in-place updates %0d", n_hit, n_miss, n_evict, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
