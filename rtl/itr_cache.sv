// itr_cache: ITR cache, a set-associative store of trace signatures indexed
// and tagged by the trace start PC.
//
// Two ports, as in the design's 1-read + 1-write organisation:
//  * check (read) port: rd_en / rd_pc in one cycle; rd_valid, rd_hit and
//    rd_sig (the recorded signature) follow one cycle later.
//  * record (write) port: wr_en / wr_pc / wr_sig write in one cycle. If the
//    start PC is already present its signature is overwritten in place,
//    otherwise an invalid way is filled, otherwise the least recently used way
//    is evicted. wr_evict pulses (combinationally) when a valid signature is
//    replaced by another trace's.
// A read in the same cycle as a write to the same set returns the old
// contents. Reset invalidates every entry.
//
// Sizes: ENTRIES signatures in WAYS ways. The default, 2048 entries of 64-bit
// signatures in 2 ways (16 KB of signatures), is the design's cache size;
// its coverage results also use 2-way, 1024 entries. The index uses PC bits
// above the 2-bit word offset. LRU replacement, the word-offset indexing and
// the one-cycle read are this design's own choices.
module itr_cache
  import itr_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = 2
) (
  input  logic clk,
  input  logic rst_n,
  // check port
  input  logic rd_en,
  input  pc_t  rd_pc,
  output logic rd_valid,
  output logic rd_hit,
  output sig_t rd_sig,
  // record port
  input  logic wr_en,
  input  pc_t  wr_pc,
  input  sig_t wr_sig,
  output logic wr_evict
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = PC_W - 2 - IDX_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned AGE_W = WAY_W;

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [AGE_W-1:0] age_t;

  logic [WAYS-1:0] valid_q [SETS];
  tag_t            tag_q   [SETS][WAYS];
  age_t            age_q   [SETS][WAYS];  // 0 = most recently used
  sig_t            sig_mem [SETS*WAYS];

  function automatic idx_t pc_idx(pc_t pc);
    return (SETS > 1) ? idx_t'(pc >> 2) : '0;
  endfunction
  function automatic tag_t pc_tag(pc_t pc);
    return tag_t'(pc >> (2 + IDX_W));
  endfunction

  // ---- check port lookup ----
  idx_t rd_idx;
  logic rd_match;
  way_t rd_way;
  always_comb begin
    rd_idx   = pc_idx(rd_pc);
    rd_match = 1'b0;
    rd_way   = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid_q[rd_idx][w] && tag_q[rd_idx][w] == pc_tag(rd_pc)) begin
        rd_match = 1'b1;
        rd_way   = way_t'(w);
      end
    end
  end

  // ---- record port way selection ----
  idx_t wr_idx;
  logic wr_match;
  way_t wr_way;
  always_comb begin
    logic found_free;
    wr_idx     = pc_idx(wr_pc);
    wr_match   = 1'b0;
    found_free = 1'b0;
    wr_way     = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid_q[wr_idx][w] && tag_q[wr_idx][w] == pc_tag(wr_pc)) begin
        wr_match = 1'b1;
        wr_way   = way_t'(w);
      end
    end
    if (!wr_match) begin
      for (int unsigned w = 0; w < WAYS; w++) begin
        if (!found_free && !valid_q[wr_idx][w]) begin
          found_free = 1'b1;
          wr_way     = way_t'(w);
        end
      end
      if (!found_free) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (age_q[wr_idx][w] == age_t'(WAYS - 1)) wr_way = way_t'(w);
        end
      end
    end
    wr_evict = wr_en && !wr_match && !found_free;
  end

  // ---- signature array: one synchronous read, one write ----
  always_ff @(posedge clk) begin
    if (wr_en) sig_mem[int'(wr_idx) * WAYS + int'(wr_way)] <= wr_sig;
    if (rd_en) rd_sig <= sig_mem[int'(rd_idx) * WAYS + int'(rd_way)];
  end

  // ---- tags, valid bits, LRU ages ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_hit   <= 1'b0;
      for (int unsigned s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int unsigned w = 0; w < WAYS; w++) begin
          tag_q[s][w] <= '0;
          age_q[s][w] <= age_t'(w);
        end
      end
    end else begin
      rd_valid <= rd_en;
      rd_hit   <= rd_en && rd_match;
      // A hit on the check port makes its way the most recently used.
      if (rd_en && rd_match && !(wr_en && wr_idx == rd_idx)) begin
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (age_q[rd_idx][w] < age_q[rd_idx][rd_way]) age_q[rd_idx][w] <= age_q[rd_idx][w] + 1'b1;
        end
        age_q[rd_idx][rd_way] <= '0;
      end
      // A record makes the written way the most recently used.
      if (wr_en) begin
        valid_q[wr_idx][wr_way] <= 1'b1;
        tag_q[wr_idx][wr_way]   <= pc_tag(wr_pc);
        for (int unsigned w = 0; w < WAYS; w++) begin
          if (age_q[wr_idx][w] < age_q[wr_idx][wr_way]) age_q[wr_idx][w] <= age_q[wr_idx][w] + 1'b1;
        end
        age_q[wr_idx][wr_way] <= '0;
      end
    end
  end

endmodule
