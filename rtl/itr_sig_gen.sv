// itr_sig_gen: trace signature generator.
//
// Up to WIDTH decoded instructions arrive per cycle, in program order, lane 0
// oldest; valid lanes must be contiguous from lane 0. The unit cuts the
// stream into traces and folds each instruction's 64-bit decode signals into
// a running signature with a bitwise XOR. A trace ends at a branch or jump,
// or after MAX_LEN instructions, whichever comes first; its start PC is the
// PC of its first instruction. Because a decode group can hold several trace
// ends, up to WIDTH traces complete in one cycle; they appear on out_valid /
// out_trace packed from slot 0 (oldest) upwards, combinationally in the cycle
// their last instruction is accepted.
//
// in_ready tells the decode stage whether a group is accepted this cycle: it
// is the ROB's "room for WIDTH traces" signal passed through. flush drops the
// partially built trace (wrong path after a misprediction, or a retry) and
// blocks input in that cycle.
//
// From the design: XOR signature, trace end at branch or 16 instructions,
// start-PC tagging. Own choices: WIDTH (decode width) and the flush rule.
module itr_sig_gen
  import itr_pkg::*;
#(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned MAX_LEN = MAX_TRACE_LEN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush,
  input  logic [WIDTH-1:0]    in_valid,
  input  pc_t                 in_pc  [WIDTH],
  input  dec_sig_t            in_dec [WIDTH],
  input  logic                out_room,   // downstream can take WIDTH traces
  output logic                in_ready,
  output logic [WIDTH-1:0]    out_valid,
  output trace_t              out_trace [WIDTH]
);

  localparam int unsigned LEN_W = $clog2(MAX_LEN + 1);

  sig_t             acc_q,   acc_d;
  pc_t              start_q, start_d;
  logic [LEN_W-1:0] len_q,   len_d;

  assign in_ready = out_room && !flush;

  always_comb begin
    sig_t             acc;
    pc_t              start;
    logic [LEN_W-1:0] len;
    int unsigned      n;
    acc   = acc_q;
    start = start_q;
    len   = len_q;
    n     = 0;
    out_valid = '0;
    for (int unsigned j = 0; j < WIDTH; j++) out_trace[j] = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (in_ready && in_valid[i]) begin
        if (len == '0) start = in_pc[i];
        acc = acc ^ sig_t'(in_dec[i]);
        len = len + 1'b1;
        if (in_dec[i].flags.is_branch || in_dec[i].flags.is_uncond || len == LEN_W'(MAX_LEN)) begin
          out_valid[n]          = 1'b1;
          out_trace[n].start_pc = start;
          out_trace[n].sig      = acc;
          n   = n + 1;
          acc = '0;
          len = '0;
        end
      end
    end
    acc_d   = acc;
    start_d = start;
    len_d   = len;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q   <= '0;
      start_q <= '0;
      len_q   <= '0;
    end else if (flush) begin
      acc_q   <= '0;
      len_q   <= '0;
    end else begin
      acc_q   <= acc_d;
      start_q <= start_d;
      len_q   <= len_d;
    end
  end

endmodule
