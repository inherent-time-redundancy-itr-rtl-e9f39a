// itr_pkg: types and constants shared by the ITR (inherent time redundancy)
// checker. The checker protects the fetch and decode stages of a superscalar
// core: the decode signals of every instruction of a trace are XORed into a
// signature, and the signature of a trace is compared with the one recorded
// the last time the same trace (same start PC) was decoded.
//
// The decode-signal bundle follows the 64-bit field list of the design
// (opcode 8, flags 12, shamt 5, rsrc1 5, rsrc2 5, rdst 5, lat 2, imm 16,
// num_rsrc 2, num_rdst 1, mem_size 3). The order of the fields inside the
// 64-bit word and of the 12 flag bits is this design's own choice, as is the
// 32-bit PC (a MIPS-style word-aligned program counter).
package itr_pkg;

  localparam int unsigned PC_W          = 32;  // program counter width
  localparam int unsigned SIG_W         = 64;  // decode bundle = signature width
  localparam int unsigned MAX_TRACE_LEN = 16;  // a trace ends after 16 instructions

  // Decoded control flags (12 bits).
  typedef struct packed {
    logic is_int;
    logic is_fp;
    logic is_signed;      // signed / unsigned arithmetic
    logic is_branch;      // conditional branch
    logic is_uncond;      // unconditional jump
    logic is_ld;
    logic is_st;
    logic mem_left_right; // unaligned left/right memory access
    logic is_rr;          // register-register form
    logic is_disp;        // displacement addressing
    logic is_direct;      // direct jump target
    logic is_trap;
  } dec_flags_t;

  // Decode signals of one instruction (64 bits).
  typedef struct packed {
    logic [7:0]  opcode;
    dec_flags_t  flags;
    logic [4:0]  shamt;
    logic [4:0]  rsrc1;
    logic [4:0]  rsrc2;
    logic [4:0]  rdst;
    logic [1:0]  lat;
    logic [15:0] imm;
    logic [1:0]  num_rsrc;
    logic [0:0]  num_rdst;
    logic [2:0]  mem_size;
  } dec_sig_t;

  typedef logic [PC_W-1:0]  pc_t;
  typedef logic [SIG_W-1:0] sig_t;

  // A completed trace: start PC and XOR signature of its decode signals.
  typedef struct packed {
    pc_t  start_pc;
    sig_t sig;
  } trace_t;

  // One ITR ROB entry: trace plus the chk / miss / retry status bits.
  typedef struct packed {
    pc_t  start_pc;
    sig_t sig;
    logic chk;    // ITR cache has been consulted
    logic miss;   // no signature was found: record it at commit
    logic retry;  // signature mismatched: flush and retry at commit
  } rob_entry_t;

endpackage
