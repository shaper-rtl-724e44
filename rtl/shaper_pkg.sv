// shaper_pkg: sizes, instruction encoding and shared types of the SHAPER
// accelerator, a hybrid secret-sharing / additive-homomorphic (Paillier)
// co-processor for two-party privacy-preserving machine learning.
//
// Sizes that come from the design description: 3072-bit Paillier key
// (|n| = 3072, so n, p^2 and q^2 all fit in 3072 bits), radix k = 72 for the
// modular multiplier, 128-bit adder chunks, 14 MM engines, 32 integer
// engines of 64 bits, fixed-base window w = 4.  The instruction encoding,
// the VLIW bundle layout and the field widths are this implementation's own.
package shaper_pkg;

  // Instruction opcodes (the instruction set of the accelerator).
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_AHE_INIT = 4'd1,   // len, dm_ptr       : load key registers + table
    OP_AHE_ENC  = 4'd2,   // i_pt, i_pk, o_ct  : Paillier (DJN + CRT) encryption
    OP_AHE_DEC  = 4'd3,   // not executed by this implementation
    OP_AHE_CCADD= 4'd4,   // not executed by this implementation
    OP_AHE_PCADD= 4'd5,   // not executed by this implementation
    OP_AHE_PCMUL= 4'd6,   // not executed by this implementation
    OP_SS_GEN   = 4'd7,   // len, o_ptr        : fresh random shares
    OP_INT_ADD  = 4'd8,   // len, a, b, o      : 64-bit lane-wise add
    OP_INT_MUL  = 4'd9,   // len, a, b, o      : 64-bit lane-wise multiply
    OP_DM_LD    = 4'd10,  // len, dm, host     : host -> device memory (external DMA)
    OP_DM_ST    = 4'd11,  // len, dm, host     : device memory -> host (external DMA)
    OP_SPM_LD   = 4'd12,  // len, spm, dm      : device memory -> SPM
    OP_SPM_ST   = 4'd13   // len, spm, dm      : SPM -> device memory
  } opcode_e;

  localparam int unsigned ADDR_W = 32;   // pointer field width
  localparam int unsigned LEN_W  = 16;   // length field width

  // One RISC-style instruction: opcode, length and up to three pointers.
  typedef struct packed {
    opcode_e           op;
    logic [LEN_W-1:0]  len;
    logic [ADDR_W-1:0] p0;   // first source / dm_ptr
    logic [ADDR_W-1:0] p1;   // second source / host_ptr
    logic [ADDR_W-1:0] p2;   // destination
  } instr_t;

  // Function-unit classes a slot can be dispatched to.
  typedef enum logic [1:0] {
    FU_NONE = 2'd0,
    FU_AHE  = 2'd1,
    FU_SS   = 2'd2,
    FU_MEM  = 2'd3
  } fu_e;

  function automatic fu_e fu_of(opcode_e op);
    case (op)
      OP_AHE_ENC, OP_AHE_DEC, OP_AHE_CCADD, OP_AHE_PCADD, OP_AHE_PCMUL: return FU_AHE;
      OP_SS_GEN, OP_INT_ADD, OP_INT_MUL:                                return FU_SS;
      OP_AHE_INIT, OP_DM_LD, OP_DM_ST, OP_SPM_LD, OP_SPM_ST:           return FU_MEM;
      default:                                                          return FU_NONE;
    endcase
  endfunction

  // Ceiling of log2 for parameter arithmetic.
  function automatic int unsigned clog2i(int unsigned v);
    int unsigned r;
    r = 0;
    while ((32'd1 << r) < v) r++;
    return r;
  endfunction

  // Number of key-register lines at the start of an AHE.init stream:
  // p^2, q^2, n mod p^2, n mod q^2, p^-2 mod q^2 (in this order).
  localparam int unsigned KEY_LINES = 5;

endpackage
