// kpu_pkg: types and constants shared by the encrypted OpenRISC-subset processor.
//
// Data words are 32 bits under the encryption but occupy a 64-bit block in registers,
// on buses and in memory (Rijndael with a 64-bit block). A general purpose register
// therefore has two 64-bit halves: the "real" half that supervisor mode sees and the
// "shadow" half that user mode sees. The encodings below implement the five data
// types of the security argument:
//   M  32-bit plaintext of encrypted user data      : upper 32 bits zero
//   S  encrypted user data                          : any 64-bit ciphertext
//   a  32-bit supervisor data in the clear           : upper 32 bits zero
//   N  supervisor data marked as "decrypted"         : 0x7fff in the top 16 bits
//   *  placeholder for a pending encryption/decryption: the N form of zero
// The 0x7fff marking of N and the "* looks like a decrypted zero" rule follow the
// design description; the zero-extension of M and a is this design's own choice.
package kpu_pkg;

  localparam int unsigned XLEN = 32;  // data width under the encryption
  localparam int unsigned BLK  = 64;  // encryption block width (register/memory word)

  localparam logic [15:0]     N_MARK = 16'h7fff;
  localparam logic [BLK-1:0]  STAR   = {N_MARK, 48'h0};

  // OpenRISC 1000 major opcodes used by this design (bits 31:26)
  typedef enum logic [5:0] {
    OP_J      = 6'h00,
    OP_BNF    = 6'h03,
    OP_BF     = 6'h04,
    OP_NOP    = 6'h05,
    OP_PREFIX = 6'h1c,  // new prefix instruction, placed on the first custom opcode
    OP_LWZ    = 6'h21,
    OP_LWS    = 6'h22,
    OP_ADDI   = 6'h27,
    OP_ANDI   = 6'h29,
    OP_ORI    = 6'h2a,
    OP_XORI   = 6'h2b,
    OP_SHIFTI = 6'h2e,
    OP_SFI    = 6'h2f,
    OP_SW     = 6'h35,
    OP_ALU    = 6'h38,
    OP_SF     = 6'h39
  } opcode_e;

  // ALU operations (internal encoding)
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_PASSB
  } alu_op_e;

  // set-flag comparisons: OpenRISC l.sfxx sub-opcode in bits 25:21
  typedef enum logic [4:0] {
    SF_EQ  = 5'h00, SF_NE  = 5'h01,
    SF_GTU = 5'h02, SF_GEU = 5'h03, SF_LTU = 5'h04, SF_LEU = 5'h05,
    SF_GTS = 5'h0a, SF_GES = 5'h0b, SF_LTS = 5'h0c, SF_LES = 5'h0d
  } sf_op_e;

  // One general purpose register: both halves.
  typedef struct packed {
    logic [BLK-1:0] real_h;    // half seen by supervisor mode
    logic [BLK-1:0] shadow_h;  // half seen by user mode
  } gpr_t;

  // event counters brought out of the core
  typedef struct packed {
    logic [31:0] cycles;          // cycles while running
    logic [31:0] retired;         // instructions completed, prefixes included
    logic [31:0] prefixes;        // prefix instructions
    logic [31:0] imm_decrypts;    // codec, configuration B: encrypted immediate decrypted
    logic [31:0] load_decrypts;   // codec, configuration A: loaded word decrypted
    logic [31:0] store_encrypts;  // codec, configuration A: stored word encrypted
    logic [31:0] icache_imm_hits; // immediates taken already decrypted from the user icache
    logic [31:0] icache_patches;  // prefix sequences replaced in the user icache
    logic [31:0] tlb_hits;        // user data addresses found in the remapping TLB
    logic [31:0] tlb_misses;      // user data addresses not found in the TLB
    logic [31:0] tlb_refills;     // misses resolved from the mapping database
    logic [31:0] dcache_hits;     // user loads served decrypted from the user data cache
    logic [31:0] range_errors;    // user instructions refused for operand type
    logic [31:0] branches_taken;
    logic [31:0] bpb_hits;        // conditional branches found in the prediction buffer
    logic [31:0] bpb_misses;      // ... not found (predicted not taken)
    logic [31:0] bpb_right;       // predictions that matched the outcome
    logic [31:0] bpb_wrong;
  } kpu_stats_t;

  function automatic logic is_n(input logic [BLK-1:0] v);
    return v[BLK-1 -: 16] == N_MARK;
  endfunction

  function automatic logic [BLK-1:0] mk_n(input logic [XLEN-1:0] v);
    return {N_MARK, 16'h0, v};
  endfunction

endpackage
