// user_icache: the small user-mode instruction cache that remembers decrypted
// immediates, so that an instruction executed again (in a loop) does not need the codec.
//
// Each cached word holds the instruction, and optionally the decrypted 32-bit value of
// its encrypted immediate. After the codec has decrypted the immediate of an
// instruction at address pc, the pipeline issues a patch for pc: if the two prefixes at
// pc-8 and pc-4 sit in the same cache line as pc and are cached, the cached prefixes
// become no-ops and the instruction is marked as carrying its plaintext immediate. A
// sequence that spans two lines is left unpatched, so that a line replacement can never
// leave half of a patched sequence behind. The cache lies inside the processor package
// and is used only in user mode.
//
// Organisation: direct mapped, LINES lines of WPL 32-bit instruction words, one valid
// bit per word, filled a word at a time on a miss. Lookup is combinational; writes,
// patches and flushes act at the clock edge. Four words per line follows the design's
// four-instruction fetch width; the number of lines and the fill policy are this
// design's own choice.
module user_icache
  import kpu_pkg::*;
#(
  parameter int unsigned LINES = 16,
  parameter int unsigned WPL   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  // lookup
  input  logic [31:0] pc,
  output logic        hit,
  output logic [31:0] insn,
  output logic        dec,        // insn carries its decrypted immediate in imm
  output logic [31:0] imm,
  // fill one word after a miss
  input  logic        wr_en,
  input  logic [31:0] wr_pc,
  input  logic [31:0] wr_insn,
  // replace the immediate of the instruction at patch_pc by its decrypted value
  input  logic        patch_en,
  input  logic [31:0] patch_pc,
  input  logic [31:0] patch_imm,
  output logic        patch_ok    // the patch will be applied at this clock edge
);
  localparam int unsigned OFFW = $clog2(WPL);
  localparam int unsigned IDXW = $clog2(LINES);
  localparam int unsigned TAGW = 30 - OFFW - IDXW;
  localparam logic [31:0] NOP_INSN = {OP_NOP, 26'h0};

  typedef struct packed {
    logic        v;
    logic [31:0] insn;
    logic        dec;
    logic [31:0] imm;
  } word_t;

  word_t             mem [LINES][WPL];
  logic [TAGW-1:0]   tags [LINES];

  function automatic logic [IDXW-1:0] idx_of(input logic [31:0] a);
    return a[2+OFFW +: IDXW];
  endfunction
  function automatic logic [OFFW-1:0] off_of(input logic [31:0] a);
    return a[2 +: OFFW];
  endfunction
  function automatic logic [TAGW-1:0] tag_of(input logic [31:0] a);
    return a[31 -: TAGW];
  endfunction

  always_comb begin
    word_t w;
    w    = mem[idx_of(pc)][off_of(pc)];
    hit  = w.v && tags[idx_of(pc)] == tag_of(pc);
    insn = w.insn;
    dec  = w.dec;
    imm  = w.imm;
  end

  // patch condition: instruction and both prefixes cached in one line
  logic [IDXW-1:0] p_idx;
  logic [OFFW-1:0] p_off;
  always_comb begin
    p_idx    = idx_of(patch_pc);
    p_off    = off_of(patch_pc);
    patch_ok = 1'b0;
    if (patch_en && p_off >= OFFW'(2) && tags[p_idx] == tag_of(patch_pc))
      patch_ok = mem[p_idx][p_off].v && mem[p_idx][p_off - 1].v && mem[p_idx][p_off - 2].v &&
                 mem[p_idx][p_off - 1].insn[31:26] == OP_PREFIX &&
                 mem[p_idx][p_off - 2].insn[31:26] == OP_PREFIX;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LINES; l++) begin
        tags[l] <= '0;
        for (int i = 0; i < WPL; i++) mem[l][i] <= '0;
      end
    end else if (flush) begin
      for (int l = 0; l < LINES; l++)
        for (int i = 0; i < WPL; i++) mem[l][i].v <= 1'b0;
    end else begin
      if (wr_en) begin
        if (tags[idx_of(wr_pc)] != tag_of(wr_pc))
          for (int i = 0; i < WPL; i++) mem[idx_of(wr_pc)][i].v <= 1'b0;
        tags[idx_of(wr_pc)] <= tag_of(wr_pc);
        mem[idx_of(wr_pc)][off_of(wr_pc)] <= '{v: 1'b1, insn: wr_insn, dec: 1'b0, imm: '0};
      end
      if (patch_ok) begin
        mem[p_idx][p_off].dec     <= 1'b1;
        mem[p_idx][p_off].imm     <= patch_imm;
        mem[p_idx][p_off - 1].insn <= NOP_INSN;
        mem[p_idx][p_off - 2].insn <= NOP_INSN;
      end
    end
  end

endmodule
