// imm_assembler: rebuilds the 64-bit encrypted immediate of a user-mode instruction
// from the prefix instructions that precede it.
//
// A 32-bit instruction cannot hold a 64-bit encrypted constant, so the assembler emits
//   prefix  E[63:40]        (opcode, 2 fill bits, 24-bit fragment in bits 23:0)
//   prefix  E[39:16]
//   insn    ... E[15:0]     (the instruction's own 16-bit immediate field)
// and the decoder reassembles E = {fragment1, fragment2, insn[15:0]} for the codec to
// decrypt. The shift-immediate instruction carries its 16-bit fragment in the same
// field. The field layout is the design's; what happens with fewer than two prefixes
// is this implementation's choice: missing fragments read as zero and `complete` is low.
//
// Interface: present each decoded instruction once, in program order, with valid. For
// the presented instruction, is_prefix, imm_enc and complete are combinational; the
// fragments are updated at the clock edge. Any non-prefix instruction consumes and
// clears the fragments, as does clear (a taken branch or a mode change).
module imm_assembler
  import kpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        valid,
  input  logic [31:0] insn,
  output logic        is_prefix,
  output logic [63:0] imm_enc,
  output logic        complete
);
  logic [47:0] frag;
  logic [1:0]  nfrag;

  always_comb begin
    is_prefix = insn[31:26] == OP_PREFIX;
    imm_enc   = {frag, insn[15:0]};
    complete  = nfrag == 2'd2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frag  <= '0;
      nfrag <= '0;
    end else if (clear) begin
      frag  <= '0;
      nfrag <= '0;
    end else if (valid) begin
      if (is_prefix) begin
        frag  <= {frag[23:0], insn[23:0]};
        nfrag <= (nfrag == 2'd2) ? 2'd2 : nfrag + 2'd1;
      end else begin
        frag  <= '0;
        nfrag <= '0;
      end
    end
  end

endmodule
