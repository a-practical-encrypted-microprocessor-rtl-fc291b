// kpu_alu: the arithmetic unit of the execute stage, in both processor modes.
//
// In user mode the ALU works on the plaintext ("shadow") halves of the registers, i.e.
// on 32-bit values of type M obtained earlier by the codec: arithmetic between codec
// events is ordinary 32-bit arithmetic, so one decryption at the start and one
// encryption at the end of a series of operations replaces the decrypt-compute-encrypt
// sandwich of an idealised encrypted ALU. Both operands must be of type M; an operand
// carrying the N marking (0x7fff in the top 16 bits) or the placeholder raises a range
// error and the instruction must not write. The result is M in the primary half and
// the placeholder (pending encryption) in the other half.
//
// In supervisor mode the ALU is an ordinary 64-bit ALU on the real halves; the result
// goes to the primary half with its N-marked copy in the other half.
//
// Comparisons produce only the 1-bit flag (32-bit signed/unsigned in user mode, 64-bit
// in supervisor mode). Signed overflow of add/sub is reported unless the destination is
// r31, which the design reserves for address arithmetic. Shifts use the low 5 (user) or
// 6 (supervisor) bits of b. Purely combinational.
module kpu_alu
  import kpu_pkg::*;
(
  input  logic           user,      // 1: user (encrypted) mode
  input  alu_op_e        op,
  input  logic           is_cmp,    // set-flag instruction: only flag is meaningful
  input  sf_op_e         sf,
  input  logic           dst_r31,   // destination is r31: no overflow reported
  input  logic [BLK-1:0] a,         // primary half of operand A
  input  logic [BLK-1:0] b,         // primary half of operand B (or immediate)
  output logic [BLK-1:0] res_pri,   // result, primary half for this mode
  output logic [BLK-1:0] res_sec,   // result, other half
  output logic           flag,
  output logic           ovf,
  output logic           range_err
);
  logic [BLK-1:0] x, y, r;
  logic           lt_s, lt_u, eq;

  always_comb begin
    range_err = user && (is_n(a) || is_n(b) || a[BLK-1:XLEN] != '0 || b[BLK-1:XLEN] != '0);
    // operands at the mode's width
    x = user ? {32'h0, a[XLEN-1:0]} : a;
    y = user ? {32'h0, b[XLEN-1:0]} : b;

    unique case (op)
      ALU_ADD:   r = x + y;
      ALU_SUB:   r = x - y;
      ALU_AND:   r = x & y;
      ALU_OR:    r = x | y;
      ALU_XOR:   r = x ^ y;
      ALU_SLL:   r = user ? {32'h0, x[31:0] << y[4:0]} : x << y[5:0];
      ALU_SRL:   r = user ? {32'h0, x[31:0] >> y[4:0]} : x >> y[5:0];
      ALU_SRA:   r = user ? {32'h0, 32'($signed(x[31:0]) >>> y[4:0])} : 64'($signed(x) >>> y[5:0]);
      default:   r = y;
    endcase

    // signed overflow at the mode's width
    ovf = 1'b0;
    if (!dst_r31 && (op == ALU_ADD || op == ALU_SUB)) begin
      if (user)
        ovf = (op == ALU_ADD) ? (x[31] == y[31] && r[31] != x[31])
                              : (x[31] != y[31] && r[31] != x[31]);
      else
        ovf = (op == ALU_ADD) ? (x[63] == y[63] && r[63] != x[63])
                              : (x[63] != y[63] && r[63] != x[63]);
    end

    if (user) begin
      res_pri = {32'h0, r[XLEN-1:0]};
      res_sec = STAR;
      eq   = x[31:0] == y[31:0];
      lt_u = x[31:0] <  y[31:0];
      lt_s = $signed(x[31:0]) < $signed(y[31:0]);
    end else begin
      res_pri = r;
      res_sec = mk_n(r[XLEN-1:0]);
      eq   = x == y;
      lt_u = x < y;
      lt_s = $signed(x) < $signed(y);
    end

    unique case (sf)
      SF_EQ:   flag = eq;
      SF_NE:   flag = !eq;
      SF_GTU:  flag = !lt_u && !eq;
      SF_GEU:  flag = !lt_u;
      SF_LTU:  flag = lt_u;
      SF_LEU:  flag = lt_u || eq;
      SF_GTS:  flag = !lt_s && !eq;
      SF_GES:  flag = !lt_s;
      SF_LTS:  flag = lt_s;
      SF_LES:  flag = lt_s || eq;
      default: flag = 1'b0;
    endcase
    if (!is_cmp) flag = 1'b0;
  end

endmodule
