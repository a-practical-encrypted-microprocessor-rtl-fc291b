// shadow_regfile: 32 general purpose registers, each with a "real" and a "shadow" half.
//
// Supervisor-mode instructions see the real halves; user-mode instructions see the
// shadow halves, where user arithmetic runs on decrypted (type M) values that
// supervisor code can never read. The aliasing is resolved per access from the mode
// of the instruction making it (rd_user / wr_user), so a pipeline holding instructions
// of both modes never hands one the other's view. Every read port returns both halves
// in the accessing mode's view (primary = the half that mode sees, secondary = the
// other), and the write port writes both, so a register-to-register copy moves the
// real and the shadow value together, as the context-switch protocol requires.
//
// r0 reads as zero with the placeholder in its other half and ignores writes (the
// usual OpenRISC convention). Reset gives every register the clear pair 0 / N(0)
// (type a / N), so the type invariants hold from start-up. Reads are combinational,
// the write is clocked.
module shadow_regfile
  import kpu_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_user,
  input  logic [$clog2(NREGS)-1:0] ra_addr,
  output logic [BLK-1:0]           ra_pri,
  output logic [BLK-1:0]           ra_sec,
  input  logic [$clog2(NREGS)-1:0] rb_addr,
  output logic [BLK-1:0]           rb_pri,
  output logic [BLK-1:0]           rb_sec,
  input  logic                     we,
  input  logic                     wr_user,
  input  logic [$clog2(NREGS)-1:0] wr_addr,
  input  logic [BLK-1:0]           wr_pri,
  input  logic [BLK-1:0]           wr_sec
);
  gpr_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '{real_h: '0, shadow_h: STAR};
    end else if (we && wr_addr != '0) begin
      if (wr_user) regs[wr_addr] <= '{real_h: wr_sec, shadow_h: wr_pri};
      else         regs[wr_addr] <= '{real_h: wr_pri, shadow_h: wr_sec};
    end
  end

  always_comb begin
    if (ra_addr == '0) begin
      ra_pri = '0; ra_sec = STAR;
    end else begin
      ra_pri = rd_user ? regs[ra_addr].shadow_h : regs[ra_addr].real_h;
      ra_sec = rd_user ? regs[ra_addr].real_h   : regs[ra_addr].shadow_h;
    end
    if (rb_addr == '0) begin
      rb_pri = '0; rb_sec = STAR;
    end else begin
      rb_pri = rd_user ? regs[rb_addr].shadow_h : regs[rb_addr].real_h;
      rb_sec = rd_user ? regs[rb_addr].real_h   : regs[rb_addr].shadow_h;
    end
  end

endmodule
