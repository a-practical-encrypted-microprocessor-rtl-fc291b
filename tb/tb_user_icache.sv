// tb_user_icache: self-checking test of the user-mode instruction cache. Random fills
// and lookups are checked against a reference of which line owns each index; directed
// cases check that a prefix;prefix;instruction sequence inside one line is patched
// (prefixes read back as no-ops, the instruction carries its plaintext immediate), that
// a sequence spanning two lines or with missing prefixes is not, and that flush empties
// the cache.
module tb_user_icache;
  import kpu_pkg::*;
  localparam int LINES = 16, WPL = 4;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [31:0] pc = 0, insn, imm, wr_pc = 0, wr_insn = 0, patch_pc = 0, patch_imm = 0;
  logic hit, dec, wr_en = 0, patch_en = 0, patch_ok;
  int checks = 0, failures = 0;

  user_icache dut (.*);
  always #5 clk = ~clk;

  localparam logic [31:0] NOPI = {OP_NOP, 26'h0};
  function automatic logic [31:0] pfx(input logic [23:0] f); return {OP_PREFIX, 2'b0, f}; endfunction

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic fill(input logic [31:0] a, input logic [31:0] w);
    @(negedge clk); wr_en = 1; wr_pc = a; wr_insn = w;
    @(posedge clk); #1 wr_en = 0;
  endtask

  task automatic look(input logic [31:0] a, output logic h, output logic [31:0] w, output logic d, output logic [31:0] i);
    pc = a; #1; h = hit; w = insn; d = dec; i = imm;
  endtask

  task automatic patch(input logic [31:0] a, input logic [31:0] v, output logic ok);
    @(negedge clk); patch_en = 1; patch_pc = a; patch_imm = v; #1; ok = patch_ok;
    @(posedge clk); #1 patch_en = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h, d, ok;
    logic [31:0] w, i;
    logic [31:0] owner [LINES];     // base address of the line resident at each index
    logic [31:0] model [logic [31:0]];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < LINES; l++) owner[l] = 32'hffff_ffff;
    // random fills and lookups
    for (int n = 0; n < 600; n++) begin
      logic [31:0] a;
      a = {22'h0, 8'($urandom % 128), 2'b00};
      if ($urandom % 2) begin
        w = $urandom & 32'h03ff_ffff;   // opcode 0: never a prefix
        fill(a, w);
        if (owner[a[7:4]] != {a[31:4], 4'h0}) begin
          foreach (model[k]) if (k[7:4] == a[7:4]) model.delete(k);
          owner[a[7:4]] = {a[31:4], 4'h0};
        end
        model[a] = w;
      end else begin
        look(a, h, w, d, i);
        chk("hit", 64'(h), 64'(model.exists(a)));
        if (model.exists(a)) chk("word", 64'(w), 64'(model[a]));
      end
    end
    // patch inside one line: words 0,1,2 of line 0x200
    fill(32'h200, pfx(24'haaaaaa));
    fill(32'h204, pfx(24'hbbbbbb));
    fill(32'h208, {OP_ADDI, 10'h0, 16'hcccc});
    patch(32'h208, 32'h0000_0008, ok);
    chk("patch ok", 64'(ok), 1);
    look(32'h200, h, w, d, i); chk("prefix 1 is nop", 64'(w), 64'(NOPI));
    look(32'h204, h, w, d, i); chk("prefix 2 is nop", 64'(w), 64'(NOPI));
    look(32'h208, h, w, d, i);
    chk("decoded flag", 64'(d), 1);
    chk("plain immediate", 64'(i), 8);
    chk("opcode kept", 64'(w[31:26]), 64'(OP_ADDI));
    // sequence spanning two lines: prefixes at 0x30c, 0x310, instruction at 0x314
    fill(32'h30c, pfx(24'h1));
    fill(32'h310, pfx(24'h2));
    fill(32'h314, {OP_ADDI, 10'h0, 16'h3});
    patch(32'h314, 32'h5, ok);
    chk("spanning not patched", 64'(ok), 0);
    look(32'h310, h, w, d, i); chk("prefix kept", 64'(w), 64'(pfx(24'h2)));
    look(32'h314, h, w, d, i); chk("no decoded flag", 64'(d), 0);
    // missing prefix in the line
    fill(32'h408, {OP_ADDI, 10'h0, 16'h3});
    fill(32'h404, pfx(24'h2));
    patch(32'h408, 32'h5, ok);
    chk("missing prefix not patched", 64'(ok), 0);
    // flush
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    look(32'h208, h, w, d, i); chk("flushed", 64'(h), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
