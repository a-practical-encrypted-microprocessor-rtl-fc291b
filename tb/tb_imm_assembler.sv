// tb_imm_assembler: self-checking test of the prefix/immediate reassembly. Random
// 64-bit encrypted constants are split into prefix;prefix;instruction sequences as an
// assembler would emit them and must come back whole; sequences with one prefix,
// three prefixes, an interrupting clear and idle cycles between the parts are checked.
module tb_imm_assembler;
  import kpu_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0;
  logic [31:0] insn = 0;
  logic is_prefix, complete;
  logic [63:0] imm_enc;
  int checks = 0, failures = 0;

  imm_assembler dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [31:0] prefix(input logic [23:0] f);
    return {OP_PREFIX, 2'b00, f};
  endfunction

  task automatic present(input logic [31:0] w, input int gap);
    @(negedge clk);
    valid = 1; insn = w;
    @(posedge clk);
    #1 valid = 0;
    repeat (gap) @(posedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] e;
    logic [31:0] addi;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      e = {$urandom, $urandom};
      addi = {OP_ADDI, 5'd31, 5'd2, e[15:0]};
      present(prefix(e[63:40]), n % 3);
      present(prefix(e[39:16]), n % 2);
      @(negedge clk);
      valid = 1; insn = addi;
      #1;
      chk("is_prefix", 64'(is_prefix), 0);
      chk("complete", 64'(complete), 1);
      chk("immediate", imm_enc, e);
      @(posedge clk);
      #1 valid = 0;
    end
    // a single prefix: incomplete, missing fragment reads as zero
    e = {$urandom, $urandom};
    present(prefix(e[39:16]), 0);
    @(negedge clk); valid = 1; insn = {OP_ADDI, 10'h0, e[15:0]}; #1;
    chk("one prefix incomplete", 64'(complete), 0);
    chk("one prefix value", imm_enc, {24'h0, e[39:0]});
    @(posedge clk); #1 valid = 0;
    // three prefixes: the last two count
    present(prefix(24'h123456), 0);
    present(prefix(e[63:40]), 0);
    present(prefix(e[39:16]), 0);
    @(negedge clk); valid = 1; insn = {OP_ADDI, 10'h0, e[15:0]}; #1;
    chk("three prefixes", imm_enc, e);
    @(posedge clk); #1 valid = 0;
    // clear between prefixes and the instruction
    present(prefix(e[63:40]), 0);
    present(prefix(e[39:16]), 0);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0; valid = 1; insn = {OP_ADDI, 10'h0, e[15:0]}; #1;
    chk("clear", 64'(complete), 0);
    chk("prefix flag", 64'(dut.is_prefix), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
