// tb_shadow_regfile: self-checking test of the real/shadow register file. A model of
// the two physical halves is kept here; random writes in both modes are followed by
// reads in both modes, checking that each mode sees its own half as primary, that the
// reset state is 0 / N(0), that r0 stays zero and that a write in one mode places the
// values in the right physical halves.
module tb_shadow_regfile;
  import kpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_user, we, wr_user;
  logic [4:0] ra_addr, rb_addr, wr_addr;
  logic [63:0] ra_pri, ra_sec, rb_pri, rb_sec, wr_pri, wr_sec;
  logic [63:0] m_real [32];
  logic [63:0] m_shad [32];
  int checks = 0, failures = 0;

  shadow_regfile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  task automatic read_check(input logic u, input logic [4:0] x, input logic [4:0] y);
    rd_user = u; ra_addr = x; rb_addr = y;
    #1;
    chk("ra pri", ra_pri, x == 0 ? 64'h0 : (u ? m_shad[x] : m_real[x]));
    chk("ra sec", ra_sec, x == 0 ? STAR  : (u ? m_real[x] : m_shad[x]));
    chk("rb pri", rb_pri, y == 0 ? 64'h0 : (u ? m_shad[y] : m_real[y]));
    chk("rb sec", rb_sec, y == 0 ? STAR  : (u ? m_real[y] : m_shad[y]));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wr_user = 0; wr_addr = 0; wr_pri = 0; wr_sec = 0; rd_user = 0; ra_addr = 0; rb_addr = 0;
    for (int i = 0; i < 32; i++) begin m_real[i] = 0; m_shad[i] = STAR; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 32; i++) read_check(i[0], 5'(i), 5'(31 - i));
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      wr_user = $urandom % 2;
      wr_addr = 5'($urandom);
      wr_pri = {$urandom, $urandom};
      wr_sec = {$urandom, $urandom};
      if (we && wr_addr != 0) begin
        if (wr_user) begin m_shad[wr_addr] = wr_pri; m_real[wr_addr] = wr_sec; end
        else         begin m_real[wr_addr] = wr_pri; m_shad[wr_addr] = wr_sec; end
      end
      @(posedge clk);
      #1 we = 0;
      read_check($urandom % 2, 5'($urandom), wr_addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
