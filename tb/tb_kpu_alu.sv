// tb_kpu_alu: self-checking test of the two-mode ALU. Random operations in user mode
// (32-bit plaintext operands, placeholder in the other half of the result) and in
// supervisor mode (64-bit operands, N-marked copy in the other half) are compared with
// expected values computed here; operands of the wrong type must raise a range error;
// overflow must be reported except for destination r31; all comparisons are checked.
module tb_kpu_alu;
  import kpu_pkg::*;
  logic user, is_cmp, dst_r31;
  alu_op_e op;
  sf_op_e sf;
  logic [63:0] a, b, res_pri, res_sec;
  logic flag, ovf, range_err;
  int checks = 0, failures = 0;

  kpu_alu dut (.*);

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: op=%s user=%0d a=%h b=%h got %h expected %h", what, op.name(), user, a, b, got, exp);
    end
  endtask

  function automatic logic [63:0] ref32(input alu_op_e o, input logic [31:0] p, input logic [31:0] q);
    logic [31:0] r;
    case (o)
      ALU_ADD: r = p + q;
      ALU_SUB: r = p - q;
      ALU_AND: r = p & q;
      ALU_OR:  r = p | q;
      ALU_XOR: r = p ^ q;
      ALU_SLL: r = p << (q % 32);
      ALU_SRL: r = p >> (q % 32);
      ALU_SRA: begin r = p; for (int i = 0; i < q % 32; i++) r = {r[31], r[31:1]}; end
      default: r = q;
    endcase
    return {32'h0, r};
  endfunction

  function automatic logic [63:0] ref64(input alu_op_e o, input logic [63:0] p, input logic [63:0] q);
    case (o)
      ALU_ADD: return p + q;
      ALU_SUB: return p - q;
      ALU_AND: return p & q;
      ALU_OR:  return p | q;
      ALU_XOR: return p ^ q;
      ALU_SLL: return p << (q % 64);
      ALU_SRL: return p >> (q % 64);
      ALU_SRA: begin logic [63:0] r = p; for (int i = 0; i < q % 64; i++) r = {r[63], r[63:1]}; return r; end
      default: return q;
    endcase
  endfunction

  initial begin
    alu_op_e ops [8] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA};
    sf_op_e sfs [10] = '{SF_EQ, SF_NE, SF_GTU, SF_GEU, SF_LTU, SF_LEU, SF_GTS, SF_GES, SF_LTS, SF_LES};
    is_cmp = 0; dst_r31 = 0; sf = SF_EQ;
    // user mode arithmetic
    for (int i = 0; i < 400; i++) begin
      user = 1; op = ops[i % 8];
      a = {32'h0, $urandom}; b = {32'h0, $urandom};
      #1;
      chk("user result", res_pri, ref32(op, a[31:0], b[31:0]));
      chk("user other half", res_sec, STAR);
      chk("user range", 64'(range_err), 0);
      // supervisor mode
      user = 0;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      #1;
      chk("super result", res_pri, ref64(op, a, b));
      chk("super other half", res_sec, {16'h7fff, 16'h0, 32'(ref64(op, a, b))});
      chk("super range", 64'(range_err), 0);
    end
    // type violations in user mode: N-marked, placeholder, encrypted block
    user = 1; op = ALU_ADD;
    a = mk_n(32'd5); b = 64'd3; #1; chk("range N", 64'(range_err), 1);
    a = 64'd5; b = STAR; #1; chk("range *", 64'(range_err), 1);
    a = 64'hdeadbeef_00000001; b = 64'd1; #1; chk("range S", 64'(range_err), 1);
    // overflow
    a = 64'h7fffffff; b = 64'd1; #1; chk("ovf user", 64'(ovf), 1);
    dst_r31 = 1; #1; chk("no ovf r31", 64'(ovf), 0);
    dst_r31 = 0; op = ALU_SUB; a = 64'h80000000; b = 64'd1; #1; chk("ovf sub", 64'(ovf), 1);
    a = 64'd5; b = 64'd1; #1; chk("no ovf", 64'(ovf), 0);
    user = 0; op = ALU_ADD; a = 64'h7fffffff_ffffffff; b = 64'd1; #1; chk("ovf super", 64'(ovf), 1);
    // comparisons
    is_cmp = 1;
    for (int i = 0; i < 300; i++) begin
      logic e;
      sf = sfs[i % 10];
      user = i[0];
      a = user ? {32'h0, $urandom} : {$urandom, $urandom};
      b = (i % 7 == 0) ? a : (user ? {32'h0, $urandom} : {$urandom, $urandom});
      #1;
      if (user)
        case (sf)
          SF_EQ: e = a[31:0] == b[31:0];  SF_NE: e = a[31:0] != b[31:0];
          SF_GTU: e = a[31:0] > b[31:0];  SF_GEU: e = a[31:0] >= b[31:0];
          SF_LTU: e = a[31:0] < b[31:0];  SF_LEU: e = a[31:0] <= b[31:0];
          SF_GTS: e = $signed(a[31:0]) > $signed(b[31:0]);  SF_GES: e = $signed(a[31:0]) >= $signed(b[31:0]);
          SF_LTS: e = $signed(a[31:0]) < $signed(b[31:0]);  default: e = $signed(a[31:0]) <= $signed(b[31:0]);
        endcase
      else
        case (sf)
          SF_EQ: e = a == b;  SF_NE: e = a != b;
          SF_GTU: e = a > b;  SF_GEU: e = a >= b;
          SF_LTU: e = a < b;  SF_LEU: e = a <= b;
          SF_GTS: e = $signed(a) > $signed(b);  SF_GES: e = $signed(a) >= $signed(b);
          SF_LTS: e = $signed(a) < $signed(b);  default: e = $signed(a) <= $signed(b);
        endcase
      chk($sformatf("flag %s", sf.name()), 64'(flag), 64'(e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
