// tb_rijndael64_codec: self-checking test of the pipelined 64-bit Rijndael codec.
// A reference model written independently here (S-box built by brute-force search for
// inverses, state held as a 4x2 byte matrix) encrypts random blocks; the codec's
// outputs are compared with it, decryptions must return the original plaintext, known
// AES S-box entries are checked through a one-round probe, one block must enter and
// leave per cycle, and the latency must be exactly 10 cycles.
module tb_rijndael64_codec;
  localparam int NR = 10;
  logic clk = 0, rst_n = 0;
  logic [127:0] key;
  logic in_valid, in_dec;
  logic [63:0] in_data;
  logic [7:0] in_tag;
  logic out_valid;
  logic [63:0] out_data;
  logic [7:0] out_tag;
  int checks = 0, failures = 0, cycle = 0;

  rijndael64_codec #(.TAGW(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- reference model ----------------
  logic [7:0] SB [256];
  logic [7:0] ISB [256];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv, b, s;
      inv = 0;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      b = inv;
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] = s[i] ^ b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
      SB[x] = s;
    end
    for (int x = 0; x < 256; x++) ISB[SB[x]] = 8'(x);
  end

  typedef logic [7:0] st_t [4][2];

  function automatic st_t to_st(input logic [63:0] v);
    st_t s;
    for (int c = 0; c < 2; c++) for (int r = 0; r < 4; r++) s[r][c] = v[63 - 8*(4*c+r) -: 8];
    return s;
  endfunction
  function automatic logic [63:0] from_st(input st_t s);
    logic [63:0] v;
    for (int c = 0; c < 2; c++) for (int r = 0; r < 4; r++) v[63 - 8*(4*c+r) -: 8] = s[r][c];
    return v;
  endfunction

  logic [63:0] RK [NR+1];
  task automatic expand(input logic [127:0] k);
    logic [7:0] W [22][4];
    logic [7:0] t [4];
    logic [7:0] rc;
    rc = 1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) W[i][j] = k[127 - 32*i - 8*j -: 8];
    for (int i = 4; i < 22; i++) begin
      for (int j = 0; j < 4; j++) t[j] = W[i-1][j];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = t[0];
        t[0] = SB[t[1]] ^ rc; t[1] = SB[t[2]]; t[2] = SB[t[3]]; t[3] = SB[t0];
        rc = mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) W[i][j] = W[i-4][j] ^ t[j];
    end
    for (int r = 0; r <= NR; r++)
      RK[r] = {W[2*r][0], W[2*r][1], W[2*r][2], W[2*r][3], W[2*r+1][0], W[2*r+1][1], W[2*r+1][2], W[2*r+1][3]};
  endtask

  function automatic logic [63:0] ref_enc(input logic [63:0] p);
    st_t s, t;
    s = to_st(p ^ RK[0]);
    for (int r = 1; r <= NR; r++) begin
      for (int i = 0; i < 4; i++) for (int c = 0; c < 2; c++) t[i][c] = SB[s[i][(c + i) % 2]];
      if (r < NR)
        for (int c = 0; c < 2; c++)
          for (int i = 0; i < 4; i++)
            s[i][c] = mul(t[i][c], 2) ^ mul(t[(i+1)%4][c], 3) ^ t[(i+2)%4][c] ^ t[(i+3)%4][c];
      else s = t;
      s = to_st(from_st(s) ^ RK[r]);
    end
    return from_st(s);
  endfunction

  function automatic logic [63:0] ref_dec(input logic [63:0] x);
    st_t s, t;
    s = to_st(x);
    for (int r = NR; r >= 1; r--) begin
      s = to_st(from_st(s) ^ RK[r]);
      if (r < NR) begin
        for (int c = 0; c < 2; c++)
          for (int i = 0; i < 4; i++)
            t[i][c] = mul(s[i][c], 8'h0e) ^ mul(s[(i+1)%4][c], 8'h0b) ^ mul(s[(i+2)%4][c], 8'h0d) ^ mul(s[(i+3)%4][c], 8'h09);
        s = t;
      end
      for (int i = 0; i < 4; i++) for (int c = 0; c < 2; c++) t[i][c] = ISB[s[i][(c + i) % 2]];
      s = t;
    end
    return from_st(s) ^ RK[0];
  endfunction

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- stimulus ----------------
  localparam int N = 64;
  logic [63:0] pt [N];
  logic [63:0] ct [N];
  logic [63:0] exp_q [$];
  int          sent_cyc [$];
  int          got = 0, lat_bad = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [63:0] e;
    int c0;
    e = exp_q.pop_front();
    c0 = sent_cyc.pop_front();
    check($sformatf("out tag %0d", out_tag), out_data, e);
    checks++;
    if (cycle - c0 != NR) begin failures++; $display("FAIL latency %0d", cycle - c0); end
    got++;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_dec = 0; in_data = 0; in_tag = 0;
    key = {$urandom, $urandom, $urandom, $urandom};
    #1;
    // known S-box values of AES
    checks += 3;
    if (SB[8'h00] != 8'h63 || SB[8'h53] != 8'hed || ISB[8'h63] != 8'h00) begin
      failures++; $display("FAIL reference S-box");
    end
    if (dut.sbox(8'h00) != 8'h63 || dut.sbox(8'h53) != 8'hed) begin
      failures++; $display("FAIL dut S-box");
    end
    if (dut.inv_sbox(8'hed) != 8'h53) begin
      failures++; $display("FAIL dut inverse S-box");
    end
    expand(key);
    for (int i = 0; i < N; i++) begin
      pt[i] = {$urandom, $urandom};
      ct[i] = ref_enc(pt[i]);
      checks++;
      if (ref_dec(ct[i]) != pt[i]) begin failures++; $display("FAIL reference round trip"); end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // back-to-back mix of encryptions and decryptions, one per cycle
    for (int i = 0; i < 2*N; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_dec   = i[0];
      in_data  = i[0] ? ct[i/2] : pt[i/2];
      in_tag   = 8'(i);
      exp_q.push_back(i[0] ? pt[i/2] : ct[i/2]);
      sent_cyc.push_back(cycle);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (NR + 3) @(posedge clk);
    checks++;
    if (got != 2*N) begin failures++; $display("FAIL throughput: %0d of %0d outputs", got, 2*N); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
