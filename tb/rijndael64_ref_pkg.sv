// rijndael64_ref_pkg: reference model of the 64-bit-block, 128-bit-key Rijndael used by
// the processor, for testbenches that must produce encrypted programs and data or check
// encrypted results. Written independently of the RTL: the S-box entry is found by
// searching for the multiplicative inverse, the state is a 4x2 byte matrix. Call
// set_key once, then enc/dec.
package rijndael64_ref_pkg;

  logic [63:0] RK [11];

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] sb_calc(input logic [7:0] x);
    logic [7:0] inv, s;
    inv = 0;
    for (int y = 1; y < 256; y++) if (mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  logic [7:0] SBT [256];
  logic [7:0] ISBT [256];

  function automatic logic [7:0] sb(input logic [7:0] x);
    return SBT[x];
  endfunction

  function automatic logic [7:0] isb(input logic [7:0] y);
    return ISBT[y];
  endfunction

  function automatic void set_key(input logic [127:0] k);
    logic [7:0] W [22][4];
    logic [7:0] t [4];
    logic [7:0] rc, t0;
    for (int x = 0; x < 256; x++) begin
      SBT[x] = sb_calc(8'(x));
      ISBT[SBT[x]] = 8'(x);
    end
    rc = 1;
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) W[i][j] = k[127 - 32*i - 8*j -: 8];
    for (int i = 4; i < 22; i++) begin
      for (int j = 0; j < 4; j++) t[j] = W[i-1][j];
      if (i % 4 == 0) begin
        t0 = t[0];
        t[0] = sb(t[1]) ^ rc; t[1] = sb(t[2]); t[2] = sb(t[3]); t[3] = sb(t0);
        rc = mul(rc, 8'h02);
      end
      for (int j = 0; j < 4; j++) W[i][j] = W[i-4][j] ^ t[j];
    end
    for (int r = 0; r <= 10; r++)
      RK[r] = {W[2*r][0], W[2*r][1], W[2*r][2], W[2*r][3], W[2*r+1][0], W[2*r+1][1], W[2*r+1][2], W[2*r+1][3]};
  endfunction

  function automatic logic [7:0] at(input logic [63:0] v, input int r, input int c);
    return v[63 - 8*(4*c + r) -: 8];
  endfunction

  function automatic logic [63:0] enc(input logic [63:0] p);
    logic [63:0] s, t;
    s = p ^ RK[0];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 4; i++) for (int c = 0; c < 2; c++) t[63 - 8*(4*c + i) -: 8] = sb(at(s, i, (c + i) % 2));
      if (r < 10)
        for (int c = 0; c < 2; c++)
          for (int i = 0; i < 4; i++)
            s[63 - 8*(4*c + i) -: 8] = mul(at(t, i, c), 2) ^ mul(at(t, (i+1)%4, c), 3) ^ at(t, (i+2)%4, c) ^ at(t, (i+3)%4, c);
      else s = t;
      s = s ^ RK[r];
    end
    return s;
  endfunction

  function automatic logic [63:0] dec(input logic [63:0] x);
    logic [63:0] s, t;
    s = x;
    for (int r = 10; r >= 1; r--) begin
      s = s ^ RK[r];
      if (r < 10) begin
        for (int c = 0; c < 2; c++)
          for (int i = 0; i < 4; i++)
            t[63 - 8*(4*c + i) -: 8] = mul(at(s, i, c), 8'h0e) ^ mul(at(s, (i+1)%4, c), 8'h0b) ^ mul(at(s, (i+2)%4, c), 8'h0d) ^ mul(at(s, (i+3)%4, c), 8'h09);
        s = t;
      end
      for (int i = 0; i < 4; i++) for (int c = 0; c < 2; c++) t[63 - 8*(4*c + i) -: 8] = isb(at(s, i, (c + i) % 2));
      s = t;
    end
    return s ^ RK[0];
  endfunction

endpackage
