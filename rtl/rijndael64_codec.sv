// rijndael64_codec: the encryption/decryption unit ("codec") that sits inside the
// processor pipeline. One 64-bit block enters per cycle, each entry tagged with its
// direction (encrypt or decrypt), and leaves NR cycles later. Because the rounds are
// pipelined, the codec sustains one encryption or decryption per cycle although each
// one takes NR cycles, which is what makes an in-pipeline codec cheap.
//
// Cipher: Rijndael with a 64-bit block (Nb = 2 columns of 4 bytes) and a 128-bit key
// (Nk = 4), hence Nr = max(Nb, Nk) + 6 = 10 rounds, one round per pipeline stage. The
// 64-bit block and the 10-cycle codec are the design's; the key length and the
// ShiftRows offsets for a 2-column state (rows 0..3 rotated by 0,1,0,1 columns) are this
// implementation's own choice, since standard Rijndael only fixes offsets for Nb >= 4.
// SubBytes is the AES S-box, computed as the affine map of the GF(2^8) inverse rather
// than stored as a table. Block bytes are column-major, byte 0 = bits 63:56.
//
// Interface: in_valid/in_dec/in_data/in_tag accepted every cycle (no back-pressure);
// out_valid/out_data/out_tag appear exactly NR cycles later. key is the codec key,
// expected stable while blocks are in flight (loaded at manufacture or by a key agent).
module rijndael64_codec #(
  parameter int unsigned TAGW = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [127:0]     key,
  input  logic             in_valid,
  input  logic             in_dec,     // 0: encrypt, 1: decrypt
  input  logic [63:0]      in_data,
  input  logic [TAGW-1:0]  in_tag,
  output logic             out_valid,
  output logic [63:0]      out_data,
  output logic [TAGW-1:0]  out_tag
);
  localparam int unsigned NR = 10;

  // ---------------- GF(2^8) and byte functions ----------------
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // multiplicative inverse as x^254 (0 maps to 0)
  function automatic logic [7:0] ginv(input logic [7:0] a);
    logic [7:0] r, p;
    r = 8'h01;
    p = a;
    for (int k = 1; k < 8; k++) begin
      p = gmul(p, p);
      r = gmul(r, p);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] b;
    b = ginv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(input logic [7:0] a);
    return ginv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  // ---------------- state transforms (64-bit block, column-major) ----------------
  function automatic logic [7:0] byte_at(input logic [63:0] s, input int unsigned i);
    return s[63 - 8*i -: 8];
  endfunction

  function automatic logic [63:0] sub_bytes(input logic [63:0] s, input logic inv);
    logic [63:0] o;
    for (int i = 0; i < 8; i++)
      o[63 - 8*i -: 8] = inv ? inv_sbox(byte_at(s, i)) : sbox(byte_at(s, i));
    return o;
  endfunction

  // rows 1 and 3 swap their two bytes; a rotation by one of two columns is its own inverse
  function automatic logic [63:0] shift_rows(input logic [63:0] s);
    logic [63:0] o;
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < 4; r++) begin
        int unsigned src_c;
        src_c = (r % 2 == 1) ? (c + 1) % 2 : c;
        o[63 - 8*(4*c + r) -: 8] = byte_at(s, 4*src_c + r);
      end
    return o;
  endfunction

  function automatic logic [63:0] mix_columns(input logic [63:0] s, input logic inv);
    logic [63:0] o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 2; c++) begin
      a0 = byte_at(s, 4*c);
      a1 = byte_at(s, 4*c + 1);
      a2 = byte_at(s, 4*c + 2);
      a3 = byte_at(s, 4*c + 3);
      if (!inv) begin
        o[63 - 8*(4*c)     -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
        o[63 - 8*(4*c + 1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
        o[63 - 8*(4*c + 2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
        o[63 - 8*(4*c + 3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
      end else begin
        o[63 - 8*(4*c)     -: 8] = gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09);
        o[63 - 8*(4*c + 1) -: 8] = gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d);
        o[63 - 8*(4*c + 2) -: 8] = gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b);
        o[63 - 8*(4*c + 3) -: 8] = gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e);
      end
    end
    return o;
  endfunction

  // ---------------- key schedule: Nk = 4, Nb = 2, 22 words ----------------
  logic [31:0] w [2*(NR+1)];
  logic [63:0] rk [NR+1];

  always_comb begin
    logic [31:0] t;
    logic [7:0]  rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 2*(NR+1); i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0]), sbox(t[31:24])} ^ {rcon, 24'h0};
        rcon = xtime(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r <= NR; r++) rk[r] = {w[2*r], w[2*r+1]};
  end

  // ---------------- round pipeline ----------------
  // stage s (1..NR): encryption performs round s; decryption performs the inverse of
  // round NR+1-s. The initial key addition is folded into stage 1.
  logic [63:0]     st_d   [NR+1];
  logic            st_v   [NR+1];
  logic            st_dec [NR+1];
  logic [TAGW-1:0] st_t   [NR+1];

  always_comb begin
    st_v[0]   = in_valid;
    st_dec[0] = in_dec;
    st_t[0]   = in_tag;
    st_d[0]   = in_data ^ (in_dec ? rk[NR] : rk[0]);
  end

  for (genvar s = 1; s <= NR; s++) begin : g_round
    logic [63:0] nxt;
    always_comb begin
      if (!st_dec[s-1]) begin
        nxt = shift_rows(sub_bytes(st_d[s-1], 1'b0));
        if (s < NR) nxt = mix_columns(nxt, 1'b0);
        nxt = nxt ^ rk[s];
      end else begin
        nxt = sub_bytes(shift_rows(st_d[s-1]), 1'b1) ^ rk[NR-s];
        if (s < NR) nxt = mix_columns(nxt, 1'b1);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st_v[s]   <= 1'b0;
        st_dec[s] <= 1'b0;
        st_d[s]   <= '0;
        st_t[s]   <= '0;
      end else begin
        st_v[s]   <= st_v[s-1];
        st_dec[s] <= st_dec[s-1];
        st_d[s]   <= nxt;
        st_t[s]   <= st_t[s-1];
      end
    end
  end

  assign out_valid = st_v[NR];
  assign out_data  = st_d[NR];
  assign out_tag   = st_t[NR];

endmodule
