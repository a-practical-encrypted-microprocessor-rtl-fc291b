// user_dcache: the user-mode data cache, which keeps each cached word both as it is
// in memory (the 64-bit ciphertext) and decrypted (its 32-bit value), so that a user
// load that hits needs no codec use at all.
//
// A user load that misses reads memory, has the word decrypted by the codec, and then
// writes the pair (value, ciphertext) here. A user store that already knows both (an
// M value whose register also holds its ciphertext, or a store the codec has just
// encrypted) writes the pair too. Any other store to a cached word (clear supervisor
// data, a placeholder, or a supervisor store) invalidates it, so that the cache never
// returns a stale plaintext. The cache lies inside the processor package; its
// plaintext never leaves it, and supervisor loads do not use it.
//
// Organisation: direct mapped, LINES lines of one 64-bit memory word each, indexed and
// tagged by the data memory word address (after the TLB remapping). Lookup is
// combinational; writes, invalidations and flushes act at the clock edge, and a write
// wins over an invalidation of the same word. Caching decrypted user data follows the
// design description; the size, the one-word lines and the write-through, no-allocate
// policy for other stores are this design's own choices.
module user_dcache #(
  parameter int unsigned AW    = 16,   // data memory word address width
  parameter int unsigned LINES = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  // lookup
  input  logic [AW-1:0] lk_addr,
  output logic          hit,
  output logic [31:0]   plain,
  output logic [63:0]   cipher,
  // install a decrypted word
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_plain,
  input  logic [63:0]   wr_cipher,
  // forget a word written without its plaintext
  input  logic          inv_en,
  input  logic [AW-1:0] inv_addr
);
  localparam int unsigned IDXW = $clog2(LINES);

  typedef struct packed {
    logic            v;
    logic [AW-1:0]   addr;
    logic [31:0]     plain;
    logic [63:0]     cipher;
  } line_t;

  line_t lines [LINES];

  always_comb begin
    line_t l;
    l      = lines[lk_addr[IDXW-1:0]];
    hit    = l.v && l.addr == lk_addr;
    plain  = l.plain;
    cipher = l.cipher;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINES; i++) lines[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < LINES; i++) lines[i].v <= 1'b0;
    end else begin
      if (inv_en && lines[inv_addr[IDXW-1:0]].addr == inv_addr)
        lines[inv_addr[IDXW-1:0]].v <= 1'b0;
      if (wr_en)
        lines[wr_addr[IDXW-1:0]] <= '{v: 1'b1, addr: wr_addr, plain: wr_plain, cipher: wr_cipher};
    end
  end

endmodule
