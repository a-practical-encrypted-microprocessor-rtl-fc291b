// branch_pred_buffer: a branch prediction buffer for the conditional branches l.bf
// and l.bnf, keeping a 2-bit saturating counter per recently seen branch.
//
// A lookup by the branch's address reports whether the buffer knows the branch (hit)
// and, if so, its prediction: taken when the counter is 2 or 3. A branch the buffer
// does not know is predicted not taken, the fall-through path. When the branch has
// been resolved, an update moves a known branch's counter one step towards the
// outcome, or enters an unknown branch, replacing whatever shared its entry, with the
// counter set one step from the outcome's side of the middle (2 if taken, 1 if not).
// Hits and misses, and right and wrong predictions among each, are what the processor
// counts.
//
// Organisation: direct mapped, ENTRIES entries indexed by the word address of the
// branch, each tagged with the full word address. Lookup is combinational; updates and
// flushes act at the clock edge. The buffer is named by the design description together
// with its hit/miss and right/wrong statistics; its organisation, the 2-bit counters
// and the not-taken default are this design's own choices.
module branch_pred_buffer #(
  parameter int unsigned ENTRIES = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  // lookup
  input  logic [31:0] lk_pc,
  output logic        hit,
  output logic        pred_taken,   // prediction, not taken on a miss
  // resolution
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);
  localparam int unsigned IDXW = $clog2(ENTRIES);

  typedef struct packed {
    logic        v;
    logic [29:0] tag;
    logic [1:0]  ctr;
  } entry_t;

  entry_t tab [ENTRIES];

  function automatic logic [IDXW-1:0] idx_of(input logic [31:0] a);
    return a[2 +: IDXW];
  endfunction

  always_comb begin
    entry_t e;
    e          = tab[idx_of(lk_pc)];
    hit        = e.v && e.tag == lk_pc[31:2];
    pred_taken = hit && e.ctr[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) tab[i].v <= 1'b0;
    end else if (upd_en) begin
      entry_t e;
      e = tab[idx_of(upd_pc)];
      if (e.v && e.tag == upd_pc[31:2]) begin
        if (upd_taken && e.ctr != 2'd3)       e.ctr = e.ctr + 2'd1;
        else if (!upd_taken && e.ctr != 2'd0) e.ctr = e.ctr - 2'd1;
      end else begin
        e = '{v: 1'b1, tag: upd_pc[31:2], ctr: upd_taken ? 2'd2 : 2'd1};
      end
      tab[idx_of(upd_pc)] <= e;
    end
  end

endmodule
