// user_tlb: the user-mode address-remapping TLB. User data addresses arrive as 64-bit
// words scattered over the whole cipher space (here: hashed addresses). The TLB maps
// each one to a slot in a contiguous linear region of memory, handing out slots first
// come, first served, so that addresses used close together in time end up close
// together in memory and the data cache still sees spatial locality.
//
// Organisation: ENTRIES fully associative entries {valid, tag (64 bits), slot}. A
// lookup is combinational (lk_tag -> hit, hit_slot). When a lookup misses and the
// requester asserts alloc in the same cycle, the TLB assigns the next free slot of the
// region (returned at once on alloc_slot), installs the mapping at the round-robin
// victim position, and reports any mapping it displaces on evict_* so that it can be
// written to the in-memory mapping database. fill_* installs a mapping supplied from
// that database (the job of the miss handler). Slots are word indices; the memory
// address is REGION_BASE + slot * word size, formed by the user of the TLB.
//
// The mechanism (remapping to a contiguous region, first come first served, cached
// mapping database, miss handler) follows the design description; the size, the
// fully associative organisation and round-robin replacement are this design's own.
module user_tlb #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned SLOTW   = 16    // width of a slot index in the linear region
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flush,       // forget all mappings and restart the region
  input  logic [63:0]       lk_tag,
  output logic              hit,
  output logic [SLOTW-1:0]  hit_slot,
  input  logic              alloc,       // on a miss: assign a fresh slot to lk_tag
  output logic [SLOTW-1:0]  alloc_slot,
  input  logic              fill_valid,
  input  logic [63:0]       fill_tag,
  input  logic [SLOTW-1:0]  fill_slot,
  output logic              evict_valid,
  output logic [63:0]       evict_tag,
  output logic [SLOTW-1:0]  evict_slot,
  output logic              region_full  // every slot of the region handed out
);
  typedef struct packed {
    logic             v;
    logic [63:0]      tag;
    logic [SLOTW-1:0] slot;
  } entry_t;

  entry_t                         ent [ENTRIES];
  logic [$clog2(ENTRIES)-1:0]     victim;
  logic [SLOTW:0]                 next_slot;
  logic                           do_alloc, do_ins;
  logic [63:0]                    ins_tag;
  logic [SLOTW-1:0]               ins_slot;

  always_comb begin
    hit      = 1'b0;
    hit_slot = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].v && ent[i].tag == lk_tag) begin
        hit      = 1'b1;
        hit_slot = ent[i].slot;
      end
    region_full = next_slot[SLOTW];
    alloc_slot  = next_slot[SLOTW-1:0];
    do_alloc    = alloc && !hit && !region_full;
    do_ins      = do_alloc || fill_valid;
    ins_tag     = do_alloc ? lk_tag : fill_tag;
    ins_slot    = do_alloc ? alloc_slot : fill_slot;
    evict_valid = do_ins && ent[victim].v;
    evict_tag   = ent[victim].tag;
    evict_slot  = ent[victim].slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      victim    <= '0;
      next_slot <= '0;
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].v <= 1'b0;
      victim    <= '0;
      next_slot <= '0;
    end else begin
      if (do_ins) begin
        ent[victim] <= '{v: 1'b1, tag: ins_tag, slot: ins_slot};
        victim      <= victim + 1'b1;
      end
      if (do_alloc) next_slot <= next_slot + 1'b1;
    end
  end

endmodule
