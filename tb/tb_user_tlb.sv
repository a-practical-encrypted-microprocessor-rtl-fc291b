// tb_user_tlb: self-checking test of the remapping TLB. Random 64-bit tags are looked
// up; misses allocate. The testbench keeps the mapping database that a miss handler
// would keep: every tag must always map to the slot it first received, slots must be
// handed out as 0, 1, 2, ... in order of first use, a displaced mapping must be
// reported on the evict port, and a tag whose mapping was displaced is re-installed
// through the fill port from the database and must then hit with its old slot.
module tb_user_tlb;
  localparam int ENTRIES = 8, SLOTW = 8;
  logic clk = 0, rst_n = 0, flush = 0;
  logic [63:0] lk_tag, fill_tag, evict_tag;
  logic hit, alloc, fill_valid, evict_valid, region_full;
  logic [SLOTW-1:0] hit_slot, alloc_slot, fill_slot, evict_slot;
  int checks = 0, failures = 0, hits = 0, misses = 0, evicts = 0, fills = 0;

  user_tlb #(.ENTRIES(ENTRIES), .SLOTW(SLOTW)) dut (.*);
  always #5 clk = ~clk;

  logic [SLOTW-1:0] db [logic [63:0]];   // mapping database (tag -> slot)
  int               resident [logic [63:0]];

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] tags [24];
    int next = 0;
    alloc = 0; fill_valid = 0; fill_tag = 0; fill_slot = 0; lk_tag = 0;
    for (int i = 0; i < 24; i++) tags[i] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [63:0] t;
      @(negedge clk);
      t = tags[(n < 10) ? n : ($urandom % ((n < 200) ? 10 : 24))];
      lk_tag = t;
      #1;
      if (resident.exists(t)) begin
        chk("hit", 64'(hit), 1);
        chk("hit slot", 64'(hit_slot), 64'(db[t]));
        hits++;
      end else begin
        chk("miss", 64'(hit), 0);
        misses++;
        if (!db.exists(t)) begin
          // first use: hardware assigns the next slot of the region
          chk("fcfs slot", 64'(alloc_slot), 64'(next));
          alloc = 1;
          db[t] = alloc_slot;
          next++;
        end else begin
          // known mapping: the handler installs it from the database
          fill_valid = 1; fill_tag = t; fill_slot = db[t];
          fills++;
        end
        #1;
        if (evict_valid) begin
          evicts++;
          chk("evicted mapping", 64'(evict_slot), 64'(db[evict_tag]));
          chk("evicted was resident", 64'(resident.exists(evict_tag)), 1);
          resident.delete(evict_tag);
        end else chk("no eviction while not full", 64'(resident.num() < ENTRIES), 1);
        resident[t] = 1;
        @(posedge clk);
        #1 alloc = 0; fill_valid = 0;
        lk_tag = t;
        #1;
        chk("hit after install", 64'(hit), 1);
        chk("slot after install", 64'(hit_slot), 64'(db[t]));
      end
    end
    // flush restarts the region
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    lk_tag = tags[0]; #1;
    chk("miss after flush", 64'(hit), 0);
    chk("region restarts", 64'(alloc_slot), 0);
    checks++;
    if (hits == 0 || evicts == 0 || fills == 0) begin
      failures++; $display("FAIL coverage hits=%0d evicts=%0d fills=%0d", hits, evicts, fills);
    end
    $display("hits=%0d misses=%0d evictions=%0d fills=%0d slots=%0d", hits, misses, evicts, fills, next);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
