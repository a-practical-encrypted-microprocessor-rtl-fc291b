// tb_kpu_top: end-to-end test of the encrypted processor at its default sizes.
//
// The testbench acts as the (modified) assembler and as the host. It encrypts every
// immediate with the reference Rijndael model, splits it over prefix;prefix;instruction,
// loads the program, and runs it in user mode. The user program adds encrypted
// constants, stores a sum (the codec encrypts it), loads it back (the codec decrypts
// it), shifts with an encrypted shift amount, loops with encrypted counters (the user
// instruction cache then supplies decrypted immediates), loads a clear supervisor word
// and trips a range error by using it in user arithmetic, and stores that clear word.
// A supervisor program then runs on the same registers and must see only ciphertexts
// and placeholders, never the plaintext; a second user program checks that supervisor
// data arrives N-marked. A third user program writes an array of 20 encrypted words,
// more than the TLB holds, and sums it back: evicted mappings must come back from the
// mapping database, and most loads find their word decrypted in the user data cache.
// Results are checked in the register file halves and in data memory against values
// computed here. Every mechanism (prefix, codec in configuration A and B, icache patch
// and hit, TLB miss, hit and refill, data cache hit, prediction buffer hit and
// misprediction, range error, taken branch, both modes, Paillier addition) is counted and must occur; the codec's 10-cycle latency is
// checked from the time spent waiting for it.
module tb_kpu_top;
  import kpu_pkg::*;
  import rijndael64_ref_pkg::*;

  localparam int IAW = 18, DAW = 16;
  localparam logic [DAW-1:0] REGION = DAW'(1) << (DAW - 1);

  logic clk = 0, rst_n = 0;
  logic [127:0] codec_key;
  logic [63:0]  hash_key;
  logic start = 0, start_user = 0;
  logic [31:0] start_pc = 0;
  logic busy, halted, user_mode, flag, ovf_flag;
  kpu_stats_t stats;
  logic host_imem_we = 0;
  logic [IAW-1:0] host_imem_addr = 0;
  logic [31:0] host_imem_wdata = 0;
  logic host_dmem_en = 0, host_dmem_we = 0;
  logic [DAW-1:0] host_dmem_addr = 0;
  logic [63:0] host_dmem_wdata = 0, host_dmem_rdata;
  logic [71:0] pa_modulus = 0, pa_in_a = 0, pa_in_b = 0, pa_out_y;
  logic pa_in_valid = 0, pa_out_valid;
  logic [7:0] pa_in_tag = 0, pa_out_tag;

  kpu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, codec_b_cycles = 0, user_runs = 0, super_runs = 0, pa_done = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.u_core.state == dut.u_core.S_CODEC_B) codec_b_cycles <= codec_b_cycles + 1;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic chk_ne(input string what, input logic [63:0] got, input logic [63:0] not_exp);
    checks++;
    if (got === not_exp) begin failures++; $display("FAIL %s: got the forbidden value %h", what, got); end
  endtask

  // ---------------- assembler ----------------
  logic [31:0] prog [$];
  localparam logic [31:0] NOP = {OP_NOP, 26'h0};
  localparam logic [31:0] HALT = {OP_NOP, 10'h0, 16'h1};

  // user plaintext block: 32 bits of padding above the 32-bit value
  function automatic logic [63:0] encrypt(input logic [31:0] x, input logic [31:0] pad);
    return enc({pad, x});
  endfunction

  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic void align();
    // the prefix;prefix;insn sequence must start at word 0 or 1 of a 4-word line
    while (prog.size() % 4 > 1) emit(NOP);
  endfunction
  // instruction with an encrypted immediate; rd field holds the set-flag code for sfxxi.
  // For shift immediates the padding is searched until ciphertext bits 7:6 equal the
  // shift kind, since those bits double as the instruction's function code.
  function automatic void emit_imm(input logic [5:0] op, input logic [4:0] rd, input logic [4:0] ra,
                                   input logic [31:0] x, input int func = -1);
    logic [63:0] e;
    int pad = 0;
    e = encrypt(x, 32'h9e37_0000);
    while (func >= 0 && e[7:6] != 2'(func)) begin
      pad++;
      e = encrypt(x, 32'h9e37_0000 + 32'(pad));
    end
    align();
    emit({OP_PREFIX, 2'b00, e[63:40]});
    emit({OP_PREFIX, 2'b00, e[39:16]});
    emit({op, rd, ra, e[15:0]});
  endfunction
  function automatic void emit_rr(input logic [4:0] rd, input logic [4:0] ra, input logic [4:0] rb, input logic [3:0] f);
    emit({OP_ALU, rd, ra, rb, 7'h0, f});
  endfunction
  function automatic void emit_lw(input logic [4:0] rd, input logic [4:0] ra);
    emit({OP_LWS, rd, ra, 16'h0});
  endfunction
  function automatic void emit_sw(input logic [4:0] ra, input logic [4:0] rb);
    emit({OP_SW, 5'h0, ra, rb, 11'h0});
  endfunction
  function automatic void emit_bf(input int target);
    emit({OP_BF, 26'(target - prog.size())});
  endfunction
  // supervisor immediate: plain 16-bit field
  function automatic void emit_si(input logic [5:0] op, input logic [4:0] rd, input logic [4:0] ra, input logic [15:0] imm);
    emit({op, rd, ra, imm});
  endfunction

  task automatic load_prog(input int base);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      host_imem_we = 1; host_imem_addr = IAW'(base + i); host_imem_wdata = prog[i];
    end
    @(negedge clk) host_imem_we = 0;
  endtask

  task automatic dmem_write(input logic [DAW-1:0] a, input logic [63:0] v);
    @(negedge clk);
    host_dmem_en = 1; host_dmem_we = 1; host_dmem_addr = a; host_dmem_wdata = v;
    @(negedge clk) host_dmem_en = 0; host_dmem_we = 0;
  endtask

  task automatic dmem_read(input logic [DAW-1:0] a, output logic [63:0] v);
    @(negedge clk);
    host_dmem_en = 1; host_dmem_we = 0; host_dmem_addr = a;
    @(negedge clk) host_dmem_en = 0;
    v = host_dmem_rdata;
  endtask

  task automatic run(input logic user, input int pc_word);
    @(negedge clk);
    start = 1; start_user = user; start_pc = 32'(pc_word * 4);
    @(negedge clk) start = 0;
    wait (halted);
    @(negedge clk);
    if (user) user_runs++; else super_runs++;
  endtask

  function automatic logic [63:0] real_of(input int r);
    return dut.u_core.u_rf.regs[r].real_h;
  endfunction
  function automatic logic [63:0] shad_of(input int r);
    return dut.u_core.u_rf.regs[r].shadow_h;
  endfunction

  // ---------------- test ----------------
  localparam logic [31:0] A = 32'd1000, B = 32'd234, ADDR1 = 32'h0000_1000, ADDR2 = 32'h0000_2008,
                          ADDR3 = 32'h0000_3010, CLEAR = 32'h0000_1234;
  localparam int LOOPS = 4;
  localparam logic [31:0] BASE = 32'h0000_8000;
  localparam int NWORDS = 20;                 // more addresses than TLB entries

  initial begin
    logic [63:0] v;
    int loop_label, p2, p3, p4;
    codec_key = {$urandom, $urandom, $urandom, $urandom};
    hash_key  = {$urandom, $urandom};
    set_key(codec_key);

    // ---- user program 1 ----
    emit_imm(OP_ADDI, 1, 0, A);               // r1 = A
    emit_imm(OP_ADDI, 2, 0, B);               // r2 = B
    emit_rr(3, 1, 2, 4'h0);                   // r3 = A + B       (M / *)
    emit_imm(OP_ADDI, 31, 0, ADDR1);          // r31 = ADDR1
    emit_sw(31, 3);                           // [ADDR1] = E(A+B): codec encrypts
    emit_lw(4, 31);                           // r4 = A+B: codec decrypts, TLB hit
    emit_imm(OP_SHIFTI, 7, 4, 32'd2, 0);      // r7 = r4 << 2
    emit_imm(OP_SHIFTI, 8, 4, 32'd3, 1);      // r8 = r4 >> 3
    emit_imm(OP_ADDI, 5, 0, LOOPS);           // r5 = LOOPS
    emit_imm(OP_ADDI, 6, 0, 32'd0);           // r6 = 0 (reset leaves supervisor zero, N-marked)
    align();
    loop_label = prog.size();
    emit_imm(OP_ADDI, 6, 6, 32'd3);           // r6 += 3
    emit_imm(OP_ADDI, 5, 5, 32'hffff_ffff);   // r5 -= 1
    emit_imm(OP_SFI, 5'(SF_NE), 5, 32'd0);    // flag = r5 != 0
    emit_bf(loop_label);
    emit(NOP);                                // delay slot
    emit_imm(OP_ADDI, 31, 0, ADDR2);
    emit_lw(9, 31);                           // r9 = clear word: N / a
    emit_rr(10, 9, 1, 4'h0);                  // range error: r10 unchanged
    emit_imm(OP_ADDI, 31, 0, ADDR3);
    emit_sw(31, 9);                           // stores the clear word as it is
    emit(HALT);

    // ---- supervisor program ----
    while (prog.size() % 64 != 0) emit(NOP);
    p2 = prog.size();
    emit_si(OP_ADDI, 20, 0, 16'h0100);        // r20 = 0x100 (word 0x20)
    emit_sw(20, 4);                           // store what supervisor sees of r4
    emit_si(OP_ADDI, 21, 0, 16'h0108);
    emit_sw(21, 3);                           // ... and of r3
    emit_si(OP_ADDI, 11, 0, 16'd77);          // r11 = 77 (a / N)
    emit_si(OP_ADDI, 12, 11, 16'hfffe);       // r12 = 75
    emit(HALT);

    // ---- user program 2 ----
    while (prog.size() % 64 != 0) emit(NOP);
    p3 = prog.size();
    emit_rr(13, 11, 1, 4'h0);                 // supervisor data in user arithmetic: range error
    emit_rr(14, 1, 2, 4'h2);                  // r14 = A - B
    emit(HALT);

    // ---- user program 3: fill and sum an array larger than the TLB ----
    while (prog.size() % 64 != 0) emit(NOP);
    p4 = prog.size();
    emit_imm(OP_ADDI, 15, 0, BASE);           // r15 = &a[0]
    emit_imm(OP_ADDI, 16, 0, 32'd0);          // r16 = i
    emit_imm(OP_ADDI, 17, 0, NWORDS);         // r17 = n
    align();
    loop_label = prog.size();
    emit_sw(15, 16);                          // a[i] = i (new address: database search, then a new slot)
    emit_imm(OP_ADDI, 15, 15, 32'd4);
    emit_imm(OP_ADDI, 16, 16, 32'd1);
    emit({OP_SF, 5'(SF_NE), 5'd16, 5'd17, 11'h0});
    emit_bf(loop_label);
    emit(NOP);
    emit_imm(OP_ADDI, 15, 0, BASE);
    emit_imm(OP_ADDI, 16, 0, 32'd0);
    emit_imm(OP_ADDI, 23, 0, 32'd0);          // r23 = sum
    align();
    loop_label = prog.size();
    emit_lw(18, 15);                          // evicted mappings come back from the database
    emit_rr(23, 23, 18, 4'h0);
    emit_imm(OP_ADDI, 15, 15, 32'd4);
    emit_imm(OP_ADDI, 16, 16, 32'd1);
    emit({OP_SF, 5'(SF_NE), 5'd16, 5'd17, 11'h0});
    emit_bf(loop_label);
    emit(NOP);
    emit(HALT);

    repeat (3) @(posedge clk);
    rst_n = 1;
    load_prog(0);
    // the second fresh user address gets slot 1 of the region: plant clear supervisor data
    dmem_write(REGION + 1, {32'h0, CLEAR});

    run(1, 0);
    chk("r1 plaintext", shad_of(1), {32'h0, A});
    chk("r1 other half is placeholder", real_of(1), STAR);
    chk("r3 sum", shad_of(3), {32'h0, A + B});
    chk("r4 loaded sum", shad_of(4), {32'h0, A + B});
    dmem_read(REGION + 0, v);
    chk("stored word decrypts to the sum", dec(v), {32'h0, A + B});
    chk_ne("stored word is not plaintext", v, {32'h0, A + B});
    chk("r4 keeps the ciphertext", real_of(4), v);
    chk("r7 shift left", shad_of(7), {32'h0, (A + B) << 2});
    chk("r8 shift right", shad_of(8), {32'h0, (A + B) >> 3});
    chk("r6 loop sum", shad_of(6), {32'h0, 32'(3 * LOOPS)});
    chk("r5 loop counter", shad_of(5), 64'h0);
    chk("r9 N-marked clear word", shad_of(9), mk_n(CLEAR));
    chk("r9 clear word", real_of(9), {32'h0, CLEAR});
    chk("r10 untouched", shad_of(10), STAR);
    dmem_read(REGION + 2, v);
    chk("clear word stored as is", v, {32'h0, CLEAR});

    run(0, p2);
    dmem_read(DAW'(32'h100 >> 3), v);
    chk_ne("supervisor never sees r4 plaintext", v, {32'h0, A + B});
    chk("supervisor sees r4 ciphertext", dec(v), {32'h0, A + B});
    dmem_read(DAW'(32'h108 >> 3), v);
    chk("supervisor sees placeholder for r3", v, STAR);
    chk("supervisor r12", real_of(12), 64'd75);
    chk("supervisor r12 N copy", shad_of(12), mk_n(32'd75));

    run(1, p3);
    chk("r13 untouched", shad_of(13), STAR);
    chk("r14 difference", shad_of(14), {32'h0, A - B});

    run(1, p4);
    chk("array sum", shad_of(23), {32'h0, 32'(NWORDS * (NWORDS - 1) / 2)});
    for (int i = 0; i < NWORDS; i++) begin
      dmem_read(REGION + DAW'(3 + i), v);
      chk("array word encrypted in the next free slot", dec(v), {32'h0, 32'(i)});
    end

    // ---- Paillier addition beside the core ----
    begin
      logic [71:0] n, m, x, y;
      n = 72'({$urandom} | 32'h8000_0001);
      m = n * n;
      for (int i = 0; i < 8; i++) begin
        x = 72'($urandom) % n; y = 72'($urandom) % n;
        @(negedge clk);
        pa_modulus = m; pa_in_valid = 1; pa_in_a = (1 + x * n) % m; pa_in_b = (1 + y * n) % m; pa_in_tag = 8'(i);
        @(negedge clk) pa_in_valid = 0;
        wait (pa_out_valid);
        chk("Paillier E(x)E(y) = E(x+y)", pa_out_y, (1 + ((x + y) % n) * n) % m);
        pa_done++;
      end
    end

    // ---- mechanisms ----
    $display("prefixes=%0d imm_decrypts=%0d load_decrypts=%0d store_encrypts=%0d icache_patches=%0d icache_imm_hits=%0d",
             stats.prefixes, stats.imm_decrypts, stats.load_decrypts, stats.store_encrypts,
             stats.icache_patches, stats.icache_imm_hits);
    $display("tlb_hits=%0d tlb_misses=%0d range_errors=%0d branches_taken=%0d user_runs=%0d super_runs=%0d paillier=%0d",
             stats.tlb_hits, stats.tlb_misses, stats.range_errors, stats.branches_taken, user_runs, super_runs, pa_done);
    $display("tlb_refills=%0d dcache_hits=%0d cycles=%0d retired=%0d", stats.tlb_refills, stats.dcache_hits,
             stats.cycles, stats.retired);
    $display("bpb_hits=%0d bpb_misses=%0d bpb_right=%0d bpb_wrong=%0d", stats.bpb_hits, stats.bpb_misses,
             stats.bpb_right, stats.bpb_wrong);
    checks += 17;
    if (stats.prefixes == 0)        begin failures++; $display("FAIL no prefix"); end
    if (stats.imm_decrypts == 0)    begin failures++; $display("FAIL no immediate decryption"); end
    if (stats.load_decrypts == 0)   begin failures++; $display("FAIL no load decryption"); end
    if (stats.store_encrypts == 0)  begin failures++; $display("FAIL no store encryption"); end
    if (stats.icache_patches == 0)  begin failures++; $display("FAIL no icache patch"); end
    if (stats.icache_imm_hits == 0) begin failures++; $display("FAIL no decrypted-immediate hit"); end
    if (stats.tlb_hits == 0)        begin failures++; $display("FAIL no TLB hit"); end
    if (stats.tlb_misses == 0)      begin failures++; $display("FAIL no TLB miss"); end
    if (stats.tlb_refills == 0)     begin failures++; $display("FAIL no TLB refill from the database"); end
    if (stats.dcache_hits == 0)     begin failures++; $display("FAIL no decrypted load from the data cache"); end
    if (stats.bpb_hits == 0)        begin failures++; $display("FAIL no branch found in the prediction buffer"); end
    if (stats.bpb_wrong == 0)       begin failures++; $display("FAIL no mispredicted branch"); end
    if (stats.range_errors == 0)    begin failures++; $display("FAIL no range error"); end
    if (stats.branches_taken == 0)  begin failures++; $display("FAIL no taken branch"); end
    if (user_runs == 0 || super_runs == 0) begin failures++; $display("FAIL a mode never ran"); end
    if (pa_done == 0)               begin failures++; $display("FAIL no Paillier addition"); end
    if (codec_b_cycles != 10 * int'(stats.imm_decrypts)) begin
      failures++; $display("FAIL codec latency: %0d cycles for %0d decryptions", codec_b_cycles, stats.imm_decrypts);
    end
    // exact counts for this program
    chk("TLB lookups: one per user load/store", 64'(stats.tlb_hits + stats.tlb_misses), 4 + 2 * NWORDS);
    chk("slots handed out: one per distinct address", 64'(stats.tlb_misses - stats.tlb_refills), 3 + NWORDS);
    chk("icache hits: immediates in each later loop pass", 64'(stats.icache_imm_hits),
        3 * (LOOPS - 1) + 2 * 2 * (NWORDS - 1));
    chk("encrypted loads: decrypted by the codec or found decrypted in the cache",
        64'(stats.load_decrypts + stats.dcache_hits), 1 + NWORDS);
    // three loops, each entered cold (buffer flushed at start): first pass missed and
    // mispredicted, exit mispredicted, every other pass predicted taken rightly
    chk("prediction buffer misses", 64'(stats.bpb_misses), 3);
    chk("prediction buffer hits", 64'(stats.bpb_hits), (LOOPS - 1) + 2 * (NWORDS - 1));
    chk("mispredictions", 64'(stats.bpb_wrong), 6);
    chk("range errors", 64'(stats.range_errors), 2);
    chk("taken branches", 64'(stats.branches_taken), (LOOPS - 1) + 2 * (NWORDS - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
