// kpu_core: an OpenRISC-subset processor core that computes on encrypted data in user
// mode, built around one in-pipeline Rijndael codec.
//
// Main idea: only the arithmetic is changed. In user mode every data word in registers,
// on buses and in memory is a 64-bit Rijndael ciphertext of a 32-bit value; the codec
// decrypts at the start of a run of arithmetic and encrypts at the end, and in between
// the ALU computes on plaintext kept in shadow registers that supervisor code cannot
// see. Each instruction needs the codec at most once, in one of two configurations:
//   B: decrypt the encrypted immediate (rebuilt from prefix instructions) before the
//      register read / execute stages (addi, andi, ori, xori, sfxxi, shift immediate);
//   A: execute first, then encrypt a register for a store or decrypt a loaded word.
// Supervisor mode runs the same instructions unencrypted on 64-bit real registers and
// never uses the codec. User data addresses are hashed and remapped by the TLB into a
// linear region of data memory (a TLB backed by a mapping database that is searched on
// a miss); a user-mode instruction cache keeps decrypted immediates so repeated
// instructions skip the codec, and a user-mode data cache keeps decrypted words so
// loads that hit skip both memory and the codec.
//
// Execution model (this design's simplification): one instruction is in flight at a
// time, moving through fetch, decode, [codec B], execute, [memory], [codec A] and
// write-back states; the codec itself is fully pipelined (one block per cycle) but is
// only ever given one block at a time here. Overlapping instructions, forwarding,
// speculative execution and the supervisor data cache of the full design are not
// modelled; the branch prediction buffer is kept and scored, but cannot save time.
//
// Instructions: l.add l.sub l.and l.or l.xor, l.addi l.andi l.ori l.xori, l.slli
// l.srli l.srai, l.sfxx and l.sfxxi, l.lwz l.lws l.sw (offset ignored, as in the
// design's modified encoding), l.j l.bf l.bnf (with delay slot), l.nop (l.nop 1 halts),
// and the new prefix instruction (opcode 0x1c). Other opcodes retire as no-ops and are
// counted as range errors.
//
// Interface: start (one cycle, with start_user and start_pc) runs a program until
// l.nop 1, then halted is high until the next start. imem_* is a synchronous-read
// instruction memory of 32-bit words, dmem_* a synchronous-read data memory of 64-bit
// words. Registers keep their contents across starts, so a supervisor program can
// inspect what a user program left behind.
module kpu_core
  import kpu_pkg::*;
#(
  parameter int unsigned IAW         = 18,   // instruction memory word address width
  parameter int unsigned DAW         = 16,   // data memory word address width
  parameter int unsigned TLB_ENTRIES = 16,
  parameter int unsigned IC_LINES    = 16,
  parameter int unsigned DC_LINES    = 16,
  parameter int unsigned BPB_ENTRIES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [127:0]     codec_key,
  input  logic [63:0]      hash_key,
  input  logic             start,
  input  logic             start_user,
  input  logic [31:0]      start_pc,
  output logic             busy,
  output logic             halted,
  output logic             user_mode,
  output logic             flag,
  output logic             ovf_flag,
  output kpu_stats_t       stats,
  // instruction memory
  output logic [IAW-1:0]   imem_addr,
  input  logic [31:0]      imem_rdata,
  // data memory
  output logic             dmem_en,
  output logic             dmem_we,
  output logic [DAW-1:0]   dmem_addr,
  output logic [63:0]      dmem_wdata,
  input  logic [63:0]      dmem_rdata
);
  localparam int unsigned SLOTW = DAW - 1;                  // user region: upper half
  localparam logic [DAW-1:0] REGION_BASE = DAW'(1) << (DAW - 1);

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_FETCH_WAIT, S_DECODE, S_CODEC_B, S_EXEC, S_MEM, S_LOAD_WAIT,
    S_CODEC_A, S_WB, S_HALT, S_WALK_RD, S_WALK_CMP
  } state_e;

  state_e       state;
  logic [31:0]  pc, insn;
  logic         ic_dec;          // insn came from the icache with a plaintext immediate
  logic [31:0]  ic_imm_r;
  logic [31:0]  imm_plain;       // immediate operand, 32-bit value
  logic [63:0]  wb_pri, wb_sec;
  logic         wb_en;
  logic         in_delay;        // executing a delay slot of a taken branch
  logic [31:0]  delay_target;
  logic         codec_is_load;   // configuration A operation in flight is a load
  logic [63:0]  load_word;
  logic [DAW-1:0] mem_addr_r;    // data memory address of the access in progress

  // ---------------- decoded fields ----------------
  opcode_e     opc;
  logic [4:0]  rd, ra, rb;
  logic        is_imm_b;         // uses an encrypted immediate in user mode (config B)
  logic [63:0] sup_imm;          // supervisor immediate
  always_comb begin
    opc = opcode_e'(insn[31:26]);
    rd  = insn[25:21];
    ra  = insn[20:16];
    rb  = insn[15:11];
    is_imm_b = opc inside {OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SFI, OP_SHIFTI};
    unique case (opc)
      OP_ANDI, OP_ORI, OP_XORI: sup_imm = {48'h0, insn[15:0]};
      OP_SHIFTI:                sup_imm = {58'h0, insn[5:0]};
      default:                  sup_imm = {{48{insn[15]}}, insn[15:0]};
    endcase
  end

  // ---------------- register file ----------------
  logic [63:0] ra_pri, ra_sec, rb_pri, rb_sec;
  shadow_regfile u_rf (
    .clk, .rst_n,
    .rd_user (user_mode),
    .ra_addr (ra), .ra_pri, .ra_sec,
    .rb_addr ((opc == OP_SW) ? insn[15:11] : rb), .rb_pri, .rb_sec,
    .we      (wb_en),
    .wr_user (user_mode),
    .wr_addr (rd),
    .wr_pri  (wb_pri),
    .wr_sec  (wb_sec)
  );

  // ---------------- immediate reassembly ----------------
  logic        pf_is_prefix, pf_complete;
  logic [63:0] pf_imm_enc;
  imm_assembler u_imm (
    .clk, .rst_n,
    .clear     (state == S_IDLE),
    .valid     (state == S_DECODE),
    .insn,
    .is_prefix (pf_is_prefix),
    .imm_enc   (pf_imm_enc),
    .complete  (pf_complete)
  );

  // ---------------- codec ----------------
  logic        cd_in_valid, cd_in_dec, cd_out_valid;
  logic [63:0] cd_in_data, cd_out_data;
  logic [7:0]  cd_out_tag;
  rijndael64_codec #(.TAGW(8)) u_codec (
    .clk, .rst_n,
    .key       (codec_key),
    .in_valid  (cd_in_valid),
    .in_dec    (cd_in_dec),
    .in_data   (cd_in_data),
    .in_tag    (8'(state)),
    .out_valid (cd_out_valid),
    .out_data  (cd_out_data),
    .out_tag   (cd_out_tag)
  );

  // ---------------- ALU ----------------
  alu_op_e     alu_op;
  logic [63:0] alu_b, alu_pri, alu_sec;
  logic        alu_flag, alu_ovf, alu_range;
  logic        is_cmp;
  always_comb begin
    is_cmp = opc inside {OP_SF, OP_SFI};
    alu_b  = user_mode ? {32'h0, imm_plain} : sup_imm;
    alu_op = ALU_ADD;
    unique case (opc)
      OP_ADDI: alu_op = ALU_ADD;
      OP_ANDI: alu_op = ALU_AND;
      OP_ORI:  alu_op = ALU_OR;
      OP_XORI: alu_op = ALU_XOR;
      OP_SHIFTI: alu_op = (insn[7:6] == 2'd0) ? ALU_SLL : (insn[7:6] == 2'd1) ? ALU_SRL : ALU_SRA;
      OP_ALU: begin
        alu_b = rb_pri;
        unique case (insn[3:0])
          4'h0: alu_op = ALU_ADD;
          4'h2: alu_op = ALU_SUB;
          4'h3: alu_op = ALU_AND;
          4'h4: alu_op = ALU_OR;
          4'h5: alu_op = ALU_XOR;
          4'h8: alu_op = (insn[7:6] == 2'd0) ? ALU_SLL : (insn[7:6] == 2'd1) ? ALU_SRL : ALU_SRA;
          default: alu_op = ALU_PASSB;
        endcase
      end
      OP_SF: alu_b = rb_pri;
      default: ;
    endcase
  end

  kpu_alu u_alu (
    .user      (user_mode),
    .op        (alu_op),
    .is_cmp,
    .sf        (sf_op_e'(insn[25:21])),
    .dst_r31   (rd == 5'd31),
    .a         (ra_pri),
    .b         (alu_b),
    .res_pri   (alu_pri),
    .res_sec   (alu_sec),
    .flag      (alu_flag),
    .ovf       (alu_ovf),
    .range_err (alu_range)
  );

  // ---------------- user address path: hash, then remap ----------------
  logic [63:0]      haddr;
  logic             tlb_hit, tlb_alloc, tlb_full;
  logic [SLOTW-1:0] tlb_hit_slot, tlb_alloc_slot, ev_slot;
  logic             ev_valid;
  logic [63:0]      ev_tag;
  // mapping database: tag of every slot handed out, searched on a TLB miss
  logic             walked;         // database already searched for this access
  logic [SLOTW-1:0] walk_idx;
  logic             walk_found;
  logic             db_en, db_we;
  logic [SLOTW-1:0] db_addr;
  logic [63:0]      db_rdata, db_b_unused;
  addr_hash u_hash (.key (hash_key), .addr (ra_pri[31:0]), .hash (haddr));
  user_tlb #(.ENTRIES(TLB_ENTRIES), .SLOTW(SLOTW)) u_tlb (
    .clk, .rst_n,
    .flush       (1'b0),
    .lk_tag      (haddr),
    .hit         (tlb_hit),
    .hit_slot    (tlb_hit_slot),
    .alloc       (tlb_alloc),
    .alloc_slot  (tlb_alloc_slot),
    .fill_valid  (walk_found),
    .fill_tag    (haddr),
    .fill_slot   (walk_idx),
    .evict_valid (ev_valid),
    .evict_tag   (ev_tag),
    .evict_slot  (ev_slot),
    .region_full (tlb_full)
  );

  // ---------------- user instruction cache ----------------
  logic        ic_hit, ic_dec_w, ic_patch_ok;
  logic [31:0] ic_insn, ic_imm;
  user_icache #(.LINES(IC_LINES), .WPL(4)) u_ic (
    .clk, .rst_n,
    .flush     (start),
    .pc,
    .hit       (ic_hit),
    .insn      (ic_insn),
    .dec       (ic_dec_w),
    .imm       (ic_imm),
    .wr_en     (state == S_FETCH_WAIT && user_mode),
    .wr_pc     (pc),
    .wr_insn   (imem_rdata),
    .patch_en  (state == S_CODEC_B && cd_out_valid && user_mode),
    .patch_pc  (pc),
    .patch_imm (cd_out_data[31:0]),
    .patch_ok  (ic_patch_ok)
  );

  // ---------------- user data cache (decrypted words) ----------------
  logic           dc_hit, dc_wr, dc_inv;
  logic [31:0]    dc_plain, dc_wr_plain;
  logic [63:0]    dc_cipher, dc_wr_cipher;
  logic [DAW-1:0] dc_wr_addr;
  logic [DAW-1:0] daddr;
  user_dcache #(.AW(DAW), .LINES(DC_LINES)) u_dc (
    .clk, .rst_n,
    .flush     (start),
    .lk_addr   (daddr),
    .hit       (dc_hit),
    .plain     (dc_plain),
    .cipher    (dc_cipher),
    .wr_en     (dc_wr),
    .wr_addr   (dc_wr_addr),
    .wr_plain  (dc_wr_plain),
    .wr_cipher (dc_wr_cipher),
    .inv_en    (dc_inv),
    .inv_addr  (daddr)
  );

  // ---------------- branch prediction buffer ----------------
  // Instructions here do not overlap, so a prediction changes no timing; it is made and
  // scored at decode, and the outcome trains the buffer.
  logic bp_hit, bp_pred, bp_upd, branch_taken;
  branch_pred_buffer #(.ENTRIES(BPB_ENTRIES)) u_bpb (
    .clk, .rst_n,
    .flush      (start),
    .lk_pc      (pc),
    .hit        (bp_hit),
    .pred_taken (bp_pred),
    .upd_en     (bp_upd),
    .upd_pc     (pc),
    .upd_taken  (branch_taken)
  );
  assign bp_upd = state == S_DECODE && !pf_is_prefix && opc inside {OP_BF, OP_BNF};

  // ---------------- control ----------------
  logic        mem_user_bad;    // user address operand is not a plaintext M value
  logic        mem_go;          // the access proceeds this cycle
  logic        need_walk;       // TLB miss not yet looked up in the database
  logic        store_encrypt;   // user store of an M value with no ciphertext yet
  logic [63:0] store_word;
  logic [31:0] next_pc;
  always_comb begin
    mem_user_bad  = user_mode && (ra_pri[63:32] != 32'h0);
    store_encrypt = user_mode && rb_pri[63:32] == 32'h0 && rb_sec == STAR;
    store_word    = user_mode ? rb_sec : rb_pri;
    branch_taken  = (opc == OP_J) || (opc == OP_BF && flag) || (opc == OP_BNF && !flag);
    next_pc       = in_delay ? delay_target : pc + 32'd4;
    mem_go        = state == S_MEM && !mem_user_bad &&
                    (!user_mode || tlb_hit || (walked && !tlb_full));
    need_walk     = state == S_MEM && user_mode && !mem_user_bad && !tlb_hit && !walked;
  end

  assign busy      = !(state inside {S_IDLE, S_HALT});
  assign halted    = state == S_HALT;
  assign imem_addr = pc[IAW+1:2];
  assign tlb_alloc  = state == S_MEM && user_mode && !mem_user_bad && !tlb_hit && walked;
  assign walk_found = state == S_WALK_CMP && db_rdata == haddr;

  // The database holds one 64-bit tag per slot, written when the slot is handed out.
  // A miss reads it from slot 0 upwards (one entry per two cycles) until the tag is
  // found, in which case the mapping is re-installed in the TLB, or the slots run out,
  // in which case a fresh slot is allocated.
  always_comb begin
    db_en   = (state == S_WALK_RD) || (tlb_alloc && !tlb_full);
    db_we   = state == S_MEM;
    db_addr = (state == S_MEM) ? tlb_alloc_slot : walk_idx;
  end
  kpu_ram #(.AW(SLOTW), .DW(64)) u_tlbdb (
    .clk,
    .a_en (db_en), .a_we (db_we), .a_addr (db_addr), .a_wdata (haddr), .a_rdata (db_rdata),
    .b_en (1'b0), .b_we (1'b0), .b_addr ('0), .b_wdata ('0), .b_rdata (db_b_unused)
  );

  always_comb begin
    cd_in_valid = 1'b0;
    cd_in_dec   = 1'b1;
    cd_in_data  = pf_imm_enc;
    if (state == S_DECODE && user_mode && is_imm_b && !ic_dec) cd_in_valid = 1'b1;
    if (mem_go && opc == OP_SW && store_encrypt) begin
      cd_in_valid = 1'b1;
      cd_in_dec   = 1'b0;
      cd_in_data  = {32'h0, rb_pri[31:0]};
    end
    if (state == S_LOAD_WAIT && user_mode && dmem_rdata != STAR && dmem_rdata[63:32] != 32'h0) begin
      cd_in_valid = 1'b1;
      cd_in_data  = dmem_rdata;
    end
  end

  // data memory port
  always_comb begin
    daddr = user_mode ? REGION_BASE + DAW'(tlb_hit ? tlb_hit_slot : tlb_alloc_slot)
                      : ra_pri[DAW+2:3];
    dmem_en    = 1'b0;
    dmem_we    = 1'b0;
    dmem_addr  = daddr;
    dmem_wdata = store_word;
    if (mem_go) begin
      if (opc inside {OP_LWZ, OP_LWS}) dmem_en = !(user_mode && dc_hit);
      else if (opc == OP_SW && !store_encrypt) begin
        dmem_en = 1'b1;
        dmem_we = 1'b1;
      end
    end
    if (state == S_CODEC_A && cd_out_valid && !codec_is_load) begin
      dmem_en    = 1'b1;
      dmem_we    = 1'b1;
      dmem_addr  = mem_addr_r;           // address saved when the encryption started
      dmem_wdata = cd_out_data;
    end
  end

  // user data cache updates: the pair (value, ciphertext) whenever both are known,
  // otherwise the stored word is forgotten
  logic m_store;                     // user store of an M value that has its ciphertext
  always_comb begin
    m_store      = mem_go && opc == OP_SW && user_mode && rb_pri[63:32] == 32'h0 && !store_encrypt;
    dc_wr        = m_store;
    dc_wr_addr   = daddr;
    dc_wr_plain  = rb_pri[31:0];
    dc_wr_cipher = rb_sec;
    if (state == S_CODEC_A && cd_out_valid) begin
      dc_wr        = 1'b1;
      dc_wr_addr   = mem_addr_r;
      dc_wr_plain  = codec_is_load ? cd_out_data[31:0] : rb_pri[31:0];
      dc_wr_cipher = codec_is_load ? load_word : cd_out_data;
    end
    dc_inv = mem_go && opc == OP_SW && !m_store && !(user_mode && store_encrypt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pc            <= '0;
      insn          <= '0;
      ic_dec        <= 1'b0;
      ic_imm_r      <= '0;
      imm_plain     <= '0;
      user_mode     <= 1'b0;
      flag          <= 1'b0;
      ovf_flag      <= 1'b0;
      wb_en         <= 1'b0;
      wb_pri        <= '0;
      wb_sec        <= '0;
      in_delay      <= 1'b0;
      delay_target  <= '0;
      codec_is_load <= 1'b0;
      load_word     <= '0;
      walked        <= 1'b0;
      walk_idx      <= '0;
      mem_addr_r    <= '0;
      stats         <= '0;
    end else begin
      wb_en <= 1'b0;
      if (busy) stats.cycles <= stats.cycles + 1;
      unique case (state)
        S_IDLE, S_HALT: begin
          if (start) begin
            state     <= S_FETCH;
            pc        <= start_pc;
            user_mode <= start_user;
            in_delay  <= 1'b0;
          end
        end

        S_FETCH: begin
          if (user_mode && ic_hit) begin
            insn     <= ic_insn;
            ic_dec   <= ic_dec_w;
            ic_imm_r <= ic_imm;
            state    <= S_DECODE;
          end else state <= S_FETCH_WAIT;
        end

        S_FETCH_WAIT: begin
          insn   <= imem_rdata;
          ic_dec <= 1'b0;
          state  <= S_DECODE;
        end

        S_DECODE: begin
          if (pf_is_prefix) begin
            stats.prefixes <= stats.prefixes + 1;
            stats.retired  <= stats.retired + 1;
            pc       <= next_pc;
            in_delay <= 1'b0;
            state    <= S_FETCH;
          end else if (opc == OP_NOP) begin
            stats.retired <= stats.retired + 1;
            if (insn[15:0] == 16'd1) state <= S_HALT;
            else begin
              pc       <= next_pc;
              in_delay <= 1'b0;
              state    <= S_FETCH;
            end
          end else if (opc inside {OP_J, OP_BF, OP_BNF}) begin
            stats.retired <= stats.retired + 1;
            if (bp_upd) begin
              if (bp_hit) stats.bpb_hits   <= stats.bpb_hits + 1;
              else        stats.bpb_misses <= stats.bpb_misses + 1;
              if (bp_pred == branch_taken) stats.bpb_right <= stats.bpb_right + 1;
              else                         stats.bpb_wrong <= stats.bpb_wrong + 1;
            end
            if (branch_taken) begin
              stats.branches_taken <= stats.branches_taken + 1;
              delay_target <= pc + {{4{insn[25]}}, insn[25:0], 2'b00};
              in_delay     <= 1'b1;
            end
            pc    <= pc + 32'd4;
            state <= S_FETCH;
          end else if (user_mode && is_imm_b) begin
            if (ic_dec) begin
              imm_plain <= ic_imm_r;
              stats.icache_imm_hits <= stats.icache_imm_hits + 1;
              state <= S_EXEC;
            end else state <= S_CODEC_B;
          end else state <= S_EXEC;
        end

        S_CODEC_B: begin
          if (cd_out_valid) begin
            imm_plain <= cd_out_data[31:0];
            stats.imm_decrypts <= stats.imm_decrypts + 1;
            if (ic_patch_ok) stats.icache_patches <= stats.icache_patches + 1;
            state <= S_EXEC;
          end
        end

        S_EXEC: begin
          walked   <= 1'b0;
          walk_idx <= '0;
          if (opc inside {OP_LWZ, OP_LWS, OP_SW}) state <= S_MEM;
          else begin
            state <= S_WB;
            if (alu_range || !(opc inside {OP_ALU, OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_SHIFTI, OP_SF, OP_SFI})) begin
              stats.range_errors <= stats.range_errors + 1;
            end else if (is_cmp) begin
              flag <= alu_flag;
            end else begin
              wb_en  <= 1'b1;
              wb_pri <= alu_pri;
              wb_sec <= alu_sec;
              if (alu_ovf) ovf_flag <= 1'b1;
            end
          end
        end

        S_MEM: begin
          if (need_walk) begin
            stats.tlb_misses <= stats.tlb_misses + 1;
            if (tlb_alloc_slot == '0 && !tlb_full) walked <= 1'b1;   // database empty
            else state <= S_WALK_RD;
          end else if (!mem_go) begin
            stats.range_errors <= stats.range_errors + 1;
            state <= S_WB;
          end else begin
            if (user_mode && tlb_hit && !walked) stats.tlb_hits <= stats.tlb_hits + 1;
            mem_addr_r <= daddr;
            if (opc == OP_SW) begin
              if (store_encrypt) begin
                codec_is_load <= 1'b0;
                state         <= S_CODEC_A;
              end else state <= S_WB;
            end else if (user_mode && dc_hit) begin
              // decrypted copy cached: no memory read, no codec
              stats.dcache_hits <= stats.dcache_hits + 1;
              wb_en  <= 1'b1;
              wb_pri <= {32'h0, dc_plain};
              wb_sec <= dc_cipher;
              state  <= S_WB;
            end else state <= S_LOAD_WAIT;
          end
        end

        S_LOAD_WAIT: begin
          load_word <= dmem_rdata;
          if (dmem_rdata == STAR) begin
            wb_en  <= 1'b1;
            wb_pri <= user_mode ? STAR : 64'h0;
            wb_sec <= user_mode ? 64'h0 : STAR;
            state  <= S_WB;
          end else if (dmem_rdata[63:32] == 32'h0) begin
            // clear supervisor data (type a)
            wb_en  <= 1'b1;
            wb_pri <= user_mode ? mk_n(dmem_rdata[31:0]) : dmem_rdata;
            wb_sec <= user_mode ? dmem_rdata : mk_n(dmem_rdata[31:0]);
            state  <= S_WB;
          end else if (user_mode) begin
            codec_is_load <= 1'b1;
            state         <= S_CODEC_A;
          end else begin
            // encrypted user data seen by the supervisor: S / placeholder
            wb_en  <= 1'b1;
            wb_pri <= dmem_rdata;
            wb_sec <= STAR;
            state  <= S_WB;
          end
        end

        S_CODEC_A: begin
          if (cd_out_valid) begin
            if (codec_is_load) begin
              stats.load_decrypts <= stats.load_decrypts + 1;
              wb_en  <= 1'b1;
              wb_pri <= {32'h0, cd_out_data[31:0]};
              wb_sec <= load_word;
            end else begin
              stats.store_encrypts <= stats.store_encrypts + 1;
            end
            state <= S_WB;
          end
        end

        S_WALK_RD: state <= S_WALK_CMP;

        S_WALK_CMP: begin
          if (walk_found) begin
            stats.tlb_refills <= stats.tlb_refills + 1;
            walked <= 1'b1;
            state  <= S_MEM;                      // hits now
          end else if (tlb_full ? walk_idx == '1 : walk_idx + 1'b1 == tlb_alloc_slot) begin
            walked <= 1'b1;                       // unknown address: allocate
            state  <= S_MEM;
          end else begin
            walk_idx <= walk_idx + 1'b1;
            state    <= S_WALK_RD;
          end
        end

        S_WB: begin
          stats.retired <= stats.retired + 1;
          pc       <= next_pc;
          in_delay <= 1'b0;
          state    <= S_FETCH;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
