// tb_branch_pred_buffer: checks the branch prediction buffer. A directed loop branch
// (taken three times, then not taken, then the loop run again) is checked against
// predictions worked out by hand for 2-bit counters; then random branches at a few
// addresses, some sharing an entry, are checked against a model that keeps, per
// branch address, a counter and whether a later branch sharing its entry has replaced
// it. A flush must forget every branch.
module tb_branch_pred_buffer;
  localparam int ENTRIES = 4;

  logic        clk = 0, rst_n = 0, flush = 0;
  logic [31:0] lk_pc = '0, upd_pc = '0;
  logic        hit, pred_taken, upd_en = 0, upd_taken = 0;

  branch_pred_buffer #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model, per branch address
  int unsigned m_ctr [logic [31:0]];
  logic [31:0] owner [ENTRIES];      // address whose counter each entry holds
  logic        owned [ENTRIES];

  function automatic int ix(input logic [31:0] a);
    return int'(a[31:2]) % ENTRIES;
  endfunction

  task automatic branch(input logic [31:0] pc, input logic taken, input int exp_hit, input int exp_pred,
                        input string what);
    logic mh, mp;
    lk_pc = pc;
    #1;
    mh = owned[ix(pc)] && owner[ix(pc)] == pc;
    mp = mh && m_ctr[pc] >= 2;
    if (exp_hit >= 0) mh = exp_hit[0];
    if (exp_pred >= 0) mp = exp_pred[0];
    checks++;
    if (hit !== mh || pred_taken !== mp) begin
      failures++;
      $display("FAIL %s pc %h: hit %0b pred %0b, expected %0b %0b", what, pc, hit, pred_taken, mh, mp);
    end
    @(negedge clk);
    upd_en = 1; upd_pc = pc; upd_taken = taken;
    @(negedge clk);
    upd_en = 0;
    if (owned[ix(pc)] && owner[ix(pc)] == pc)
      m_ctr[pc] = taken ? (m_ctr[pc] == 3 ? 3 : m_ctr[pc] + 1) : (m_ctr[pc] == 0 ? 0 : m_ctr[pc] - 1);
    else begin
      m_ctr[pc] = taken ? 2 : 1;
      owned[ix(pc)] = 1; owner[ix(pc)] = pc;
    end
  endtask

  initial begin
    for (int i = 0; i < ENTRIES; i++) begin owned[i] = 0; owner[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // a loop branch: taken three times, then the exit, then the loop again
    branch(32'h100, 1, 0, 0, "first sight: miss, not taken");
    branch(32'h100, 1, 1, 1, "entered weakly taken");
    branch(32'h100, 1, 1, 1, "strongly taken");
    branch(32'h100, 0, 1, 1, "loop exit mispredicted");
    branch(32'h100, 1, 1, 1, "one exit does not flip a strong counter");
    branch(32'h104, 0, 0, 0, "other entry: miss");
    branch(32'h104, 0, 1, 0, "entered weakly not taken");
    branch(32'h100 + 32'(4 * ENTRIES), 1, 0, 0, "same entry, other branch: miss");
    branch(32'h100, 1, 0, 0, "replaced by the other branch");
    @(negedge clk) flush = 1;
    @(negedge clk) flush = 0;
    for (int i = 0; i < ENTRIES; i++) owned[i] = 0;
    branch(32'h104, 1, 0, 0, "flushed");

    for (int n = 0; n < 4000; n++) begin
      logic [31:0] pc = 32'h2000 + 32'(4 * $urandom_range(9));
      branch(pc, ($urandom_range(3) != 0) ^ pc[2], -1, -1, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
