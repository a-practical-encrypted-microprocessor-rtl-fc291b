// tb_user_dcache: checks the user data cache against a model that remembers, per
// address, the last (value, ciphertext) pair written and whether a later write to the
// same cache line, an invalidation or a flush has removed it. Random writes,
// invalidations, flushes and lookups on a small address space make conflicts between
// addresses sharing a line frequent. Directed cases first: install and hit, conflict
// eviction, invalidation of the right and of the wrong word, write winning over
// invalidation in the same cycle, flush.
module tb_user_dcache;
  localparam int AW = 6, LINES = 4;

  logic          clk = 0, rst_n = 0, flush = 0;
  logic [AW-1:0] lk_addr = '0, wr_addr = '0, inv_addr = '0;
  logic          hit, wr_en = 0, inv_en = 0;
  logic [31:0]   plain, wr_plain = '0;
  logic [63:0]   cipher, wr_cipher = '0;

  user_dcache #(.AW(AW), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: which address each line holds, if any, and its contents
  logic          m_v [LINES];
  logic [AW-1:0] m_a [LINES];
  logic [31:0]   m_p [LINES];
  logic [63:0]   m_c [LINES];

  task automatic look(input logic [AW-1:0] a, input string what);
    int i;
    logic exp_hit;
    lk_addr = a;
    #1;
    i = int'(a) % LINES;
    exp_hit = m_v[i] && m_a[i] == a;
    checks++;
    if (hit !== exp_hit || (exp_hit && (plain !== m_p[i] || cipher !== m_c[i]))) begin
      failures++;
      $display("FAIL %s addr %0d: hit %0b plain %h cipher %h, expected hit %0b plain %h cipher %h",
               what, a, hit, plain, cipher, exp_hit, m_p[i], m_c[i]);
    end
  endtask

  task automatic step(input logic w, input logic [AW-1:0] wa, input logic iv, input logic [AW-1:0] ia,
                      input logic fl);
    logic [31:0] p;
    logic [63:0] c;
    p = $urandom;
    c = {$urandom, $urandom};
    @(negedge clk);
    wr_en = w; wr_addr = wa; wr_plain = p; wr_cipher = c;
    inv_en = iv; inv_addr = ia; flush = fl;
    @(negedge clk);
    wr_en = 0; inv_en = 0; flush = 0;
    if (fl) for (int i = 0; i < LINES; i++) m_v[i] = 0;
    else begin
      if (iv && m_a[int'(ia) % LINES] == ia) m_v[int'(ia) % LINES] = 0;
      if (w) begin
        m_v[int'(wa) % LINES] = 1; m_a[int'(wa) % LINES] = wa;
        m_p[int'(wa) % LINES] = p; m_c[int'(wa) % LINES] = c;
      end
    end
  endtask

  initial begin
    for (int i = 0; i < LINES; i++) begin m_v[i] = 0; m_a[i] = '0; m_p[i] = '0; m_c[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << AW); a++) look(AW'(a), "empty after reset");

    step(1, 6'd5, 0, '0, 0);  look(6'd5, "installed");
    look(6'd9, "other address, same line");
    step(1, 6'd9, 0, '0, 0);  look(6'd9, "conflict installed"); look(6'd5, "evicted by conflict");
    step(0, '0, 1, 6'd13, 0); look(6'd9, "invalidation of another address leaves the line");
    step(0, '0, 1, 6'd9, 0);  look(6'd9, "invalidated");
    step(1, 6'd2, 1, 6'd2, 0); look(6'd2, "write wins over invalidation");
    step(1, 6'd3, 0, '0, 0);  step(0, '0, 0, '0, 1);
    look(6'd2, "flushed"); look(6'd3, "flushed");

    for (int n = 0; n < 3000; n++) begin
      int r = $urandom_range(99);
      step(r < 45, AW'($urandom), r >= 40 && r < 70, AW'($urandom), r == 99);
      look(AW'($urandom), "random");
      look(wr_addr, "last written");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
