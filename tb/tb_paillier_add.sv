// tb_paillier_add: self-checking test of the pipelined Paillier adder.
// Random reduced operands are multiplied modulo random moduli and compared with a
// full-width product reduced by the simulator's own % operator. A second phase uses
// Paillier ciphertexts with unit blinding, E(x) = 1 + x*n mod n^2, and checks that the
// unit adds the plaintexts: E(x)*E(y) = E(x+y mod n). Throughput (one per cycle) and
// latency (STAGES cycles) are checked too.
module tb_paillier_add;
  localparam int W = 72, STAGES = 10;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] modulus;
  logic in_valid;
  logic [W-1:0] in_a, in_b;
  logic [7:0] in_tag;
  logic out_valid;
  logic [W-1:0] out_y;
  logic [7:0] out_tag;
  int checks = 0, failures = 0, cycle = 0, got = 0, sent = 0;

  paillier_add dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [W-1:0] exp_q [$];
  int           cyc_q [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [W-1:0] e;
    int c0;
    e  = exp_q.pop_front();
    c0 = cyc_q.pop_front();
    checks += 2;
    if (out_y !== e) begin failures++; $display("FAIL tag %0d: got %h expected %h", out_tag, out_y, e); end
    if (cycle - c0 != STAGES) begin failures++; $display("FAIL latency %0d", cycle - c0); end
    got++;
  end

  function automatic logic [W-1:0] mulmod(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] m);
    logic [2*W-1:0] p;
    p = (2*W)'(a) * (2*W)'(b);
    return W'(p % (2*W)'(m));
  endfunction

  function automatic logic [W-1:0] rnd72();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  task automatic issue(input logic [W-1:0] a, input logic [W-1:0] b, input logic [W-1:0] e);
    @(negedge clk);
    in_valid = 1; in_a = a; in_b = b; in_tag = 8'(sent);
    exp_q.push_back(e);
    cyc_q.push_back(cycle);
    sent++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] a, b, n;
    in_valid = 0; in_a = 0; in_b = 0; in_tag = 0;
    modulus = rnd72() | {1'b1, 71'h0} | 72'h1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: random operands, full-width modulus, back to back
    for (int i = 0; i < 40; i++) begin
      a = rnd72() % modulus;
      b = rnd72() % modulus;
      if (i == 0) a = modulus - 1;
      if (i == 1) b = 0;
      issue(a, b, mulmod(a, b, modulus));
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 2) @(posedge clk);
    // phase 2: Paillier homomorphism with n of 36 bits, m = n^2
    n = 72'($urandom) | (72'h1 << 35) | 72'h1;
    n = n & ((72'h1 << 36) - 1);
    modulus = n * n;
    for (int i = 0; i < 20; i++) begin
      logic [W-1:0] x, y;
      x = 72'($urandom) % n;
      y = 72'($urandom) % n;
      issue((1 + x * n) % modulus, (1 + y * n) % modulus, (1 + ((x + y) % n) * n) % modulus);
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 2) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("FAIL %0d results for %0d operations", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
