// tb_addr_hash: self-checking test of the address hash. Outputs are compared with a
// reference that multiplies by shift-and-add; a sweep over consecutive addresses and a
// random sample must give no two equal hashes; a different key must change the hash.
module tb_addr_hash;
  logic [63:0] key, hash;
  logic [31:0] addr;
  int checks = 0, failures = 0;

  addr_hash dut (.*);

  function automatic logic [63:0] mul64(input logic [63:0] a, input logic [63:0] b);
    logic [63:0] p = 0;
    for (int i = 0; i < 64; i++) if (b[i]) p += a << i;
    return p;
  endfunction

  function automatic logic [63:0] ref_hash(input logic [63:0] k, input logic [31:0] x);
    logic [63:0] v;
    v = {32'h0, x} ^ k;
    v = v ^ {33'h0, v[63:33]};
    v = mul64(v, 64'hff51afd7ed558ccd);
    v = v ^ {33'h0, v[63:33]};
    v = mul64(v, 64'hc4ceb9fe1a85ec53);
    return v ^ {33'h0, v[63:33]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] seen [logic [63:0]];
    logic [63:0] h0;
    key = {$urandom, $urandom};
    for (int i = 0; i < 2000; i++) begin
      addr = (i < 1000) ? 32'(i * 4) : $urandom;
      #1;
      checks++;
      if (hash !== ref_hash(key, addr)) begin failures++; $display("FAIL hash of %h: %h", addr, hash); end
      checks++;
      if (seen.exists(hash) && seen[hash] != {32'h0, addr}) begin
        failures++; $display("FAIL collision %h", addr);
      end
      seen[hash] = {32'h0, addr};
    end
    addr = 32'h1000; #1; h0 = hash;
    key = key ^ 64'h1; #1;
    checks++;
    if (hash == h0) begin failures++; $display("FAIL key has no effect"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
