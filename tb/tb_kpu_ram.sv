// tb_kpu_ram: self-checking test of the two-port synchronous RAM. Random writes
// through either port are followed by reads through either port one cycle later,
// compared with a model array; a same-cycle write collision must leave port A's data.
module tb_kpu_ram;
  localparam int AW = 6, DW = 64;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [AW-1:0] a_addr = 0, b_addr = 0;
  logic [DW-1:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  kpu_ram #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word through port B
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = AW'(i); b_wdata = {$urandom, $urandom}; model[i] = b_wdata;
    end
    @(negedge clk) b_en = 0; b_we = 0;
    for (int n = 0; n < 500; n++) begin
      logic pa;
      @(negedge clk);
      pa = $urandom % 2;
      if ($urandom % 2) begin
        if (pa) begin a_en = 1; a_we = 1; a_addr = AW'($urandom); a_wdata = {$urandom, $urandom}; model[a_addr] = a_wdata; end
        else    begin b_en = 1; b_we = 1; b_addr = AW'($urandom); b_wdata = {$urandom, $urandom}; model[b_addr] = b_wdata; end
        @(negedge clk) a_en = 0; a_we = 0; b_en = 0; b_we = 0;
      end else begin
        if (pa) begin a_en = 1; a_we = 0; a_addr = AW'($urandom); end
        else    begin b_en = 1; b_we = 0; b_addr = AW'($urandom); end
        @(negedge clk);
        checks++;
        if ((pa ? a_rdata : b_rdata) !== model[pa ? a_addr : b_addr]) begin
          failures++; $display("FAIL read port %s", pa ? "A" : "B");
        end
        a_en = 0; b_en = 0;
      end
    end
    // collision: both ports write word 5
    @(negedge clk); a_en = 1; a_we = 1; a_addr = 5; a_wdata = 64'haaaa; b_en = 1; b_we = 1; b_addr = 5; b_wdata = 64'hbbbb;
    @(negedge clk); a_we = 0; b_en = 0; b_we = 0;
    @(negedge clk);
    checks++;
    if (a_rdata !== 64'haaaa) begin failures++; $display("FAIL collision"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
