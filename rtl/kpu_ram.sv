// kpu_ram: a plain synchronous RAM with two ports, used for the instruction memory
// and the data memory of the processor. Memory is ordinary RAM in this design: it
// stores whatever words it is given (64-bit ciphertexts for user data) and does no
// encryption of its own.
//
// Port A belongs to the core, port B to the host that loads programs and data and
// reads results. Each port reads synchronously (data one cycle after the address, when
// en is high) and writes when en and we are high. If both ports write the same word in
// one cycle, port A wins. Contents are not reset.
module kpu_ram #(
  parameter int unsigned AW = 10,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) b_rdata <= mem[b_addr];
  end
endmodule
