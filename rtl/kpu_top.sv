// kpu_top: the encrypted processor with its instruction and data memories, and the
// Paillier adder of the alternative (keyless) configuration beside it.
//
// The Rijndael configuration is the main design: kpu_core runs OpenRISC-subset code
// whose user-mode data are 64-bit Rijndael ciphertexts, with the codec inside its
// pipeline, an instruction memory of 2^IAW 32-bit words and a data memory of 2^DAW
// 64-bit words (Harvard layout; the upper half of data memory is the linear region the
// user-mode TLB remaps encrypted addresses into; the data memory should be written by
// the host only between runs, since the core's user data cache is flushed at start).
// A host port loads both memories and reads data memory back; start/start_user/start_pc
// launch a program in user (encrypted) or supervisor mode and halted reports its end
// (l.nop 1).
//
// In the Paillier configuration the codec stages are occupied by Paillier addition,
// a 72-bit modular multiplication; that unit is brought out on its own ports (pa_*),
// since the OpenRISC core here is built for the Rijndael configuration.
module kpu_top
  import kpu_pkg::*;
#(
  parameter int unsigned IAW = 18,
  parameter int unsigned DAW = 16,
  parameter int unsigned PW  = 72
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [127:0]   codec_key,
  input  logic [63:0]    hash_key,
  input  logic           start,
  input  logic           start_user,
  input  logic [31:0]    start_pc,
  output logic           busy,
  output logic           halted,
  output logic           user_mode,
  output logic           flag,
  output logic           ovf_flag,
  output kpu_stats_t     stats,
  // host access to the memories
  input  logic           host_imem_we,
  input  logic [IAW-1:0] host_imem_addr,
  input  logic [31:0]    host_imem_wdata,
  input  logic           host_dmem_en,
  input  logic           host_dmem_we,
  input  logic [DAW-1:0] host_dmem_addr,
  input  logic [63:0]    host_dmem_wdata,
  output logic [63:0]    host_dmem_rdata,
  // Paillier addition unit
  input  logic [PW-1:0]  pa_modulus,
  input  logic           pa_in_valid,
  input  logic [PW-1:0]  pa_in_a,
  input  logic [PW-1:0]  pa_in_b,
  input  logic [7:0]     pa_in_tag,
  output logic           pa_out_valid,
  output logic [PW-1:0]  pa_out_y,
  output logic [7:0]     pa_out_tag
);
  logic [IAW-1:0] imem_addr;
  logic [31:0]    imem_rdata, imem_b_unused;
  logic           dmem_en, dmem_we;
  logic [DAW-1:0] dmem_addr;
  logic [63:0]    dmem_wdata, dmem_rdata;

  kpu_core #(.IAW(IAW), .DAW(DAW)) u_core (
    .clk, .rst_n, .codec_key, .hash_key, .start, .start_user, .start_pc,
    .busy, .halted, .user_mode, .flag, .ovf_flag, .stats,
    .imem_addr, .imem_rdata,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata
  );

  kpu_ram #(.AW(IAW), .DW(32)) u_imem (
    .clk,
    .a_en (1'b1), .a_we (1'b0), .a_addr (imem_addr), .a_wdata ('0), .a_rdata (imem_rdata),
    .b_en (host_imem_we), .b_we (host_imem_we), .b_addr (host_imem_addr),
    .b_wdata (host_imem_wdata), .b_rdata (imem_b_unused)
  );

  kpu_ram #(.AW(DAW), .DW(64)) u_dmem (
    .clk,
    .a_en (dmem_en), .a_we (dmem_we), .a_addr (dmem_addr), .a_wdata (dmem_wdata), .a_rdata (dmem_rdata),
    .b_en (host_dmem_en), .b_we (host_dmem_we), .b_addr (host_dmem_addr),
    .b_wdata (host_dmem_wdata), .b_rdata (host_dmem_rdata)
  );

  paillier_add #(.W(PW), .STAGES(10), .TAGW(8)) u_paillier (
    .clk, .rst_n,
    .modulus  (pa_modulus),
    .in_valid (pa_in_valid),
    .in_a     (pa_in_a),
    .in_b     (pa_in_b),
    .in_tag   (pa_in_tag),
    .out_valid(pa_out_valid),
    .out_y    (pa_out_y),
    .out_tag  (pa_out_tag)
  );
endmodule
