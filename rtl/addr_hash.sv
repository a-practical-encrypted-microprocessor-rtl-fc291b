// addr_hash: hashes the decrypted 32-bit data address of a user-mode load or store
// before it leaves the processor core, so that the memory system never sees a user
// address in the clear. With the Rijndael configuration the address is available
// decrypted at the execute stage; rather than handing it to memory as it is, it passes
// through this keyed hash and the address-remapping TLB then maps the hash to a
// linear memory slot.
//
// The function is this design's own choice: the address is zero-extended to 64 bits,
// XORed with a 64-bit key and passed through the 64-bit finaliser of MurmurHash3
// (xor-shift / multiply by odd constant, twice). Every step is invertible, so the hash
// is a bijection: distinct addresses never collide, which keeps the remapping free of
// aliasing. The same address always gives the same hash. Purely combinational.
module addr_hash #(
  parameter logic [63:0] M1 = 64'hff51afd7ed558ccd,
  parameter logic [63:0] M2 = 64'hc4ceb9fe1a85ec53
) (
  input  logic [63:0] key,
  input  logic [31:0] addr,
  output logic [63:0] hash
);
  logic [63:0] v1, v2, v3, v4;
  always_comb begin
    v1   = {32'h0, addr} ^ key;
    v2   = (v1 ^ (v1 >> 33)) * M1;
    v3   = (v2 ^ (v2 >> 33)) * M2;
    v4   = v3 ^ (v3 >> 33);
    hash = v4;
  end
endmodule
