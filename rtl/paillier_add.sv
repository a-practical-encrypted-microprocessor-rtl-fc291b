// paillier_add: encrypted addition for the Paillier configuration of the processor.
// Under an additively homomorphic Paillier encryption, adding two encrypted numbers is
// multiplying their ciphertexts modulo m, so this unit computes  y = a * b mod m  and
// occupies the pipeline stages that hold the Rijndael codec in the other configuration.
// No key and no decryption is involved.
//
// How it works: interleaved (shift-and-add) modular multiplication, most significant
// multiplier bit first. Each step doubles the accumulator and conditionally adds a,
// with a conditional subtraction of m after each so that the accumulator stays below m.
// The W multiplier bits are spread over STAGES pipeline stages, ceil(W/STAGES) bits per
// stage, so one multiplication enters per cycle and finishes STAGES cycles later.
// The 72-bit width and the 10 stages are the design's figures; the algorithm is this
// implementation's choice (the design only says the operation could be done in one or
// two stages and is deliberately spread over ten).
//
// Interface: in_valid/in_a/in_b/in_tag accepted every cycle; out_valid/out_y/out_tag
// appear STAGES cycles later. Operands must already be reduced (a, b < m), m odd or
// even, m < 2^W. modulus must stay stable while products are in flight.
module paillier_add #(
  parameter int unsigned W      = 72,
  parameter int unsigned STAGES = 10,
  parameter int unsigned TAGW   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [W-1:0]    modulus,
  input  logic            in_valid,
  input  logic [W-1:0]    in_a,
  input  logic [W-1:0]    in_b,
  input  logic [TAGW-1:0] in_tag,
  output logic            out_valid,
  output logic [W-1:0]    out_y,
  output logic [TAGW-1:0] out_tag
);
  localparam int unsigned BPS = (W + STAGES - 1) / STAGES;  // multiplier bits per stage
  localparam int unsigned BW  = BPS * STAGES;               // multiplier padded width

  typedef struct packed {
    logic            v;
    logic [W-1:0]    acc;
    logic [W-1:0]    a;
    logic [BW-1:0]   b;   // remaining multiplier bits, consumed from the top
    logic [TAGW-1:0] tag;
  } stage_t;

  // one step: acc = (2*acc + bit*a) mod m, with acc, a < m
  function automatic logic [W-1:0] step(input logic [W-1:0] acc, input logic [W-1:0] a,
                                        input logic bit_i, input logic [W-1:0] m);
    logic [W:0] t;
    t = {acc, 1'b0};
    if (t >= {1'b0, m}) t = t - {1'b0, m};
    if (bit_i) begin
      t = t + {1'b0, a};
      if (t >= {1'b0, m}) t = t - {1'b0, m};
    end
    return t[W-1:0];
  endfunction

  stage_t st [STAGES+1];

  always_comb begin
    st[0].v   = in_valid;
    st[0].acc = '0;
    st[0].a   = in_a;
    st[0].b   = BW'(in_b);
    st[0].tag = in_tag;
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    stage_t nxt;
    always_comb begin
      nxt = st[s-1];
      for (int i = 0; i < BPS; i++) begin
        nxt.acc = step(nxt.acc, nxt.a, nxt.b[BW-1], modulus);
        nxt.b   = {nxt.b[BW-2:0], 1'b0};
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[s] <= '0;
      else        st[s] <= nxt;
    end
  end

  assign out_valid = st[STAGES].v;
  assign out_y     = st[STAGES].acc;
  assign out_tag   = st[STAGES].tag;

endmodule
