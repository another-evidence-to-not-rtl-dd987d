// masked_alu_system: the masked ALU together with its mask generator, as it
// sits in the execute stage of the core. A Keccak-f[800] generator runs one
// permutation per cycle and supplies 576 fresh bits per cycle; the ALU takes
// the first 192 of them as its six 32-bit masks z0..z5 (z0 = bits 31:0, ...).
// The remaining bits are spare.
//
// Interface: seed_load (one cycle) loads the generator from seed; it must be
// issued once after reset before masked results are relied on (with the
// all-zero reset state the permutation still runs, but from a known state).
// The request side is the ALU's: hold req_valid, op and operands until
// rsp_valid; share 1 of operands and result is bit-reversed. Latencies as in
// masked_alu. Replacing the LFSR mask source by a Keccak-f[800] generator
// follows the description; the wiring of the output bits to z0..z5 and the
// seeding interface are this design's choices.
module masked_alu_system
  import masked_alu_pkg::*;
#(
  parameter int unsigned SEED_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_load,
  input  logic [SEED_BITS-1:0] seed,
  input  logic                 req_valid,
  input  alu_op_e              op,
  input  word_t                rs1_s0,
  input  word_t                rs1_s1,
  input  word_t                rs2_s0,
  input  word_t                rs2_s1,
  input  logic [4:0]           shamt,
  output logic                 rsp_valid,
  output word_t                rd_s0,
  output word_t                rd_s1
);

  localparam int unsigned RND_BITS = 576;

  logic [RND_BITS-1:0] rnd;
  masks_t              z;

  keccak_prng #(
    .ROUNDS   (22),
    .RND_BITS (RND_BITS),
    .SEED_BITS(SEED_BITS)
  ) u_prng (
    .clk      (clk),
    .rst_n    (rst_n),
    .seed_load(seed_load),
    .seed     (seed),
    .en       (1'b1),
    .rnd      (rnd)
  );

  assign z = masks_t'(rnd[$bits(masks_t)-1:0]);

  masked_alu #(.BREV(1'b1)) u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_valid(req_valid),
    .op       (op),
    .rs1_s0   (rs1_s0),
    .rs1_s1   (rs1_s1),
    .rs2_s0   (rs2_s0),
    .rs2_s1   (rs2_s1),
    .shamt    (shamt),
    .z        (z),
    .rsp_valid(rsp_valid),
    .rd_s0    (rd_s0),
    .rd_s1    (rd_s1)
  );

endmodule
