// masked_alu_pkg: types and constants shared by the first-order masked ALU.
//
// A secret 32-bit word x is carried as a Boolean sharing (s0, s1) with
// x = s0 ^ s1; arithmetic sharings produced by the Boolean-to-arithmetic
// conversion use x = s0 - s1 (mod 2^32). The ALU consumes six fresh 32-bit
// masks per cycle, z0..z5, whose roles are fixed:
//   z0, z1, z4  generic DOM-dep AND (z0/z1 blind operand b, z4 refreshes the
//               DOM-indep cross terms)
//   z2          DOM-indep refresh of the propagate chain in the adder
//   z3          DOM-indep* refresh of the generate chain in the adder
//   z5          XOR remasking and the mask/remask instructions
// The word size, the six masks and the cycle counts come from the design
// description; the opcode encoding is this implementation's own.
package masked_alu_pkg;

  parameter int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;

  // One Boolean (or arithmetic) sharing of a word.
  typedef struct packed {
    word_t s1;
    word_t s0;
  } share_t;

  // The six fresh masks consumed by the ALU in one cycle (192 bits).
  typedef struct packed {
    word_t z5;
    word_t z4;
    word_t z3;
    word_t z2;
    word_t z1;
    word_t z0;
  } masks_t;

  // B-class instructions plus the Boolean-to-arithmetic conversion.
  typedef enum logic [3:0] {
    OP_MASK   = 4'd0,   // rd = fresh sharing of the plain word rs1_s0
    OP_REMASK = 4'd1,   // rd = rs1 with both shares re-randomised
    OP_NOT    = 4'd2,
    OP_AND    = 4'd3,
    OP_OR     = 4'd4,
    OP_XOR    = 4'd5,
    OP_ADD    = 4'd6,
    OP_SUB    = 4'd7,
    OP_SLL    = 4'd8,
    OP_SRL    = 4'd9,
    OP_ROR    = 4'd10,
    OP_B2A    = 4'd11   // Boolean sharing -> arithmetic sharing
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_SLL = 2'd0,
    SH_SRL = 2'd1,
    SH_ROR = 2'd2
  } shift_op_e;

  // Cycles from accepting a request to the result being valid.
  localparam int unsigned LAT_MASK    = 1;
  localparam int unsigned LAT_BITWISE = 2;
  localparam int unsigned LAT_SHIFT   = 2;
  localparam int unsigned LAT_ADD     = 13;
  localparam int unsigned LAT_B2A     = 14;

  function automatic word_t bitrev(input word_t w);
    word_t r;
    for (int i = 0; i < XLEN; i++) r[i] = w[XLEN-1-i];
    return r;
  endfunction

endpackage
