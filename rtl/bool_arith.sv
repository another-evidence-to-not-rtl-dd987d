// bool_arith: masked Boolean addition/subtraction, built from the BoolBitwise
// unit (preprocessing: propagate = a ^ b remasked, generate = a & b via the
// DOM-dep AND) and the BoolAdder (iterative Kogge-Stone carry network).
// The bitwise results are brought out as well, so this block is the single
// home of BoolBitwise inside the ALU.
//
// Subtraction a - b = a + ~b + 1: share 0 of b is inverted before the
// preprocessing (linear, domain 0 only) and the adder is given cin = 1.
//
// Timing: hold a, b, sub and bw_en high from the request on. The bitwise
// results are valid from the next cycle (bw_vld). Pulse add_start in that
// cycle to run an addition; sum_done then rises 11 cycles later, 12 cycles
// after the request. The inversion for subtraction is this design's choice;
// the split between the two units follows the description.
module bool_arith
  import masked_alu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   bw_en,
  input  logic   or_sel,
  input  logic   sub,
  input  logic   add_start,
  input  share_t a,
  input  share_t b,
  input  masks_t z,
  output share_t xor_q,
  output share_t not_q,
  output share_t andor_q,
  output logic   bw_vld,
  output share_t sum,
  output logic   sum_done,
  output logic   add_busy
);

  share_t bx;
  assign bx.s0 = sub ? ~b.s0 : b.s0;
  assign bx.s1 = b.s1;

  bool_bitwise u_bitwise (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (bw_en),
    .or_sel (or_sel),
    .a      (a),
    .b      (bx),
    .z      (z),
    .xor_q  (xor_q),
    .not_q  (not_q),
    .andor_q(andor_q),
    .vld    (bw_vld)
  );

  bool_adder u_adder (
    .clk  (clk),
    .rst_n(rst_n),
    .start(add_start),
    .cin  (sub),
    .p    (xor_q),
    .g    (andor_q),
    .zp   (z.z2),
    .zg   (z.z3),
    .sum  (sum),
    .done (sum_done),
    .busy (add_busy)
  );

endmodule
