// bool_bitwise: the BoolBitwise unit of the masked ALU. It computes, in
// parallel on one pair of Boolean sharings a and b:
//   xor_q   = a ^ b, remasked with z5 in both domains and then registered
//   not_q   = ~a (share 0 inverted), registered
//   andor_q = a & b, or a | b when or_sel is set
// The AND is a generic first-order DOM-dep AND (dom_dep_and, masks z0, z1,
// z4). OR reuses the same gate through De Morgan: share 0 of both inputs and
// of the product is inverted, which is linear and stays inside domain 0.
// The register after the XOR remasking follows the description (without it
// the remasking mask is visible to a glitch-extended probe); registering NOT
// as well is this design's choice so that every bitwise result has the same
// one-cycle latency. The adder preprocessing (propagate = xor_q,
// generate = andor_q with or_sel low) uses the same outputs.
//
// Timing: results are valid one cycle after en rises and stay valid while
// en is high and the inputs are held; vld flags this. With en low all
// registers are cleared.
module bool_bitwise
  import masked_alu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   or_sel,
  input  share_t a,
  input  share_t b,
  input  masks_t z,
  output share_t xor_q,
  output share_t not_q,
  output share_t andor_q,
  output logic   vld
);

  // De Morgan input inversion for OR (domain 0 only).
  word_t ga0, gb0, g0, g1;
  assign ga0 = or_sel ? ~a.s0 : a.s0;
  assign gb0 = or_sel ? ~b.s0 : b.s0;

  dom_dep_and #(.W(XLEN)) u_mand (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .a0   (ga0),
    .a1   (a.s1),
    .b0   (gb0),
    .b1   (b.s1),
    .zb0  (z.z0),
    .zb1  (z.z1),
    .zr   (z.z4),
    .q0   (g0),
    .q1   (g1)
  );

  // The selection of the output inversion is registered along with the
  // product so that it matches the data it applies to.
  logic or_sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xor_q    <= '0;
      not_q    <= '0;
      or_sel_q <= 1'b0;
      vld      <= 1'b0;
    end else if (!en) begin
      xor_q    <= '0;
      not_q    <= '0;
      or_sel_q <= 1'b0;
      vld      <= 1'b0;
    end else begin
      xor_q.s0 <= a.s0 ^ b.s0 ^ z.z5;
      xor_q.s1 <= a.s1 ^ b.s1 ^ z.z5;
      not_q.s0 <= ~a.s0;
      not_q.s1 <= a.s1;
      or_sel_q <= or_sel;
      vld      <= 1'b1;
    end
  end

  assign andor_q.s0 = or_sel_q ? ~g0 : g0;
  assign andor_q.s1 = g1;

endmodule
