// dom_dep_and: first-order masked AND of two arbitrary (possibly dependent)
// Boolean sharings, bit-parallel over W bits, following the generic
// domain-oriented-masking "dep" construction.
//
// Operand b is blinded with a fresh sharing (z0, z1) of a random word
// z = z0 ^ z1; each blinded share b_i ^ z_i is registered in its own domain.
// After the register the blinded value b ^ z is public and is multiplied
// locally into each domain. The correction a & z is computed as a DOM-indep
// product of a with (z0, z1), whose cross terms are refreshed by z4 and
// registered. Every term that mixes domains or touches a plain mask is
// behind a register, so a glitch-extended probe on an output only reaches
// register contents that are individually masked. These are the registers
// missing from the earlier two-mask realisation.
//
//   q0 = a0 & (bz0 ^ bz1) ^ [a0 & z0] ^ [a0 & z1 ^ z4]
//   q1 = a1 & (bz0 ^ bz1) ^ [a1 & z1] ^ [a1 & z0 ^ z4]
//   q0 ^ q1 = a & b                     ([..] are registers)
//
// Timing: with en high and a, b held, q is valid one cycle later and stays
// valid while the inputs are held (fresh masks each cycle give a fresh
// sharing every cycle). With en low all registers are cleared to zero.
// Three mask bits per data bit; the mask roles follow the description, the
// clear-when-idle behaviour is this design's choice.
module dom_dep_and #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a0,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] b0,
  input  logic [W-1:0] b1,
  input  logic [W-1:0] zb0,   // blinding share for domain 0 (z0)
  input  logic [W-1:0] zb1,   // blinding share for domain 1 (z1)
  input  logic [W-1:0] zr,    // DOM-indep refresh (z4)
  output logic [W-1:0] q0,
  output logic [W-1:0] q1
);

  logic [W-1:0] bz0_q, bz1_q;       // blinded operand, one per domain
  logic [W-1:0] t00_q, t01_q;       // domain 0 terms of a & z
  logic [W-1:0] t11_q, t10_q;       // domain 1 terms of a & z

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bz0_q <= '0; bz1_q <= '0;
      t00_q <= '0; t01_q <= '0; t11_q <= '0; t10_q <= '0;
    end else if (!en) begin
      bz0_q <= '0; bz1_q <= '0;
      t00_q <= '0; t01_q <= '0; t11_q <= '0; t10_q <= '0;
    end else begin
      bz0_q <= b0 ^ zb0;
      bz1_q <= b1 ^ zb1;
      t00_q <= a0 & zb0;
      t01_q <= (a0 & zb1) ^ zr;
      t11_q <= a1 & zb1;
      t10_q <= (a1 & zb0) ^ zr;
    end
  end

  logic [W-1:0] bz;
  assign bz = bz0_q ^ bz1_q;
  assign q0 = (a0 & bz) ^ t00_q ^ t01_q;
  assign q1 = (a1 & bz) ^ t11_q ^ t10_q;

endmodule
