// dom_indep: first-order DOM-indep AND of two independent Boolean sharings,
// bit-parallel over W bits, with the post-compression register that the
// iterative adder needs, and an optional XOR of a third sharing c folded
// into the same-domain terms (the DOM-indep* variant, XOR_C = 1).
//
// Stage "tp" (the original DOM-indep register) holds the four component
// functions
//   t00 = a0 & b0 [^ c0]    t01 = (a1 & b0) ^ r    (domain 0)
//   t11 = a1 & b1 [^ c1]    t10 = (a0 & b1) ^ r    (domain 1)
// Stage "pc" holds the per-domain compression q0 = t00 ^ t01, q1 = t11 ^ t10.
// With pc in place a glitch-extended probe on a consumer of q reaches only
// the compressed, refreshed value of one domain, never two loose component
// functions of different iterations.
//
// Control: cap_tp loads tp from the inputs and clears pc; cap_pc loads pc
// from tp and clears tp; clear empties both. So at most one of the two
// stages holds data at any time (the two stages are reset alternately),
// which keeps a register from transitioning between two unrelated values.
// Without any command both stages hold. q_tp is the combinational
// compression of tp, used where the next register downstream plays the
// part of pc. Two cycles per product through both stages.
module dom_indep #(
  parameter int unsigned W     = 32,
  parameter bit          XOR_C = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         cap_tp,
  input  logic         cap_pc,
  input  logic [W-1:0] a0,
  input  logic [W-1:0] a1,
  input  logic [W-1:0] b0,
  input  logic [W-1:0] b1,
  input  logic [W-1:0] c0,
  input  logic [W-1:0] c1,
  input  logic [W-1:0] r,
  output logic [W-1:0] q0,      // pc register, domain 0
  output logic [W-1:0] q1,      // pc register, domain 1
  output logic [W-1:0] q_tp0,   // compression of tp, domain 0
  output logic [W-1:0] q_tp1    // compression of tp, domain 1
);

  logic [W-1:0] t00_q, t01_q, t11_q, t10_q;
  logic [W-1:0] pc0_q, pc1_q;
  logic [W-1:0] cc0, cc1;

  assign cc0 = XOR_C ? c0 : '0;
  assign cc1 = XOR_C ? c1 : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t00_q <= '0; t01_q <= '0; t11_q <= '0; t10_q <= '0;
      pc0_q <= '0; pc1_q <= '0;
    end else if (clear) begin
      t00_q <= '0; t01_q <= '0; t11_q <= '0; t10_q <= '0;
      pc0_q <= '0; pc1_q <= '0;
    end else if (cap_tp) begin
      t00_q <= (a0 & b0) ^ cc0;
      t01_q <= (a1 & b0) ^ r;
      t11_q <= (a1 & b1) ^ cc1;
      t10_q <= (a0 & b1) ^ r;
      pc0_q <= '0;
      pc1_q <= '0;
    end else if (cap_pc) begin
      pc0_q <= t00_q ^ t01_q;
      pc1_q <= t11_q ^ t10_q;
      t00_q <= '0; t01_q <= '0; t11_q <= '0; t10_q <= '0;
    end
  end

  assign q_tp0 = t00_q ^ t01_q;
  assign q_tp1 = t11_q ^ t10_q;
  assign q0    = pc0_q;
  assign q1    = pc1_q;

endmodule
