// bool2arith: back end of the Boolean-to-arithmetic conversion.
//
// The conversion turns a Boolean sharing (a0, a1) into the arithmetic
// sharing u = (u0, u1) = ((a0 ^ a1) + s, s) with s = z2s ^ z3s, so that
// u0 - u1 = a0 ^ a1. The masked adder computes a + s with s supplied as the
// Boolean sharing (z2s, z3s); its output sharing (s0, s1) is then captured by
// two output registers that stay cleared until the adder reports completion,
// and only after them are the two shares combined into u0 = s0 ^ s1. This
// keeps glitches of the adder's intermediate outputs from ever recombining
// the two shares; it costs one cycle.
//
// z2s and z3s are sampled copies of the fresh masks z2 and z3 that stay fixed
// for the whole conversion: they load every cycle in which zs_load is high
// (the ALU holds it high while no request is in flight) and hold otherwise.
//
// Timing: capture is the adder's done pulse qualified by the conversion
// opcode; u and vld are valid in the following cycle. The sampling scheme
// of z2s/z3s is this design's choice; the rest follows the description.
module bool2arith
  import masked_alu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   zs_load,
  input  word_t  z2,
  input  word_t  z3,
  output share_t zs,        // (z2s, z3s): Boolean sharing of s for the adder
  input  logic   capture,
  input  share_t s,         // adder output sharing
  output share_t u,         // arithmetic sharing, u0 - u1 = a
  output logic   vld
);

  word_t  z2s_q, z3s_q;
  share_t s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z2s_q <= '0;
      z3s_q <= '0;
    end else if (zs_load) begin
      z2s_q <= z2;
      z3s_q <= z3;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q <= '0;
      vld <= 1'b0;
    end else if (capture) begin
      s_q <= s;
      vld <= 1'b1;
    end else begin
      s_q <= '0;
      vld <= 1'b0;
    end
  end

  assign zs.s0 = z2s_q;
  assign zs.s1 = z3s_q;
  assign u.s0  = s_q.s0 ^ s_q.s1;
  assign u.s1  = z2s_q ^ z3s_q;

endmodule
