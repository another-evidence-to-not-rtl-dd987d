// bool_mask: the BoolMask unit. In mask mode it turns a plain word x into the
// Boolean sharing (x ^ z5, z5); in remask mode it re-randomises a sharing
// (a0, a1) into (a0 ^ z5, a1 ^ z5), which leaves a0 ^ a1 unchanged.
// The unit is combinational; its result is captured by the ALU's output
// register stage. It uses z5, a mask that the bitwise unit only uses for
// the XOR remasking, so it never exposes a mask that also blinds an AND
// operand (z0 would).
//
// Interface: en gates the output to zero when the unit is not selected, so
// no operand of another instruction reaches the output stage through it.
// The mask choice follows the description; the gating is this design's.
module bool_mask
  import masked_alu_pkg::*;
(
  input  logic   en,
  input  logic   remask,
  input  share_t a,       // mask mode: a.s0 is the plain word
  input  word_t  zm,      // z5
  output share_t q
);

  always_comb begin
    if (!en) begin
      q = '0;
    end else if (remask) begin
      q.s0 = a.s0 ^ zm;
      q.s1 = a.s1 ^ zm;
    end else begin
      q.s0 = a.s0 ^ zm;
      q.s1 = zm;
    end
  end

endmodule
