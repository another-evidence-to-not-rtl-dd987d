// bool_shift: the BoolShift unit. Shifts a Boolean sharing left or right
// (logical, zero fill) or rotates it right by a public amount of 0..31 bits.
// Shifting and rotating are linear, so each share is moved on its own and
// the two domains never meet. The result is registered; the register is
// cleared while en is low, so it never carries a stale sharing.
//
// Timing: result valid (vld) one cycle after en rises, while en is high and
// the inputs are held. The operations follow the description; the output
// register and its clearing are this design's choices, made to match the
// other units.
module bool_shift
  import masked_alu_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  shift_op_e op,
  input  logic [4:0] shamt,
  input  share_t    a,
  output share_t    q,
  output logic      vld
);

  function automatic word_t move(input word_t w, input shift_op_e o,
                                 input logic [4:0] n);
    unique case (o)
      SH_SLL:  return w << n;
      SH_SRL:  return w >> n;
      SH_ROR:  return (w >> n) | (w << (6'd32 - {1'b0, n}));
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= '0;
      vld <= 1'b0;
    end else if (!en) begin
      q   <= '0;
      vld <= 1'b0;
    end else begin
      q.s0 <= move(a.s0, op, shamt);
      q.s1 <= move(a.s1, op, shamt);
      vld  <= 1'b1;
    end
  end

endmodule
