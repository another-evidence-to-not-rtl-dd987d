// masked_alu: first-order masked ALU for Boolean-masked instructions of a
// RISC-V core (the B-class of the masking instruction set extension, plus
// the Boolean-to-arithmetic conversion).
//
// Operands arrive as two sharings rs1 = (rs1_s0, rs1_s1), rs2 = (rs2_s0,
// rs2_s1) straight from the register file; share 1 of every operand is kept
// in bit-reversed order outside the ALU (BREV = 1) so that the two shares of
// one value never sit on equal bit positions in the pipeline. The reversal
// is undone at the inputs and reapplied to rd_s1.
//
// Units: bool_arith (BoolBitwise and BoolAdder: NOT/AND/OR/XOR, ADD/SUB),
// bool2arith (conversion back end), bool_shift (SLL/SRL/ROR by shamt) and
// bool_mask (MASK/REMASK). Each unit's result goes through its own output
// register, which is cleared in every cycle in which that unit is not
// delivering the result of the current opcode. The output multiplexer
// therefore sees at most one non-zero input, and between two results there
// is always a cycle in which all its inputs are zero; glitch- or
// transition-extended probes on rd cannot combine the outputs of two units.
//
// Handshake: raise req_valid with op and operands and hold all of them until
// rsp_valid is seen (the core stalls in that time). rsp_valid is a one-cycle
// pulse with rd valid in the same cycle. Latency from the request cycle to
// rsp_valid: MASK/REMASK 1, NOT/AND/OR/XOR 2, SLL/SRL/ROR 2, ADD/SUB 13,
// B2A 14. A new request may follow in the cycle after rsp_valid.
// Masks: z supplies six fresh 32-bit masks every cycle (see masked_alu_pkg).
// Unit structure, mask roles, the output register stage and the cycle counts
// of bitwise logic, ADD/SUB and B2A follow the description; the handshake
// names, the opcode encoding and the MASK/shift latencies are this design's.
module masked_alu
  import masked_alu_pkg::*;
#(
  parameter bit BREV = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       req_valid,
  input  alu_op_e    op,
  input  word_t      rs1_s0,
  input  word_t      rs1_s1,
  input  word_t      rs2_s0,
  input  word_t      rs2_s1,
  input  logic [4:0] shamt,
  input  masks_t     z,
  output logic       rsp_valid,
  output word_t      rd_s0,
  output word_t      rd_s1
);

  // ---------------------------------------------------------------- inputs
  share_t a, b;
  assign a.s0 = rs1_s0;
  assign a.s1 = BREV ? bitrev(rs1_s1) : rs1_s1;
  assign b.s0 = rs2_s0;
  assign b.s1 = BREV ? bitrev(rs2_s1) : rs2_s1;

  logic is_bw, is_arith, is_sh, is_mk;
  always_comb begin
    is_bw    = 1'b0;
    is_arith = 1'b0;
    is_sh    = 1'b0;
    is_mk    = 1'b0;
    unique case (op)
      OP_NOT, OP_AND, OP_OR, OP_XOR: is_bw    = 1'b1;
      OP_ADD, OP_SUB, OP_B2A:        is_arith = 1'b1;
      OP_SLL, OP_SRL, OP_ROR:        is_sh    = 1'b1;
      OP_MASK, OP_REMASK:            is_mk    = 1'b1;
      default: ;
    endcase
  end

  // ------------------------------------------------------------- control
  // act: a request is in flight and its result has not been delivered.
  logic       rsp_q;
  logic       act;
  logic [3:0] cyc_q;     // cycles since the request was accepted

  assign act = req_valid && !rsp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cyc_q <= '0;
    else if (!act)              cyc_q <= '0;
    else if (cyc_q != 4'hF)     cyc_q <= cyc_q + 4'd1;
  end

  // ---------------------------------------------------------------- units
  share_t xor_q, not_q, andor_q, sum, zs, u, sh_q, mk_q, arith_b;
  logic   bw_vld, sum_done, add_busy, b2a_vld, sh_vld;
  logic   add_start;
  assign  add_start = act && is_arith && cyc_q == 4'd1;

  assign arith_b = (op == OP_B2A) ? zs : b;

  bool_arith u_arith (
    .clk      (clk),
    .rst_n    (rst_n),
    .bw_en    (act && (is_bw || is_arith)),
    .or_sel   (op == OP_OR),
    .sub      (op == OP_SUB),
    .add_start(add_start),
    .a        (a),
    .b        (arith_b),
    .z        (z),
    .xor_q    (xor_q),
    .not_q    (not_q),
    .andor_q  (andor_q),
    .bw_vld   (bw_vld),
    .sum      (sum),
    .sum_done (sum_done),
    .add_busy (add_busy)
  );

  bool2arith u_b2a (
    .clk    (clk),
    .rst_n  (rst_n),
    .zs_load(!req_valid || rsp_q),
    .z2     (z.z2),
    .z3     (z.z3),
    .zs     (zs),
    .capture(act && op == OP_B2A && sum_done),
    .s      (sum),
    .u      (u),
    .vld    (b2a_vld)
  );

  shift_op_e sh_op;
  always_comb begin
    unique case (op)
      OP_SRL:  sh_op = SH_SRL;
      OP_ROR:  sh_op = SH_ROR;
      default: sh_op = SH_SLL;
    endcase
  end

  bool_shift u_shift (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (act && is_sh),
    .op   (sh_op),
    .shamt(shamt),
    .a    (a),
    .q    (sh_q),
    .vld  (sh_vld)
  );

  bool_mask u_mask (
    .en    (act && is_mk),
    .remask(op == OP_REMASK),
    .a     (a),
    .zm    (z.z5),
    .q     (mk_q)
  );

  // ------------------------------------------------- output register stage
  typedef enum logic [2:0] {U_NONE, U_BW, U_ADD, U_B2A, U_SH, U_MK} unit_e;

  share_t bw_res;
  always_comb begin
    unique case (op)
      OP_NOT:  bw_res = not_q;
      OP_XOR:  bw_res = xor_q;
      default: bw_res = andor_q;    // AND, OR
    endcase
  end

  logic ld_bw, ld_add, ld_b2a, ld_sh, ld_mk;
  assign ld_bw  = act && is_bw && bw_vld;
  assign ld_add = act && (op == OP_ADD || op == OP_SUB) && sum_done;
  assign ld_b2a = act && op == OP_B2A && b2a_vld;
  assign ld_sh  = act && is_sh && sh_vld;
  assign ld_mk  = act && is_mk;

  share_t o_bw_q, o_add_q, o_b2a_q, o_sh_q, o_mk_q;
  unit_e  unit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_bw_q  <= '0;
      o_add_q <= '0;
      o_b2a_q <= '0;
      o_sh_q  <= '0;
      o_mk_q  <= '0;
      unit_q  <= U_NONE;
      rsp_q   <= 1'b0;
    end else begin
      o_bw_q  <= ld_bw  ? bw_res : '0;
      o_add_q <= ld_add ? sum    : '0;
      o_b2a_q <= ld_b2a ? u      : '0;
      o_sh_q  <= ld_sh  ? sh_q   : '0;
      o_mk_q  <= ld_mk  ? mk_q   : '0;
      rsp_q   <= ld_bw || ld_add || ld_b2a || ld_sh || ld_mk;
      unit_q  <= ld_bw  ? U_BW  :
                 ld_add ? U_ADD :
                 ld_b2a ? U_B2A :
                 ld_sh  ? U_SH  :
                 ld_mk  ? U_MK  : U_NONE;
    end
  end

  share_t rd;
  always_comb begin
    unique case (unit_q)
      U_BW:    rd = o_bw_q;
      U_ADD:   rd = o_add_q;
      U_B2A:   rd = o_b2a_q;
      U_SH:    rd = o_sh_q;
      U_MK:    rd = o_mk_q;
      default: rd = '0;
    endcase
  end

  assign rsp_valid = rsp_q;
  assign rd_s0     = rd.s0;
  assign rd_s1     = BREV ? bitrev(rd.s1) : rd.s1;

  // ------------------------------------------------------------ handshake
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    act |=> req_valid)
    else $error("masked_alu: req_valid dropped before rsp_valid");
  a_op_held: assert property (@(posedge clk) disable iff (!rst_n)
    act |=> $stable(op) && $stable(rs1_s0) && $stable(rs1_s1) &&
            $stable(rs2_s0) && $stable(rs2_s1) && $stable(shamt))
    else $error("masked_alu: request changed before rsp_valid");
  a_one_unit: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ld_bw, ld_add, ld_b2a, ld_sh, ld_mk}))
    else $error("masked_alu: two units delivered at once");
  a_add_idle: assert property (@(posedge clk) disable iff (!rst_n)
    add_start |-> !add_busy)
    else $error("masked_alu: adder started while busy");

endmodule
