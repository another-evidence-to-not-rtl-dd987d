// bool_adder: the BoolAdder unit, an iterative first-order masked
// Kogge-Stone carry network over Boolean sharings.
//
// Inputs are the preprocessed propagate p = a ^ b and generate g = a & b
// sharings from BoolBitwise (for a subtraction the caller has already
// inverted b; cin = 1 then adds the +1). Six iterations x = 1..6 update
//   P <- P & (P << y)            DOM-indep,  refreshed with z2
//   G <- G ^ (P & (G << y))      DOM-indep*, refreshed with z3
// with shifts y = 1, 2, 4, 8, 8, 8 (spans 2, 4, 8, 16, 24, 32 bits). Because
// G and P of one group are never both 1 the OR of the textbook recurrence
// is an XOR, which keeps the update linear apart from the AND. The carry in
// is folded into bit 0 before the first iteration: G0 becomes g0 | p0 =
// g0 ^ p0 and P0 becomes 0, so that G and P stay mutually exclusive.
// The result is sum = p ^ (G << 1 | cin), computed share by share.
//
// Structure: a 6-bit one-hot ring counter (000001 .. 100000) selects the
// shift and the input multiplexers (bitwise results when x = 1, the unit's
// own registered outputs afterwards). Each iteration occupies two cycles:
// the DOM-indep cross-product register (tp) and the post-compression
// register (pc), which are cleared alternately. In the last iteration the
// pc stage is left out: the sum is formed combinationally from tp and is
// captured by the ALU's output register, which takes the part of pc.
//
// Timing: start is a one-cycle pulse in the first cycle in which p and g
// are valid (they must stay valid until done). done is high for one cycle,
// 11 cycles after start, with sum valid in that cycle; the unit is then idle
// again. The shift schedule, counter and register placement follow the
// description; merging the last pc stage into the output register, the
// carry-in handling and the FSM are this design's choices.
module bool_adder
  import masked_alu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   cin,
  input  share_t p,
  input  share_t g,
  input  word_t  zp,     // refresh for the propagate chain (z2)
  input  word_t  zg,     // refresh for the generate chain (z3)
  output share_t sum,
  output logic   done,
  output logic   busy
);

  typedef enum logic [1:0] {S_IDLE, S_PC, S_TP, S_LAST} state_e;
  state_e      st_q;
  logic [5:0]  cnt_q;     // one-hot iteration counter, x = 1 .. 6

  logic cap_tp, cap_pc, clr;
  assign cap_tp = (st_q == S_IDLE && start) || (st_q == S_TP);
  assign cap_pc = (st_q == S_PC);
  assign clr    = (st_q == S_LAST);
  assign done   = (st_q == S_LAST);
  assign busy   = (st_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q  <= S_IDLE;
      cnt_q <= 6'b000001;
    end else begin
      unique case (st_q)
        S_IDLE: if (start) st_q <= S_PC;
        S_PC: begin
          cnt_q <= {cnt_q[4:0], cnt_q[5]};
          st_q  <= S_TP;
        end
        S_TP:   st_q <= cnt_q[5] ? S_LAST : S_PC;
        S_LAST: begin
          cnt_q <= 6'b000001;
          st_q  <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // First-iteration inputs: the carry in is folded into bit 0, which then
  // generates g0 | p0 and propagates nothing (its propagate is a public 0),
  // so G and P stay mutually exclusive.
  share_t g_in, p_in;
  assign g_in.s0 = {g.s0[XLEN-1:1], g.s0[0] ^ (cin & p.s0[0])};
  assign g_in.s1 = {g.s1[XLEN-1:1], g.s1[0] ^ (cin & p.s1[0])};
  assign p_in.s0 = {p.s0[XLEN-1:1], p.s0[0] & ~cin};
  assign p_in.s1 = {p.s1[XLEN-1:1], p.s1[0] & ~cin};

  // Registered (pc) outputs of the two DOM-indep units.
  share_t pp, gp, gtp;

  // Input multiplexers.
  share_t pm, gm;
  assign pm = cnt_q[0] ? p_in : pp;
  assign gm = cnt_q[0] ? g_in : gp;

  // Shifters, driven by the counter.
  share_t ps, gs;
  always_comb begin
    priority case (1'b1)
      cnt_q[0]: begin ps.s0 = pm.s0 << 1; ps.s1 = pm.s1 << 1;
                      gs.s0 = gm.s0 << 1; gs.s1 = gm.s1 << 1; end
      cnt_q[1]: begin ps.s0 = pm.s0 << 2; ps.s1 = pm.s1 << 2;
                      gs.s0 = gm.s0 << 2; gs.s1 = gm.s1 << 2; end
      cnt_q[2]: begin ps.s0 = pm.s0 << 4; ps.s1 = pm.s1 << 4;
                      gs.s0 = gm.s0 << 4; gs.s1 = gm.s1 << 4; end
      default:  begin ps.s0 = pm.s0 << 8; ps.s1 = pm.s1 << 8;
                      gs.s0 = gm.s0 << 8; gs.s1 = gm.s1 << 8; end
    endcase
  end

  dom_indep #(.W(XLEN), .XOR_C(1'b0)) u_prop (
    .clk(clk), .rst_n(rst_n), .clear(clr), .cap_tp(cap_tp), .cap_pc(cap_pc),
    .a0(ps.s0), .a1(ps.s1), .b0(pm.s0), .b1(pm.s1), .c0('0), .c1('0),
    .r(zp), .q0(pp.s0), .q1(pp.s1), .q_tp0(), .q_tp1()
  );

  dom_indep #(.W(XLEN), .XOR_C(1'b1)) u_gen (
    .clk(clk), .rst_n(rst_n), .clear(clr), .cap_tp(cap_tp), .cap_pc(cap_pc),
    .a0(gs.s0), .a1(gs.s1), .b0(pm.s0), .b1(pm.s1), .c0(gm.s0), .c1(gm.s1),
    .r(zg), .q0(gp.s0), .q1(gp.s1), .q_tp0(gtp.s0), .q_tp1(gtp.s1)
  );

  // Post-processing: sum = p ^ (carries), carries = G << 1 with cin at bit 0.
  // Forced to zero outside the done cycle.
  always_comb begin
    if (done) begin
      sum.s0 = p.s0 ^ {gtp.s0[XLEN-2:0], cin};
      sum.s1 = p.s1 ^ {gtp.s1[XLEN-2:0], 1'b0};
    end else begin
      sum = '0;
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (st_q == S_IDLE))
    else $error("bool_adder: start while busy");

endmodule
