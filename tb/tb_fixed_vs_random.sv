// tb_fixed_vs_random: a simulated first-order fixed-vs-random leakage test
// of the complete design (mask generator and ALU, default parameters) on
// every instruction of the ALU: the bitwise ones, ADD and SUB, the three
// shifts, B2A, and MASK and REMASK.
//
// Power model: in every cycle the sample is the Hamming weight of all data
// registers of the ALU plus the Hamming distance of those registers to the
// previous cycle. The operands' shares are fresh for every request except
// for MASK, whose operand is unshared by definition. Requests alternate at random between a fixed secret and a
// random secret, each freshly shared; samples are aligned to the request
// cycle (the latency is fixed). For every cycle of the operation a Welch
// t-statistic between the two groups is computed. A design whose every
// register holds at most one share's worth of information must keep |t|
// below 4.5. As a control, the same statistic on the Hamming weight of the
// result shares recombined (what an unmasked register would hold) must
// exceed 4.5, showing the test has the power to see a real dependency. This is a register-level model only: it does
// not model glitches, so passing it is necessary, not sufficient.
module tb_fixed_vs_random;
  import masked_alu_pkg::*;
  localparam int N     = 1200;   // requests per group and operation
  localparam int MAXL  = 16;

  logic clk = 1'b0, rst_n = 1'b0, req_valid = 1'b0, rsp_valid;
  logic seed_load = 1'b0;
  logic [127:0] seed = '0;
  alu_op_e op = OP_ADD;
  word_t rs1_s0 = '0, rs1_s1 = '0, rs2_s0 = '0, rs2_s1 = '0, rd_s0, rd_s1;
  logic [4:0] shamt = '0;
  int checks = 0, failures = 0;

  masked_alu_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // All data registers of the ALU, one shared word each.
  localparam int NOBS = 32 * 40;
  logic [NOBS-1:0] obs, obs_prev;
  always_comb obs = {
    dut.u_alu.u_arith.u_bitwise.xor_q, dut.u_alu.u_arith.u_bitwise.not_q,
    dut.u_alu.u_arith.u_bitwise.u_mand.bz0_q, dut.u_alu.u_arith.u_bitwise.u_mand.bz1_q,
    dut.u_alu.u_arith.u_bitwise.u_mand.t00_q, dut.u_alu.u_arith.u_bitwise.u_mand.t01_q,
    dut.u_alu.u_arith.u_bitwise.u_mand.t11_q, dut.u_alu.u_arith.u_bitwise.u_mand.t10_q,
    dut.u_alu.u_arith.u_adder.u_prop.t00_q, dut.u_alu.u_arith.u_adder.u_prop.t01_q,
    dut.u_alu.u_arith.u_adder.u_prop.t11_q, dut.u_alu.u_arith.u_adder.u_prop.t10_q,
    dut.u_alu.u_arith.u_adder.u_prop.pc0_q, dut.u_alu.u_arith.u_adder.u_prop.pc1_q,
    dut.u_alu.u_arith.u_adder.u_gen.t00_q,  dut.u_alu.u_arith.u_adder.u_gen.t01_q,
    dut.u_alu.u_arith.u_adder.u_gen.t11_q,  dut.u_alu.u_arith.u_adder.u_gen.t10_q,
    dut.u_alu.u_arith.u_adder.u_gen.pc0_q,  dut.u_alu.u_arith.u_adder.u_gen.pc1_q,
    dut.u_alu.u_b2a.s_q, dut.u_alu.u_shift.q,
    dut.u_alu.o_bw_q, dut.u_alu.o_add_q, dut.u_alu.o_b2a_q, dut.u_alu.o_sh_q,
    dut.u_alu.o_mk_q};

  real sum [2][MAXL], sq [2][MAXL];
  int  cnt [2];
  real psum [2], psq [2];

  function automatic word_t rev(word_t w);
    word_t r;
    for (int i = 0; i < 32; i++) r[i] = w[31 - i];
    return r;
  endfunction

  function automatic real welch(real s1, real q1, real s2, real q2, int n1, int n2);
    real m1, m2, v1, v2, d;
    m1 = s1 / n1; m2 = s2 / n2;
    v1 = q1 / n1 - m1 * m1; v2 = q2 / n2 - m2 * m2;
    d = v1 / n1 + v2 / n2;
    if (d <= 0.0) return (m1 == m2) ? 0.0 : 1.0e9;
    return (m1 - m2) / $sqrt(d);
  endfunction

  task automatic campaign(input alu_op_e o, input word_t fx, input word_t fy);
    int g, k, lat;
    word_t x, y;
    real t, tmax, tp;
    for (int i = 0; i < 2; i++) begin
      cnt[i] = 0; psum[i] = 0.0; psq[i] = 0.0;
      for (int j = 0; j < MAXL; j++) begin sum[i][j] = 0.0; sq[i][j] = 0.0; end
    end
    lat = 0;
    while (cnt[0] < N || cnt[1] < N) begin
      g = $urandom_range(0, 1);
      if (cnt[g] >= N) g = 1 - g;
      x = g ? fx : $urandom;
      y = g ? fy : $urandom;
      @(negedge clk);
      op = o;
      shamt = 5'd5;
      rs1_s0 = $urandom; rs1_s1 = rev(x ^ rs1_s0);
      if (o == OP_MASK) begin rs1_s0 = x; rs1_s1 = $urandom; end
      rs2_s0 = $urandom; rs2_s1 = rev(y ^ rs2_s0);
      req_valid = 1'b1;
      k = 0;
      do begin
        @(negedge clk);
        if (k < MAXL) begin
          real v;
          v = $countones(obs) + $countones(obs ^ obs_prev);
          sum[g][k] += v;
          sq[g][k]  += v * v;
        end
        k++;
      end while (!rsp_valid && k < 40);
      lat = k;
      begin
        word_t plain;
        plain = (o == OP_B2A) ? (rd_s0 - rev(rd_s1)) : (rd_s0 ^ rev(rd_s1));
        psum[g] += $countones(plain);
        psq[g]  += $countones(plain) * $countones(plain);
      end
      @(negedge clk);
      req_valid = 1'b0;
      repeat (2) @(negedge clk);
      cnt[g]++;
    end
    tmax = 0.0;
    for (int j = 0; j < lat && j < MAXL; j++) begin
      t = welch(sum[0][j], sq[0][j], sum[1][j], sq[1][j], cnt[0], cnt[1]);
      if (t < 0.0) t = -t;
      if (t > tmax) tmax = t;
    end
    tp = welch(psum[0], psq[0], psum[1], psq[1], cnt[0], cnt[1]);
    if (tp < 0.0) tp = -tp;
    $display("%s: %0d + %0d requests, %0d cycles, max |t| registers %f, |t| recombined result %f",
             o.name(), cnt[0], cnt[1], lat, tmax, tp);
    check(tmax < 4.5, $sformatf("%s: no first-order dependency in the registers", o.name()));
    check(tp > 4.5, $sformatf("%s: control statistic detects the recombined result", o.name()));
  endtask

  always @(posedge clk) obs_prev <= obs;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    seed = {$urandom, $urandom, $urandom, $urandom};
    seed_load = 1'b1;
    @(negedge clk);
    seed_load = 1'b0;
    campaign(OP_AND,    32'hFFFF_FF0F, 32'hF0FF_FFFF);
    campaign(OP_OR,     32'h0000_00F0, 32'h0F00_0000);
    campaign(OP_XOR,    32'hFFFF_FF0F, 32'h0000_0000);
    campaign(OP_NOT,    32'h0000_00F0, 32'h0);
    campaign(OP_ADD,    32'hFFFF_FF0F, 32'hF0FF_FFFF);
    campaign(OP_SUB,    32'hFFFF_FF0F, 32'h0F00_0000);
    campaign(OP_SLL,    32'hFFFF_FF0F, 32'h0);
    campaign(OP_SRL,    32'hFFFF_FF0F, 32'h0);
    campaign(OP_ROR,    32'hFFFF_FF0F, 32'h0);
    campaign(OP_B2A,    32'hFFFF_FF0F, 32'h0);
    campaign(OP_MASK,   32'hFFFF_FF0F, 32'h0);
    campaign(OP_REMASK, 32'hFFFF_FF0F, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
