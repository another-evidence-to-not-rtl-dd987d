// tb_masked_alu_system: end-to-end check of the whole design at its default
// parameters: the masked ALU fed by the Keccak-f[800] mask generator. The
// generator is seeded after reset and reseeded half way through. Requests of every opcode with random operands (and corner
// cases) are issued, sometimes back to back, sometimes after idle gaps.
// For each request it checks the result (Boolean sharings recombine to the
// plain result; B2A gives u0 - u1 = a), the exact latency (MASK/REMASK 1,
// logic 2, shifts 2, ADD/SUB 13, B2A 14), that the result is really shared
// (share 0 is not the plain value for most requests), that share 1 is
// bit-reversed at the ports, and that rd is zero in every cycle without
// rsp_valid (output register stage cleared between results).
module tb_masked_alu_system;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, req_valid = 1'b0, rsp_valid;
  alu_op_e op;
  word_t rs1_s0, rs1_s1, rs2_s0, rs2_s1, rd_s0, rd_s1;
  logic [4:0] shamt;
  logic seed_load = 1'b0;
  logic [127:0] seed = '0;
  masks_t z_prev;
  int mask_changes = 0, mask_cycles = 0, stall_cycles = 0, b2b = 0, gaps = 0;
  int reseeds = 0, carry_chain = 0;
  int checks = 0, failures = 0;
  int n_op [12];
  int plain_share0 = 0, n_req = 0, zero_cycles = 0;

  masked_alu_system dut (.*);

  always #5 clk = ~clk;

  // The masks must be fresh in every cycle.
  always @(negedge clk) if (rst_n) begin
    mask_cycles++;
    if (dut.u_alu.z != z_prev) mask_changes++;
    z_prev = dut.u_alu.z;
    if (req_valid && !rsp_valid) stall_cycles++;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Between results the output must be all zero.
  always @(negedge clk) if (rst_n && !rsp_valid) begin
    if (rd_s0 == '0 && rd_s1 == '0) zero_cycles++;
    else begin failures++; $display("FAIL rd not zero without rsp_valid"); end
  end

  function automatic word_t rev(word_t w);
    word_t r;
    for (int i = 0; i < 32; i++) r[i] = w[31 - i];
    return r;
  endfunction

  function automatic word_t expect_of(alu_op_e o, word_t x, word_t y, int n);
    logic [63:0] dbl;
    case (o)
      OP_MASK, OP_REMASK, OP_B2A: return x;
      OP_NOT: return ~x;
      OP_AND: return x & y;
      OP_OR:  return x | y;
      OP_XOR: return x ^ y;
      OP_ADD: return x + y;
      OP_SUB: return x - y;
      OP_SLL: return x << n;
      OP_SRL: return x >> n;
      default: begin dbl = {x, x}; return dbl[n +: 32]; end
    endcase
  endfunction

  function automatic int lat_of(alu_op_e o);
    case (o)
      OP_MASK, OP_REMASK:            return LAT_MASK;
      OP_NOT, OP_AND, OP_OR, OP_XOR: return LAT_BITWISE;
      OP_SLL, OP_SRL, OP_ROR:        return LAT_SHIFT;
      OP_ADD, OP_SUB:                return LAT_ADD;
      default:                       return LAT_B2A;
    endcase
  endfunction

  // Issue one request at the current negedge and wait for its result.
  task automatic issue(input alu_op_e o, input word_t x, input word_t y,
                       input int n, input bit keep_valid);
    int cyc;
    word_t got, expv;
    op = o; shamt = 5'(n);
    if (o == OP_MASK) begin
      rs1_s0 = x; rs1_s1 = $urandom;
    end else begin
      rs1_s0 = $urandom; rs1_s1 = rev(x ^ rs1_s0);
    end
    rs2_s0 = $urandom; rs2_s1 = rev(y ^ rs2_s0);
    req_valid = 1'b1;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!rsp_valid && cyc < 40);
    expv = expect_of(o, x, y, n);
    if (o == OP_B2A) got = rd_s0 - rev(rd_s1);
    else             got = rd_s0 ^ rev(rd_s1);
    check(got == expv, $sformatf("op %s x=%h y=%h n=%0d: got %h expected %h",
                                 o.name(), x, y, n, got, expv));
    check(cyc == lat_of(o), $sformatf("op %s latency %0d", o.name(), cyc));
    if (rd_s0 == expv) plain_share0++;
    n_req++;
    n_op[o]++;
    // the request stays up in the result cycle; change it after that edge
    @(negedge clk);
    if (!keep_valid) begin
      req_valid = 1'b0;
      gaps++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end else b2b++;
  endtask

  initial begin
    alu_op_e o;
    op = OP_MASK; shamt = '0;
    {rs1_s0, rs1_s1, rs2_s0, rs2_s1} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    seed = {$urandom, $urandom, $urandom, $urandom};
    seed_load = 1'b1; reseeds++;
    @(negedge clk);
    seed_load = 1'b0;
    issue(OP_ADD, 32'hFFFF_FFFF, 32'h1, 0, 1'b0); carry_chain++;
    issue(OP_SUB, 32'h0, 32'h1, 0, 1'b0); carry_chain++;
    issue(OP_SUB, 32'h5555_AAAA, 32'h5555_AAAA, 0, 1'b0); carry_chain++;
    issue(OP_ROR, 32'h8000_0001, 32'h0, 1, 1'b0);
    issue(OP_B2A, 32'hFFFF_FFFF, 32'h0, 0, 1'b0);
    for (int i = 0; i < 600; i++) begin
      o = alu_op_e'(i % 12);
      issue(o, $urandom, $urandom, $urandom_range(0, 31), i[2]);
      if (i == 299) begin  // a request without back-to-back follow-up
        seed = {$urandom, $urandom, $urandom, $urandom};
        seed_load = 1'b1; reseeds++;
        @(negedge clk);
        seed_load = 1'b0;
      end
    end
    for (int k = 0; k < 12; k++) check(n_op[k] > 0, $sformatf("opcode %0d exercised", k));
    check(plain_share0 < n_req / 10, "results are shared");
    check(zero_cycles > 0, "zero cycles between results");
    check(mask_changes > mask_cycles - 5, "fresh masks every cycle");
    check(stall_cycles > 0, "pipeline stalled on the ALU");
    check(b2b > 0, "back-to-back requests");
    check(gaps > 0, "requests after idle gaps");
    check(reseeds == 2, "generator reseeded");
    check(carry_chain == 3, "full-length carry chains");
    $display("requests %0d, zero cycles %0d, stall cycles %0d, back-to-back %0d, gaps %0d",
             n_req, zero_cycles, stall_cycles, b2b, gaps);
    $display("mask changes %0d of %0d cycles, reseeds %0d", mask_changes, mask_cycles, reseeds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
