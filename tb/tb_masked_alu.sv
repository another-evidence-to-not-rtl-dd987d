// tb_masked_alu: end-to-end check of the masked ALU with fresh random masks
// every cycle. Requests of every opcode with random operands (and corner
// cases) are issued, sometimes back to back, sometimes after idle gaps.
// For each request it checks the result (Boolean sharings recombine to the
// plain result; B2A gives u0 - u1 = a), the exact latency (MASK/REMASK 1,
// logic 2, shifts 2, ADD/SUB 13, B2A 14), that the result is really shared
// (share 0 is not the plain value for most requests), that share 1 is
// bit-reversed at the ports, and that rd is zero in every cycle without
// rsp_valid (output register stage cleared between results).
module tb_masked_alu;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, req_valid = 1'b0, rsp_valid;
  alu_op_e op;
  word_t rs1_s0, rs1_s1, rs2_s0, rs2_s1, rd_s0, rd_s1;
  logic [4:0] shamt;
  masks_t z;
  int checks = 0, failures = 0;
  int n_op [12];
  int plain_share0 = 0, n_req = 0, zero_cycles = 0;

  masked_alu dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) z = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};

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
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    alu_op_e o;
    op = OP_MASK; shamt = '0;
    {rs1_s0, rs1_s1, rs2_s0, rs2_s1} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    issue(OP_ADD, 32'hFFFF_FFFF, 32'h1, 0, 1'b0);
    issue(OP_SUB, 32'h0, 32'h1, 0, 1'b0);
    issue(OP_SUB, 32'h5555_AAAA, 32'h5555_AAAA, 0, 1'b0);
    issue(OP_ROR, 32'h8000_0001, 32'h0, 1, 1'b0);
    issue(OP_B2A, 32'hFFFF_FFFF, 32'h0, 0, 1'b0);
    for (int i = 0; i < 600; i++) begin
      o = alu_op_e'(i % 12);
      issue(o, $urandom, $urandom, $urandom_range(0, 31), i[2]);
    end
    for (int k = 0; k < 12; k++) check(n_op[k] > 0, $sformatf("opcode %0d exercised", k));
    check(plain_share0 < n_req / 10, "results are shared");
    check(zero_cycles > 0, "zero cycles between results");
    $display("requests %0d, zero cycles %0d", n_req, zero_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
