// tb_bool_arith: checks the BoolArith wrapper (BoolBitwise preprocessing
// feeding the BoolAdder) with fresh masks every cycle. For random sharings
// it runs additions and subtractions: bw_en is raised with the operands,
// add_start is pulsed in the next cycle, and sum_done must come 12 cycles
// after the request with the right sum. The bitwise outputs are checked in
// the first cycle as well.
module tb_bool_arith;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, bw_en = 1'b0, or_sel = 1'b0, sub = 1'b0;
  logic add_start = 1'b0, bw_vld, sum_done, add_busy;
  share_t a, b, xor_q, not_q, andor_q, sum;
  masks_t z;
  int checks = 0, failures = 0;

  bool_arith dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) z = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input word_t x, input word_t y, input bit s);
    int n;
    word_t expv;
    @(negedge clk);
    a.s0 = $urandom; a.s1 = x ^ a.s0;
    b.s0 = $urandom; b.s1 = y ^ b.s0;
    sub = s; bw_en = 1'b1;
    @(negedge clk);
    check(bw_vld, "bitwise valid");
    check((xor_q.s0 ^ xor_q.s1) == (x ^ (s ? ~y : y)), "propagate");
    check((andor_q.s0 ^ andor_q.s1) == (x & (s ? ~y : y)), "generate");
    add_start = 1'b1;
    @(negedge clk);
    add_start = 1'b0;
    n = 2;
    while (!sum_done && n < 40) begin @(negedge clk); n++; end
    expv = s ? (x - y) : (x + y);
    check(n == LAT_ADD - 1, $sformatf("sum after %0d cycles", n));
    check((sum.s0 ^ sum.s1) == expv, $sformatf("%h %s %h", x, s ? "-" : "+", y));
    bw_en = 1'b0; sub = 1'b0;
  endtask

  initial begin
    a = '0; b = '0;
    @(negedge clk); rst_n = 1'b1;
    run(32'hFFFF_FFFF, 32'h1, 1'b0);
    run(32'h0, 32'h1, 1'b1);
    run(32'hDEAD_BEEF, 32'hDEAD_BEEF, 1'b1);
    for (int i = 0; i < 150; i++) run($urandom, $urandom, i[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
