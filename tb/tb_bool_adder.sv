// tb_bool_adder: checks the iterative masked Kogge-Stone adder. The
// testbench plays the part of the preprocessing: every cycle it supplies a
// fresh sharing of p = a ^ b and g = a & b (for subtraction with b
// inverted and cin = 1). It checks that done comes exactly 11 cycles after
// start, that the sum recombines to a + b (or a - b), that the one-hot
// counter visits all six states with the shifts 1, 2, 4, 8, 8, 8, that the
// output is zero outside the done cycle, and includes carry-chain corner
// cases (all-ones plus one, zero minus one).
module tb_bool_adder;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, cin = 1'b0, done, busy;
  share_t p, g, sum;
  word_t zp, zg;
  word_t pa, pb;
  int checks = 0, failures = 0;

  bool_adder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Fresh sharings of the preprocessed operands every cycle.
  always @(negedge clk) begin
    word_t bx, m;
    bx = cin ? ~pb : pb;
    m = $urandom; p.s0 = m; p.s1 = (pa ^ bx) ^ m;
    m = $urandom; g.s0 = m; g.s1 = (pa & bx) ^ m;
    zp = $urandom; zg = $urandom;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input word_t x, input word_t y, input bit s);
    int n;
    logic [5:0] seen;
    word_t expv;
    pa = x; pb = y; cin = s;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 1; seen = '0;
    while (!done && n < 40) begin
      check(sum == '0, "sum zero before done");
      seen |= dut.cnt_q;
      @(negedge clk);
      n++;
    end
    expv = s ? (x - y) : (x + y);
    check(n == LAT_ADD - 2, $sformatf("done %0d cycles after start", n));
    check(seen == 6'b111111, "counter visited all six iterations");
    check((sum.s0 ^ sum.s1) == expv,
          $sformatf("%h %s %h = %h, got %h", x, s ? "-" : "+", y, expv, sum.s0 ^ sum.s1));
    @(negedge clk);
    check(!busy && sum == '0, "idle after done");
  endtask

  initial begin
    pa = '0; pb = '0;
    @(negedge clk); rst_n = 1'b1;
    run(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    run(32'h0000_0000, 32'h0000_0001, 1'b1);
    run(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    run(32'h8000_0000, 32'h8000_0000, 1'b0);
    run(32'h1234_5678, 32'h1234_5678, 1'b1);
    for (int i = 0; i < 200; i++) run($urandom, $urandom, i[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
