// tb_bool2arith: checks the Boolean-to-arithmetic back end. The sampled
// masks must follow z2/z3 while zs_load is high and hold while it is low.
// The testbench stands in for the adder: it presents a sharing of
// a + (z2s ^ z3s) and pulses capture; one cycle later vld must be set and
// u0 - u1 must equal a, with u1 = z2s ^ z3s. Outside a capture the output
// registers must stay cleared.
module tb_bool2arith;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, zs_load = 1'b1, capture = 1'b0, vld;
  word_t z2, z3;
  share_t zs, s, u;
  int checks = 0, failures = 0;

  bool2arith dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    word_t x, m, h2, h3, sum;
    s = '0; z2 = '0; z3 = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      zs_load = 1'b1;
      h2 = $urandom; h3 = $urandom;
      z2 = h2; z3 = h3;
      @(negedge clk);
      check(zs.s0 == h2 && zs.s1 == h3, "sampled masks");
      zs_load = 1'b0;
      x = $urandom;
      for (int k = 0; k < 3; k++) begin
        z2 = $urandom; z3 = $urandom;
        @(negedge clk);
        check(zs.s0 == h2 && zs.s1 == h3, "sampled masks hold");
        check(!vld && u.s0 == '0, "output registers cleared");
      end
      sum = x + (h2 ^ h3);
      m = $urandom; s.s0 = m; s.s1 = sum ^ m;
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      s = '0;
      check(vld, "vld after capture");
      check(u.s0 - u.s1 == x, $sformatf("u0 - u1 = %h, expected %h", u.s0 - u.s1, x));
      check(u.s1 == (h2 ^ h3), "u1 is the arithmetic mask");
      @(negedge clk);
      check(!vld && u.s0 == '0, "cleared after one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
