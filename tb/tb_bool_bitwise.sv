// tb_bool_bitwise: checks the BoolBitwise unit. Random operand sharings are
// held while masks change every cycle; one cycle after en rises vld must be
// set and XOR, NOT and AND (or OR with or_sel) must recombine to the plain
// results. The XOR result must be remasked (its share 0 differs from
// a0 ^ b0 whenever z5 is non-zero). With en low everything clears.
module tb_bool_bitwise;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, or_sel = 1'b0, vld;
  share_t a, b, xor_q, not_q, andor_q;
  masks_t z;
  int checks = 0, failures = 0;

  bool_bitwise dut (.*);

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

  function automatic masks_t rnd_masks();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    word_t pa, pb;
    a = '0; b = '0; z = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      pa = $urandom; pb = $urandom;
      a.s0 = $urandom; a.s1 = pa ^ a.s0;
      b.s0 = $urandom; b.s1 = pb ^ b.s0;
      or_sel = i[0];
      en = 1'b1;
      z = rnd_masks();
      @(negedge clk);
      check(vld, "vld one cycle after en");
      check((xor_q.s0 ^ xor_q.s1) == (pa ^ pb), "xor");
      check(xor_q.s0 == (a.s0 ^ b.s0 ^ z.z5), "xor remasked with z5");
      check((not_q.s0 ^ not_q.s1) == ~pa, "not");
      z = rnd_masks();
      check((andor_q.s0 ^ andor_q.s1) == (or_sel ? (pa | pb) : (pa & pb)),
            $sformatf("%s", or_sel ? "or" : "and"));
      @(negedge clk);
      check((andor_q.s0 ^ andor_q.s1) == (or_sel ? (pa | pb) : (pa & pb)),
            "and/or second cycle");
      if (i % 40 == 39) begin
        en = 1'b0;
        @(negedge clk);
        check(!vld && xor_q == '0 && not_q == '0 && andor_q == '0, "cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
