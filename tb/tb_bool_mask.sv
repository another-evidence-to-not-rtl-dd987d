// tb_bool_mask: checks the BoolMask unit. Mask mode must give a sharing
// (x ^ z5, z5) of the plain word x, remask mode must keep the shared value
// while changing both shares by z5, and a disabled unit must output zero.
module tb_bool_mask;
  import masked_alu_pkg::*;
  logic en, remask;
  share_t a, q;
  word_t zm;
  int checks = 0, failures = 0;

  bool_mask dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t x;
    for (int i = 0; i < 500; i++) begin
      x = $urandom; zm = $urandom | 32'h1;
      en = 1'b1; remask = 1'b0;
      a.s0 = x; a.s1 = $urandom;
      #1;
      check((q.s0 ^ q.s1) == x, "mask recombines");
      check(q.s1 == zm && q.s0 != x, "mask uses z5");
      remask = 1'b1;
      a.s0 = $urandom; a.s1 = x ^ a.s0;
      #1;
      check((q.s0 ^ q.s1) == x, "remask keeps value");
      check(q.s0 == (a.s0 ^ zm) && q.s1 == (a.s1 ^ zm), "remask with z5");
      en = 1'b0;
      #1;
      check(q == '0, "disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
