// tb_bool_shift: checks the BoolShift unit on random sharings and all
// shift amounts: one cycle after en, vld must be set and the recombined
// result must equal the plain shift or rotation; each share must have been
// moved on its own (share 0 of the result is the moved share 0). With en
// low the register clears.
module tb_bool_shift;
  import masked_alu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, vld;
  shift_op_e op;
  logic [4:0] shamt;
  share_t a, q;
  int checks = 0, failures = 0;

  bool_shift dut (.*);

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

  function automatic word_t ref_move(word_t w, shift_op_e o, int n);
    logic [63:0] dbl;
    case (o)
      SH_SLL: return w << n;
      SH_SRL: return w >> n;
      default: begin dbl = {w, w}; return dbl[n +: 32]; end
    endcase
  endfunction

  initial begin
    word_t x;
    a = '0; op = SH_SLL; shamt = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3 * 32 * 3; i++) begin
      x = $urandom;
      a.s0 = $urandom; a.s1 = x ^ a.s0;
      op = shift_op_e'(i % 3);
      shamt = 5'((i / 3) % 32);
      en = 1'b1;
      @(negedge clk);
      check(vld, "vld");
      check((q.s0 ^ q.s1) == ref_move(x, op, int'(shamt)),
            $sformatf("op %0d by %0d", op, shamt));
      check(q.s0 == ref_move(a.s0, op, int'(shamt)), "share 0 moved alone");
      if (i % 10 == 9) begin
        en = 1'b0;
        @(negedge clk);
        check(!vld && q == '0, "cleared");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
