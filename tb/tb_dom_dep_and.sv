// tb_dom_dep_and: self-checking test of the first-order DOM-dep AND.
// Random (also fully dependent, b = a) operand sharings are held for two
// cycles while the masks change every cycle; one cycle after en the output
// sharing must recombine to a & b, and the output shares must differ from
// the plain product (they carry the refresh mask). With en low the
// registers must clear and the output must be all zero.
module tb_dom_dep_and;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] a0, a1, b0, b1, zb0, zb1, zr, q0, q1;
  int checks = 0, failures = 0;

  dom_dep_and #(.W(W)) dut (.*);

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
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [W-1:0] a, b;
    int differs = 0;
    {a0, a1, b0, b1, zb0, zb1, zr} = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      a = $urandom; b = (i % 4 == 3) ? a : $urandom;
      a0 = $urandom; a1 = a ^ a0;
      b0 = $urandom; b1 = b ^ b0;
      zb0 = $urandom; zb1 = $urandom; zr = $urandom;
      en = 1'b1;
      @(posedge clk); #1;
      zb0 = $urandom; zb1 = $urandom; zr = $urandom;
      check((q0 ^ q1) == (a & b), $sformatf("a&b a=%h b=%h got %h", a, b, q0 ^ q1));
      if (q0 != (a & b)) differs++;
      @(posedge clk); #1;
      check((q0 ^ q1) == (a & b), "a&b, second cycle");
    end
    check(differs > 350, "output share 0 is masked");
    en = 1'b0;
    @(posedge clk); #1;
    check(q0 == '0 && q1 == '0, "cleared when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
