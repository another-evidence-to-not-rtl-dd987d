// tb_dom_indep: checks the DOM-indep AND with post-compression register in
// both variants (plain, and with the extra XOR input). After cap_tp the
// compression of the cross-product register must recombine to a & b (^ c)
// while the pc register is empty; after cap_pc the pc register must hold
// the product and the cross-product register must be empty (alternate
// clearing); without commands both hold; clear empties both.
module tb_dom_indep;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, cap_tp = 1'b0, cap_pc = 1'b0;
  logic [W-1:0] a0, a1, b0, b1, c0, c1, r;
  logic [W-1:0] q0, q1, t0, t1, xq0, xq1, xt0, xt1;
  int checks = 0, failures = 0;

  dom_indep #(.W(W)) dut (
    .clk, .rst_n, .clear, .cap_tp, .cap_pc, .a0, .a1, .b0, .b1, .c0, .c1, .r,
    .q0, .q1, .q_tp0(t0), .q_tp1(t1));
  dom_indep #(.W(W), .XOR_C(1'b1)) dutx (
    .clk, .rst_n, .clear, .cap_tp, .cap_pc, .a0, .a1, .b0, .b1, .c0, .c1, .r,
    .q0(xq0), .q1(xq1), .q_tp0(xt0), .q_tp1(xt1));

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
    logic [W-1:0] a, b, c;
    {a0, a1, b0, b1, c0, c1, r} = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      a0 = $urandom; a1 = a ^ a0; b0 = $urandom; b1 = b ^ b0;
      c0 = $urandom; c1 = c ^ c0; r = $urandom;
      cap_tp = 1'b1;
      @(negedge clk); cap_tp = 1'b0;
      {a0, a1, b0, b1, c0, c1, r} = {$urandom, $urandom, $urandom, $urandom,
                                     $urandom, $urandom, $urandom};
      check((t0 ^ t1) == (a & b), "tp product");
      check((xt0 ^ xt1) == ((a & b) ^ c), "tp product xor c");
      check(q0 == '0 && q1 == '0 && xq0 == '0 && xq1 == '0, "pc empty after tp");
      cap_pc = 1'b1;
      @(negedge clk); cap_pc = 1'b0;
      check((q0 ^ q1) == (a & b), "pc product");
      check((xq0 ^ xq1) == ((a & b) ^ c), "pc product xor c");
      check(t0 == '0 && t1 == '0 && xt0 == '0 && xt1 == '0, "tp empty after pc");
      @(negedge clk);
      check((q0 ^ q1) == (a & b) && (xq0 ^ xq1) == ((a & b) ^ c), "pc holds");
      if (i % 50 == 49) begin
        clear = 1'b1;
        @(negedge clk); clear = 1'b0;
        check(q0 == '0 && q1 == '0 && xq0 == '0 && xq1 == '0, "clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
