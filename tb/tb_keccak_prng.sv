// tb_keccak_prng: checks the Keccak-f[800] mask generator against a
// reference permutation written independently in the testbench, using the
// published round constants and rotation offsets as literal tables (the
// design derives both from the LFSR and the lane walk). After a seed load
// the 576-bit output must match the reference state after 1, 2, ... full
// permutations; with en low the output must hold; a second seed must
// restart the sequence.
module tb_keccak_prng;
  logic clk = 1'b0, rst_n = 1'b0, seed_load = 1'b0, en = 1'b0;
  logic [127:0] seed;
  logic [575:0] rnd;
  int checks = 0, failures = 0;

  keccak_prng dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [31:0] lane_t;
  typedef lane_t st_t [5][5];   // [x][y]

  localparam lane_t RCT [22] = '{
    32'h00000001, 32'h00008082, 32'h0000808A, 32'h80008000, 32'h0000808B,
    32'h80000001, 32'h80008081, 32'h00008009, 32'h0000008A, 32'h00000088,
    32'h80008009, 32'h8000000A, 32'h8000808B, 32'h0000008B, 32'h00008089,
    32'h00008003, 32'h00008002, 32'h00000080, 32'h0000800A, 32'h8000000A,
    32'h80008081, 32'h00008080};
  // rotation offsets r[x][y] of Keccak, taken modulo 32 when used
  localparam int ROT [5][5] = '{
    '{ 0, 36,  3, 41, 18},
    '{ 1, 44, 10, 45,  2},
    '{62,  6, 43, 15, 61},
    '{28, 55, 25, 21, 56},
    '{27, 20, 39,  8, 14}};

  function automatic lane_t rl(lane_t v, int n);
    n = n % 32;
    return (n == 0) ? v : ((v << n) | (v >> (32 - n)));
  endfunction

  function automatic void perm(ref st_t s);
    lane_t c[5], d[5];
    st_t b;
    for (int r = 0; r < 22; r++) begin
      for (int x = 0; x < 5; x++) c[x] = s[x][0] ^ s[x][1] ^ s[x][2] ^ s[x][3] ^ s[x][4];
      for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rl(c[(x + 1) % 5], 1);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) s[x][y] ^= d[x];
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
        b[y][(2 * x + 3 * y) % 5] = rl(s[x][y], ROT[x][y]);
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++)
        s[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
      s[0][0] ^= RCT[r];
    end
  endfunction

  function automatic logic [575:0] out_of(st_t s);
    logic [575:0] o;
    for (int k = 0; k < 18; k++) o[32 * k +: 32] = s[k % 5][k / 5];
    return o;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    st_t ref_s;
    logic [575:0] held;
    for (int run = 0; run < 2; run++) begin
      seed = {$urandom, $urandom, $urandom, $urandom};
      if (run == 0) seed = 128'h0;   // all-zero state as one known point
      for (int x = 0; x < 5; x++) for (int y = 0; y < 5; y++) ref_s[x][y] = '0;
      for (int k = 0; k < 4; k++) ref_s[k % 5][k / 5] = seed[32 * k +: 32];
      @(negedge clk); rst_n = 1'b1; seed_load = 1'b1;
      @(negedge clk); seed_load = 1'b0;
      check(rnd == out_of(ref_s), "seed loaded");
      en = 1'b1;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        perm(ref_s);
        check(rnd == out_of(ref_s), $sformatf("run %0d permutation %0d", run, i + 1));
      end
      en = 1'b0;
      held = rnd;
      repeat (3) @(negedge clk);
      check(rnd == held, "holds with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
