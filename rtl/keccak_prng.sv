// keccak_prng: mask generator for the masked ALU, built on the Keccak-f[800]
// permutation (25 lanes of 32 bits, 22 rounds of theta, rho, pi, chi, iota).
//
// The 800-bit state is loaded from a seed (seed_load) and then, in every
// cycle in which en is high, replaced by its full permutation; all ROUNDS
// rounds are unrolled into one cycle. The first RND_BITS bits of the state
// (lanes 0..17, lane k = x + 5*y at bits [32k +: 32]) are the random output
// of the cycle; the last 224 bits are never output.
//
// Round constants and rotation offsets are not stored as tables: the round
// constants come from the Keccak LFSR x^8 + x^6 + x^5 + x^4 + 1 (bit 2^j - 1
// of constant i is LFSR output j + 7i), truncated to 32 bits, and the rho
// offsets from the walk (x, y) <- (y, 2x + 3y mod 5) starting at (1, 0) with
// offset (t + 1)(t + 2)/2 mod 32 at step t.
//
// Timing: rnd is a registered output, fresh in every cycle after a cycle
// with en high. The permutation and the 576-bit output width follow the
// description; seeding, the one-permutation-per-cycle schedule and the
// choice of which lanes are output are this design's.
module keccak_prng #(
  parameter int unsigned ROUNDS    = 22,
  parameter int unsigned RND_BITS  = 576,
  parameter int unsigned SEED_BITS = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 seed_load,
  input  logic [SEED_BITS-1:0] seed,
  input  logic                 en,
  output logic [RND_BITS-1:0]  rnd
);

  localparam int unsigned B = 800;
  typedef logic [31:0] lane_t;
  typedef lane_t state_t [25];

  function automatic lane_t rotl(input lane_t v, input int unsigned n);
    int unsigned k;
    k = n % 32;
    if (k == 0) return v;
    return (v << k) | (v >> (32 - k));
  endfunction

  typedef lane_t rc_table_t [ROUNDS];
  typedef int unsigned rho_table_t [25];

  // Round constants 0 .. ROUNDS-1, from the Keccak LFSR.
  function automatic rc_table_t gen_rc();
    rc_table_t   rc;
    lane_t       w;
    logic [7:0]  r;
    r = 8'h01;
    for (int unsigned i = 0; i < ROUNDS; i++) begin
      w = '0;
      for (int unsigned j = 0; j < 7; j++) begin
        // bit positions 0,1,3,7,15,31 for j = 0..5; j = 6 (bit 63) drops out
        if (j < 6) w[(1 << j) - 1] = r[0];
        r = r[7] ? ((r << 1) ^ 8'h71) : (r << 1);
      end
      rc[i] = w;
    end
    return rc;
  endfunction

  // Rho offsets of lanes x + 5y.
  function automatic rho_table_t gen_rho();
    rho_table_t  ro;
    int unsigned x, y, nx;
    ro[0] = 0;
    x = 1; y = 0;
    for (int unsigned t = 0; t < 24; t++) begin
      ro[x + 5 * y] = ((t + 1) * (t + 2) / 2) % 32;
      nx = y;
      y  = (2 * x + 3 * y) % 5;
      x  = nx;
    end
    return ro;
  endfunction

  localparam rc_table_t  RC  = gen_rc();
  localparam rho_table_t RHO = gen_rho();

  function automatic state_t keccak_round(input state_t a, input lane_t rc);
    lane_t  c [5];
    lane_t  d [5];
    state_t bb, o;
    for (int x = 0; x < 5; x++)
      c[x] = a[x] ^ a[x + 5] ^ a[x + 10] ^ a[x + 15] ^ a[x + 20];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        bb[y + 5 * ((2 * x + 3 * y) % 5)] = rotl(a[x + 5 * y] ^ d[x],
                                                 RHO[x + 5 * y]);
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x + 5 * y] = bb[x + 5 * y] ^
                       (~bb[(x + 1) % 5 + 5 * y] & bb[(x + 2) % 5 + 5 * y]);
    o[0] = o[0] ^ rc;
    return o;
  endfunction

  logic [B-1:0] st_q, st_next;

  // ROUNDS rounds unrolled into one cycle, one generate block per round.
  for (genvar gi = 0; gi < ROUNDS; gi++) begin : g_round
    logic [B-1:0] si, so;
    if (gi == 0) begin : g_first
      assign si = st_q;
    end else begin : g_next
      assign si = g_round[gi-1].so;
    end
    always_comb begin
      state_t a;
      for (int k = 0; k < 25; k++) a[k] = si[32 * k +: 32];
      a = keccak_round(a, RC[gi]);
      for (int k = 0; k < 25; k++) so[32 * k +: 32] = a[k];
    end
  end

  assign st_next = g_round[ROUNDS-1].so;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         st_q <= '0;
    else if (seed_load) st_q <= {{(B - SEED_BITS){1'b0}}, seed};
    else if (en)        st_q <= st_next;
  end

  assign rnd = st_q[RND_BITS-1:0];

endmodule
