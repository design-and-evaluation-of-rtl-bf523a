// keccak_pkg -- one round of the Keccak-f[1600] permutation (FIPS 202), the core of SHA-3.
//
// The state is 25 lanes of 64 bits, lane (x, y) at index x + 5*y. Round constants and rho
// offsets are derived from their definitions (the degree-8 LFSR x^8+x^6+x^5+x^4+1 and the
// (t+1)(t+2)/2 walk over the lanes) rather than listed, so nothing here is a typed-in table.
package keccak_pkg;

  typedef logic [24:0][63:0] kstate_t;
  localparam int ROUNDS = 24;

  function automatic logic [63:0] rotl64(input logic [63:0] v, input int n);
    int k = n % 64;
    return (k == 0) ? v : ((v << k) | (v >> (64 - k)));
  endfunction

  // rc(t): output bit t of the LFSR of FIPS 202, Algorithm 5
  function automatic logic rc_bit(input int t);
    logic [8:0] r = 9'h001;
    if (t % 255 == 0) return 1'b1;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[7:0], 1'b0};
      r[0] = r[0] ^ r[8];
      r[4] = r[4] ^ r[8];
      r[5] = r[5] ^ r[8];
      r[6] = r[6] ^ r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic logic [63:0] round_const(input int ir);
    logic [63:0] c = '0;
    for (int j = 0; j <= 6; j++) c[(1 << j) - 1] = rc_bit(j + 7*ir);
    return c;
  endfunction

  typedef logic [ROUNDS-1:0][63:0] rc_table_t;
  function automatic rc_table_t gen_rc();
    rc_table_t t;
    for (int i = 0; i < ROUNDS; i++) t[i] = round_const(i);
    return t;
  endfunction
  localparam rc_table_t RC = gen_rc();

  typedef int rho_table_t [25];
  function automatic rho_table_t gen_rho();
    rho_table_t t;
    int x = 1, y = 0, nx;
    t[0] = 0;
    for (int s = 0; s < 24; s++) begin
      t[x + 5*y] = ((s + 1) * (s + 2) / 2) % 64;
      nx = y;
      y  = (2*x + 3*y) % 5;
      x  = nx;
    end
    return t;
  endfunction
  localparam rho_table_t RHO = gen_rho();

  function automatic kstate_t keccak_round(input kstate_t a, input logic [63:0] rc);
    logic [4:0][63:0] c, d;
    kstate_t b, r;
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl64(c[(x+1)%5], 1);
    // rho and pi: B[y, 2x+3y] = rot(A[x,y] ^ D[x], rho[x,y])
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl64(a[x + 5*y] ^ d[x], RHO[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        r[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    r[0] = r[0] ^ rc;
    return r;
  endfunction

endpackage
