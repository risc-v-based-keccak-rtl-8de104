// keccak_ref_pkg: a reference model of Keccak-f[1600] for the testbenches.
//
// It is written from the FIPS 202 definitions and shares nothing with the
// design: the round constants come from the rc(t) LFSR (x^8 + x^6 + x^5 +
// x^4 + 1), the rho offsets from the (x, y) -> (y, 2x + 3y) walk with offset
// (t+1)(t+2)/2 mod 64, and the state is kept as a 5x5 array A[x][y]. The
// flat 1600-bit view puts lane (x, y) at bits 64*(x + 5y) upwards.
package keccak_ref_pkg;

  typedef logic [63:0]   lane64_t;
  typedef logic [1599:0] flat_t;

  function automatic lane64_t rotl(lane64_t v, int n);
    n = n % 64;
    if (n == 0) return v;
    return (v << n) | (v >> (64 - n));
  endfunction

  function automatic bit rc_bit(int t);
    logic [8:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 9'b000000001;  // r[0] is the first bit, R = 10000000
    for (int i = 1; i <= t % 255; i++) begin
      // R = 0 || R ; R[0]^=R[8]; R[4]^=R[8]; R[5]^=R[8]; R[6]^=R[8]; R = Trunc8(R)
      r = {r[7:0], 1'b0};
      r[0] = r[0] ^ r[8];
      r[4] = r[4] ^ r[8];
      r[5] = r[5] ^ r[8];
      r[6] = r[6] ^ r[8];
      r[8] = 1'b0;
    end
    return r[0];
  endfunction

  function automatic lane64_t round_const(int ir);
    lane64_t rc = '0;
    for (int j = 0; j <= 6; j++) begin
      rc[(1 << j) - 1] = rc_bit(j + 7 * ir);
    end
    return rc;
  endfunction

  function automatic int rho_offset(int x0, int y0);
    int x = 1, y = 0, tmp;
    if (x0 == 0 && y0 == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (x == x0 && y == y0) return ((t + 1) * (t + 2) / 2) % 64;
      tmp = y;
      y = (2 * x + 3 * y) % 5;
      x = tmp;
    end
    return -1;
  endfunction

  function automatic flat_t keccak_f1600(flat_t s, int rounds = 24);
    lane64_t a [5][5];
    lane64_t b [5][5];
    lane64_t c [5];
    lane64_t d [5];
    flat_t   o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x][y] = s[64 * (x + 5 * y) +: 64];
    for (int ir = 0; ir < rounds; ir++) begin
      for (int x = 0; x < 5; x++) c[x] = a[x][0] ^ a[x][1] ^ a[x][2] ^ a[x][3] ^ a[x][4];
      for (int x = 0; x < 5; x++) d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          a[x][y] ^= d[x];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          b[y][(2 * x + 3 * y) % 5] = rotl(a[x][y], rho_offset(x, y));
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          a[x][y] = b[x][y] ^ (~b[(x + 1) % 5][y] & b[(x + 2) % 5][y]);
      a[0][0] ^= round_const(ir);
    end
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[64 * (x + 5 * y) +: 64] = a[x][y];
    return o;
  endfunction

  function automatic flat_t random_state();
    flat_t s;
    for (int i = 0; i < 50; i++) s[32 * i +: 32] = $urandom;
    return s;
  endfunction

endpackage
