// keccak_round: one round of Keccak-f[1600], purely combinational.
//
// The five step mappings are applied in order to the 25-lane state:
//   theta: every lane is XORed with the parities of its two neighbouring
//          columns (the right one rotated by 1),
//   rho:   every lane is rotated by its fixed offset (keccak_pkg::RHO),
//   pi:    lane (x, y) moves to position (y, 2x + 3y mod 5),
//   chi:   lane (x, y) ^= ~lane (x+1, y) & lane (x+2, y) within each row,
//   iota:  lane (0, 0) is XORed with the round constant rc_i.
// The whole round is one level of logic between two register stages, so the
// permutation takes one clock cycle per round, as in the design described.
//
// Interface: state_i / state_o are keccak_pkg::state_t (lane x + 5*y at
// index x + 5*y); rc_i is the round constant selected by the caller.
module keccak_round
  import keccak_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc_i,
  output state_t state_o
);

  lane_t  c [5];   // column parities
  lane_t  d [5];   // theta correction per column
  state_t a_th;    // after theta
  state_t b;       // after rho and pi
  state_t a_chi;   // after chi

  always_comb begin
    for (int x = 0; x < 5; x++) begin
      c[x] = state_i[x] ^ state_i[x + 5] ^ state_i[x + 10] ^ state_i[x + 15] ^ state_i[x + 20];
    end
    for (int x = 0; x < 5; x++) begin
      d[x] = c[(x + 4) % 5] ^ rol64(c[(x + 1) % 5], 1);
    end
    for (int i = 0; i < int'(LANES); i++) begin
      a_th[i] = state_i[i] ^ d[i % 5];
    end
    // rho and pi: B[y, 2x+3y] = rol(A[x, y], RHO[x, y])
    for (int x = 0; x < 5; x++) begin
      for (int y = 0; y < 5; y++) begin
        b[y + 5 * ((2 * x + 3 * y) % 5)] = rol64(a_th[x + 5 * y], RHO[x + 5 * y]);
      end
    end
    for (int x = 0; x < 5; x++) begin
      for (int y = 0; y < 5; y++) begin
        a_chi[x + 5 * y] = b[x + 5 * y] ^ (~b[(x + 1) % 5 + 5 * y] & b[(x + 2) % 5 + 5 * y]);
      end
    end
    state_o    = a_chi;
    state_o[0] = a_chi[0] ^ rc_i;
  end

endmodule
