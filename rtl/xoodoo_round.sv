// xoodoo_round: one combinational round of the Xoodoo permutation.
//
// The steps follow the Xoodoo definition in the order
// theta -> rho_west -> iota -> chi -> rho_east:
//   theta    : P = A0^A1^A2, E = P<<<(1,5) ^ P<<<(1,14), every plane ^= E
//   rho_west : A1 <<<= (1,0), A2 <<<= (0,11)
//   iota     : lane (0,0) ^= rc
//   chi      : Ay ^= ~A(y+1) & A(y+2)
//   rho_east : A1 <<<= (0,1), A2 <<<= (2,8)
// (t,v) moves a bit t positions along x and v positions along z. The step
// definitions and their order follow the ROCKY publication's description of
// Xoodoo, which agrees with the Xoodoo specification.
//
// Every step except iota is invariant under a rotation of all lanes along z.
// ROCKY relies on this: a state rotated by tau goes through the same round
// logic, and only rc has to be given rotated by tau as well (xoodoo_rc_mem).
//
// Interface: state_i/state_o are xoodoo_pkg::state_t (state[y][x]); rc is
// the (possibly rotated) round constant. Purely combinational, no clock.
module xoodoo_round
  import xoodoo_pkg::*;
(
  input  state_t state_i,
  input  lane_t  rc,
  output state_t state_o
);

  plane_t p, e;
  state_t a_theta, a_west, a_iota, a_chi;

  always_comb begin
    // theta: column parity mixed into every plane
    p = state_i[0] ^ state_i[1] ^ state_i[2];
    e = plane_shift(p, 1, 5) ^ plane_shift(p, 1, 14);
    for (int y = 0; y < NY; y++) a_theta[y] = state_i[y] ^ e;

    // rho_west
    a_west[0] = a_theta[0];
    a_west[1] = plane_shift(a_theta[1], 1, 0);
    a_west[2] = plane_shift(a_theta[2], 0, 11);

    // iota
    a_iota       = a_west;
    a_iota[0][0] = a_west[0][0] ^ rc;

    // chi: the only non-linear step
    for (int y = 0; y < NY; y++)
      a_chi[y] = a_iota[y] ^ (~a_iota[(y + 1) % NY] & a_iota[(y + 2) % NY]);

    // rho_east
    state_o[0] = a_chi[0];
    state_o[1] = plane_shift(a_chi[1], 0, 1);
    state_o[2] = plane_shift(a_chi[2], 2, 8);
  end

endmodule
