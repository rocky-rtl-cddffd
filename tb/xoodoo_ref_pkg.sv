// xoodoo_ref_pkg: bit-level reference model of Xoodoo for the testbenches.
//
// The model works on the flat 384-bit state, bit (x, y, z) at position
// z + 32*(x + 4*y), one bit at a time, with every index reduced modulo the
// state dimensions. It is written independently of the RTL (which works on
// whole lanes) so that the two can be compared.
package xoodoo_ref_pkg;

  typedef logic [383:0] flat_t;
  typedef logic [31:0]  word_t;

  // Xoodoo[12] round constants, rounds -11 .. 0
  localparam word_t REF_RC [12] = '{
    32'h58, 32'h38, 32'h3C0, 32'hD0, 32'h120, 32'h14,
    32'h60, 32'h2C, 32'h380, 32'hF0, 32'h1A0, 32'h12
  };

  function automatic int idx(int x, int y, int z);
    return ((z % 32 + 32) % 32) + 32 * (((x % 4 + 4) % 4) + 4 * (((y % 3) + 3) % 3));
  endfunction

  function automatic flat_t ref_round(flat_t a, word_t rc);
    flat_t b;
    logic p [4][32];
    // theta
    for (int x = 0; x < 4; x++)
      for (int z = 0; z < 32; z++)
        p[x][z] = a[idx(x,0,z)] ^ a[idx(x,1,z)] ^ a[idx(x,2,z)];
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 32; z++)
          b[idx(x,y,z)] = a[idx(x,y,z)] ^ p[(x+3)%4][(z+27)%32] ^ p[(x+3)%4][(z+18)%32];
    a = b;
    // rho_west: plane 1 moves by (1,0), plane 2 by (0,11)
    for (int x = 0; x < 4; x++)
      for (int z = 0; z < 32; z++) begin
        b[idx(x,1,z)] = a[idx(x-1,1,z)];
        b[idx(x,2,z)] = a[idx(x,2,z-11)];
      end
    a = b;
    // iota
    for (int z = 0; z < 32; z++) a[idx(0,0,z)] ^= rc[z];
    // chi
    for (int y = 0; y < 3; y++)
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 32; z++)
          b[idx(x,y,z)] = a[idx(x,y,z)] ^ (~a[idx(x,y+1,z)] & a[idx(x,y+2,z)]);
    a = b;
    // rho_east: plane 1 moves by (0,1), plane 2 by (2,8)
    for (int x = 0; x < 4; x++)
      for (int z = 0; z < 32; z++) begin
        b[idx(x,1,z)] = a[idx(x,1,z-1)];
        b[idx(x,2,z)] = a[idx(x-2,2,z-8)];
      end
    return b;
  endfunction

  function automatic flat_t ref_perm(flat_t a);
    for (int r = 0; r < 12; r++) a = ref_round(a, REF_RC[r]);
    return a;
  endfunction

  // rotate a word / every lane of a state by t positions towards higher z
  function automatic word_t ref_rotw(word_t w, int t);
    word_t r;
    for (int z = 0; z < 32; z++) r[((z + t) % 32 + 32) % 32] = w[z];
    return r;
  endfunction

  function automatic flat_t ref_rots(flat_t a, int t);
    flat_t r;
    for (int l = 0; l < 12; l++) r[32*l +: 32] = ref_rotw(a[32*l +: 32], t);
    return r;
  endfunction

  function automatic flat_t rand_state();
    flat_t s;
    for (int l = 0; l < 12; l++) s[32*l +: 32] = $urandom();
    return s;
  endfunction

endpackage
