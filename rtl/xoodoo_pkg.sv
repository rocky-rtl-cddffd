// xoodoo_pkg: types, sizes and round constants shared by the Xoodoo and
// ROCKY modules.
//
// The Xoodoo state is 3 planes (y = 0..2) of 4 lanes (x = 0..3) of 32 bits
// (z = 0..31), 384 bits in all. Bit (x, y, z) sits at flat position
// i = z + 32*(x + 4*y), so lane number x + 4*y occupies bits [32*lane +: 32].
// Lanes travel through the design in that order, lane 0 first.
//
// The round constants are those of Xoodoo[12] (rounds -11 .. 0), taken from
// the published Xoodoo specification; index 0 of XOODOO_RC is round -11.
package xoodoo_pkg;

  localparam int unsigned LANE_W   = 32;              // lane width, z size
  localparam int unsigned SHIFT_W  = 5;               // log2(LANE_W), bits of tau
  localparam int unsigned NX       = 4;               // lanes per plane
  localparam int unsigned NY       = 3;               // planes
  localparam int unsigned NLANES   = NX * NY;         // 12 lanes
  localparam int unsigned STATE_W  = NLANES * LANE_W; // 384 bits
  localparam int unsigned NROUNDS  = 12;              // Xoodoo[12]
  localparam int unsigned LANE_IDX_W = 4;             // bits to number 12 lanes

  typedef logic [LANE_W-1:0]  lane_t;
  typedef logic [SHIFT_W-1:0] shift_t;
  typedef lane_t [NX-1:0]     plane_t;   // plane_t[x]
  typedef plane_t [NY-1:0]    state_t;   // state_t[y][x], flat bit z+32(x+4y)

  localparam lane_t XOODOO_RC [NROUNDS] = '{
    32'h0000_0058, 32'h0000_0038, 32'h0000_03C0, 32'h0000_00D0,
    32'h0000_0120, 32'h0000_0014, 32'h0000_0060, 32'h0000_002C,
    32'h0000_0380, 32'h0000_00F0, 32'h0000_01A0, 32'h0000_0012
  };

  // Cyclic rotation of a lane towards higher z.
  function automatic lane_t rotl(lane_t v, int unsigned n);
    int unsigned k;
    k = n % LANE_W;
    return (k == 0) ? v : lane_t'((v << k) | (v >> (LANE_W - k)));
  endfunction

  // Plane shift P <<< (t, v): bit (x, z) moves to (x + t, z + v).
  function automatic plane_t plane_shift(plane_t p, int unsigned t, int unsigned v);
    plane_t r;
    for (int unsigned x = 0; x < NX; x++)
      r[(x + t) % NX] = rotl(p[x], v);
    return r;
  endfunction

endpackage
