// xoodoo_rc_mem: read-only memory of rotated Xoodoo round constants.
//
// ROCKY runs Xoodoo on a state whose lanes are all rotated by tau along z.
// Every round step commutes with that rotation except iota, so the round
// constant must be added rotated by tau too. Instead of rotating it on the
// fly, this memory holds every constant in all 32 rotations:
//   word(tau, step)[k] = rotl(C[step*RPC + k], tau),  k = 0 .. RPC-1,
// where C[0..11] are the Xoodoo[12] constants of rounds -11 .. 0 and RPC is
// the number of rounds the datapath performs per clock cycle. One word feeds
// all the round instances of one cycle. The contents are computed from the
// constant list at elaboration, not loaded from a file.
//
// Read is synchronous, like an FPGA block RAM: the constants for address
// (tau_i, step_i) appear on rc_o one clock after they are presented. The
// ROCKY publication names a round-constant memory addressed by the controller; its
// organisation by (tau, step) and its registered read are this design's.
module xoodoo_rc_mem
  import xoodoo_pkg::*;
#(
  parameter int unsigned RPC    = 1,                 // rounds per cycle
  parameter int unsigned NSTEPS = NROUNDS / RPC,
  parameter int unsigned STEP_W = (NSTEPS > 1) ? $clog2(NSTEPS) : 1
) (
  input  logic              clk,
  input  shift_t            tau_i,
  input  logic [STEP_W-1:0] step_i,
  output lane_t             rc_o [RPC]
);

  localparam int unsigned DEPTH = (1 << SHIFT_W) * NSTEPS;

  typedef lane_t word_t [RPC];

  function automatic word_t rom_word(int unsigned addr);
    word_t w;
    int unsigned t, s;
    t = addr / NSTEPS;
    s = addr % NSTEPS;
    for (int unsigned k = 0; k < RPC; k++)
      w[k] = rotl(XOODOO_RC[s*RPC + k], t);
    return w;
  endfunction

  word_t rom [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) rom[a] = rom_word(a);
  end

  logic [$clog2(DEPTH)-1:0] addr;
  assign addr = ($clog2(DEPTH))'(tau_i * NSTEPS + step_i);

  always_ff @(posedge clk) rc_o <= rom[addr];

endmodule
