// rocky_top: redundant Xoodoo[12] with the ROCKY rotation countermeasure.
//
// Plain duplication detects random faults but not an attacker who injects
// the same fault into both copies. Here the two copies hold the state in
// different representations: the reference path computes Xoodoo on the
// state as given, the protected path (rocky_core) on the state with every
// lane rotated by a secret shift value tau, rotating the result back at the
// end. The same physical fault therefore hits different state bits in the
// two copies, and the comparator (rocky_check) flags the difference.
//
//   in_lane --+--> xoodoo_core (tau = 0) ------------------+--> out_lane
//             |                                            |
//             +--> rocky_core (tau) --> rotated back ---> rocky_check --> check_*
//
// This arrangement, with the result taken from the unshifted path and the
// check from the comparator, is the ROCKY publication's. tau must be fresh and
// unpredictable for every run; it is an input here, to be driven by a random
// number generator outside this block.
//
// Interface: 12 lanes of 32 bits enter on in_lane with in_valid while
// in_ready, lane 0 first (lane x + 4y holds state bits z + 32(x + 4y));
// tau is sampled with lane 0. Both paths take the lane in the same cycle.
// The 12 result lanes leave on out_lane with out_valid, lane 0 first,
// 12 + 12/RPC cycles after lane 0 entered (counted from the cycle of lane 0
// to the cycle of result lane 0). check_valid pulses once per run when the
// protected result has been compared, with check_error = 1 on a mismatch;
// for the default parameters that is 40 cycles after lane 0 entered. A new
// run is accepted once both paths are done. The result lanes leave before
// the check is known: a user that must not release faulty output has to hold
// them until check_valid. Reset: active-low, synchronous.
module rocky_top
  import xoodoo_pkg::*;
#(
  parameter int unsigned RPC       = 1,  // rounds per cycle (1 or 3)
  parameter int unsigned MULT_PIPE = 0   // multiplier register ranks (0 or 5)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  lane_t  in_lane,
  input  shift_t tau,
  output logic   out_valid,
  output logic   out_last,
  output lane_t  out_lane,
  output logic   check_valid,
  output logic   check_error,
  output logic   busy
);

  logic  ref_in_ready, rot_in_ready, take;
  logic  ref_busy, rot_busy;
  logic  rot_valid, rot_last;
  lane_t rot_lane;

  assign in_ready = ref_in_ready && rot_in_ready;
  assign take     = in_valid && in_ready;

  xoodoo_core #(.RPC(RPC)) u_ref (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (take),
    .in_ready     (ref_in_ready),
    .in_lane      (in_lane),
    .tau_i        ('0),
    .out_valid    (out_valid),
    .out_last     (out_last),
    .out_lane     (out_lane),
    .busy         (ref_busy),
    .round_active ()
  );

  rocky_core #(.RPC(RPC), .MULT_PIPE(MULT_PIPE)) u_rocky (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (take),
    .in_ready     (rot_in_ready),
    .in_lane      (in_lane),
    .tau_i        (tau),
    .out_valid    (rot_valid),
    .out_last     (rot_last),
    .out_lane     (rot_lane),
    .busy         (rot_busy),
    .round_active ()
  );

  rocky_check u_check (
    .clk         (clk),
    .rst_n       (rst_n),
    .ref_valid   (out_valid),
    .ref_lane    (out_lane),
    .dut_valid   (rot_valid),
    .dut_last    (rot_last),
    .dut_lane    (rot_lane),
    .check_valid (check_valid),
    .check_error (check_error)
  );

  assign busy = ref_busy || rot_busy;

endmodule
