// xoodoo_core: iterative Xoodoo[12] datapath with a lane-serial interface.
//
// A 384-bit state register is fed by a multiplexer that selects either an
// incoming lane (load) or the output of RPC chained round-function instances
// (iterate). The round constants come from xoodoo_rc_mem, addressed by the
// shift value tau of the current run and by the round step, so the same core
// computes Xoodoo on a state whose lanes are all rotated by tau (tau = 0 is
// plain Xoodoo).
//
// Operation (one run):
//   LOAD   : 12 lanes arrive on in_lane with in_valid, lane 0 first (lane
//            x + 4y holds bits z + 32(x + 4y)); tau_i is sampled with lane 0.
//            Gaps in in_valid are allowed. in_ready is high in IDLE and LOAD.
//   ROUND  : NROUNDS/RPC cycles, RPC rounds per cycle.
//   UNLOAD : 12 lanes leave on out_lane with out_valid in 12 consecutive
//            cycles, lane 0 first; out_lane is read combinationally from the
//            state register. There is no back-pressure.
// Timing: the cycle after the 12th lane is written the rounds start; the
// cycle after the last round lane 0 is on out_lane. With back-to-back input
// the first output lane appears 12 + NROUNDS/RPC cycles after lane 0 entered.
//
// The state register, input multiplexer, round-constant memory and the
// 1 and 3 rounds-per-cycle organisations are the ROCKY publication's; the controller
// (states, counters, handshake) is this design's. Reset is active-low and
// synchronous; it clears the controller, not the state.
module xoodoo_core
  import xoodoo_pkg::*;
#(
  parameter int unsigned RPC = 1   // rounds per cycle: 1, 2, 3, 4, 6 or 12
) (
  input  logic   clk,
  input  logic   rst_n,
  // lane input
  input  logic   in_valid,
  output logic   in_ready,
  input  lane_t  in_lane,
  input  shift_t tau_i,
  // lane output
  output logic   out_valid,
  output logic   out_last,
  output lane_t  out_lane,
  // status
  output logic   busy,
  output logic   round_active
);

  localparam int unsigned NSTEPS = NROUNDS / RPC;
  localparam int unsigned STEP_W = (NSTEPS > 1) ? $clog2(NSTEPS) : 1;

  initial begin
    assert (NROUNDS % RPC == 0) else $fatal(1, "xoodoo_core: RPC must divide %0d", NROUNDS);
  end

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROUND, S_UNLOAD} ctrl_t;

  ctrl_t                 ctrl_q;
  logic [LANE_IDX_W-1:0] lane_q;
  logic [STEP_W-1:0]     step_q;
  shift_t                tau_q;
  state_t                state_q;

  // ---- round constants ---------------------------------------------------
  shift_t            rc_tau;
  logic [STEP_W-1:0] rc_step;
  lane_t             rc [RPC];

  // The memory read is registered, so it is addressed one cycle ahead:
  // step 0 while loading, step s+1 while round step s runs.
  always_comb begin
    rc_tau  = (ctrl_q == S_IDLE) ? tau_i : tau_q;
    rc_step = '0;
    if (ctrl_q == S_ROUND && step_q != STEP_W'(NSTEPS - 1))
      rc_step = step_q + 1'b1;
  end

  xoodoo_rc_mem #(.RPC(RPC)) u_rc (
    .clk    (clk),
    .tau_i  (rc_tau),
    .step_i (rc_step),
    .rc_o   (rc)
  );

  // ---- round chain -------------------------------------------------------
  state_t chain [RPC+1];
  assign chain[0] = state_q;

  for (genvar k = 0; k < RPC; k++) begin : g_round
    xoodoo_round u_round (
      .state_i (chain[k]),
      .rc      (rc[k]),
      .state_o (chain[k+1])
    );
  end

  // ---- controller and state register -------------------------------------
  logic load_lane;
  assign in_ready  = (ctrl_q == S_IDLE) || (ctrl_q == S_LOAD);
  assign load_lane = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl_q <= S_IDLE;
      lane_q <= '0;
      step_q <= '0;
      tau_q  <= '0;
    end else begin
      unique case (ctrl_q)
        S_IDLE: if (load_lane) begin
          tau_q  <= tau_i;
          lane_q <= LANE_IDX_W'(1);
          ctrl_q <= S_LOAD;
        end
        S_LOAD: if (load_lane) begin
          if (lane_q == LANE_IDX_W'(NLANES - 1)) begin
            lane_q <= '0;
            step_q <= '0;
            ctrl_q <= S_ROUND;
          end else begin
            lane_q <= lane_q + 1'b1;
          end
        end
        S_ROUND: begin
          if (step_q == STEP_W'(NSTEPS - 1)) ctrl_q <= S_UNLOAD;
          else                               step_q <= step_q + 1'b1;
        end
        S_UNLOAD: begin
          if (lane_q == LANE_IDX_W'(NLANES - 1)) begin
            lane_q <= '0;
            ctrl_q <= S_IDLE;
          end else begin
            lane_q <= lane_q + 1'b1;
          end
        end
        default: ctrl_q <= S_IDLE;
      endcase
    end
  end

  // state register with its input multiplexer: lane load or round result
  logic [STATE_W-1:0] state_flat;
  assign state_flat = state_q;

  always_ff @(posedge clk) begin
    if (load_lane) begin
      for (int unsigned l = 0; l < NLANES; l++)
        if (lane_q == LANE_IDX_W'(l)) state_q[l / NX][l % NX] <= in_lane;
    end else if (ctrl_q == S_ROUND) begin
      state_q <= chain[RPC];
    end
  end

  assign out_valid    = (ctrl_q == S_UNLOAD);
  assign out_last     = out_valid && (lane_q == LANE_IDX_W'(NLANES - 1));
  assign out_lane     = state_flat[lane_q * LANE_W +: LANE_W];
  assign busy         = (ctrl_q != S_IDLE);
  assign round_active = (ctrl_q == S_ROUND);

endmodule
