// rocky_core: Xoodoo[12] protected by the ROCKY rotation countermeasure.
//
// Every round step of Xoodoo except the round-constant addition commutes with
// a rotation of all lanes along z. So for any tau in 0..31,
//   Xoodoo(A) = rot(-tau)( Xoodoo_tau( rot(tau)(A) ) ),
// where Xoodoo_tau adds the round constants rotated by tau. Each run uses a
// fresh tau supplied from outside, so the state held in the registers, and the
// place where an injected fault lands, differ from run to run while the
// result is the same.
//
// Datapath (lane serial, 32 bits per cycle):
//   in_lane -> input register -> cyclic_shift by +tau -> register
//           -> xoodoo_core (rotated state, constants rotated by tau)
//           -> cyclic_shift by -tau -> register -> output register -> out_lane
// The forward shifter, Xoodoo round loop and backward shifter are the
// ROCKY publication's top-level architecture. The two registers on each side are
// this design's reading of the ROCKY publication's cycle counts: with them a run
// takes 40 cycles (1 round/cycle, combinational multipliers), 32 (3 rounds/cycle)
// and 50 (5-stage multipliers), the numbers the ROCKY publication reports.
//
// Interface: 12 lanes enter with in_valid while in_ready, lane 0 first;
// tau_i is sampled with lane 0. 12 result lanes leave on out_lane with
// out_valid in consecutive cycles, out_last on lane 11. A new run is accepted
// once the last result lane has left. Latency from lane 0 in (cycle 0) to
// lane 11 out, counted inclusively:
//   12 + 2 + MULT_PIPE + 12/RPC + 12 + 2 + MULT_PIPE cycles.
// Reset: active-low, synchronous; clears the control, not the data.
module rocky_core
  import xoodoo_pkg::*;
#(
  parameter int unsigned RPC       = 1,  // rounds per cycle (1 or 3 in the ROCKY publication)
  parameter int unsigned MULT_PIPE = 0   // multiplier register ranks (0 or 5)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  lane_t  in_lane,
  input  shift_t tau_i,
  output logic   out_valid,
  output logic   out_last,
  output lane_t  out_lane,
  output logic   busy,
  output logic   round_active
);

  // ---- run bookkeeping ----------------------------------------------------
  logic                  run_q;      // a run is in flight
  logic [LANE_IDX_W-1:0] nin_q;      // lanes accepted in this run
  shift_t                tau_q;      // shift value of this run
  logic                  accept;

  assign in_ready = !run_q || (nin_q != LANE_IDX_W'(NLANES));
  assign accept   = in_valid && in_ready;

  // ---- input register -----------------------------------------------------
  logic  in_valid_q;
  lane_t in_lane_q;

  // ---- forward shift ------------------------------------------------------
  lane_t fwd_lane;
  logic  fwd_valid;
  logic  fwd_valid_q;
  lane_t fwd_lane_q;

  cyclic_shift #(.MULT_PIPE(MULT_PIPE)) u_fwd (
    .clk     (clk),
    .lane_i  (in_lane_q),
    .shift_i (tau_q),
    .lane_o  (fwd_lane)
  );

  // ---- rotated Xoodoo -----------------------------------------------------
  logic  core_in_ready;
  logic  core_out_valid, core_out_last;
  lane_t core_out_lane;

  xoodoo_core #(.RPC(RPC)) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (fwd_valid_q),
    .in_ready     (core_in_ready),
    .in_lane      (fwd_lane_q),
    .tau_i        (tau_q),
    .out_valid    (core_out_valid),
    .out_last     (core_out_last),
    .out_lane     (core_out_lane),
    .busy         (),
    .round_active (round_active)
  );

  // ---- backward shift -----------------------------------------------------
  shift_t tau_back;
  lane_t  bwd_lane;
  logic   bwd_valid, bwd_last;
  logic   bwd_valid_q, bwd_last_q;
  lane_t  bwd_lane_q;

  assign tau_back = shift_t'(0) - tau_q;   // rotate by -tau modulo 32

  cyclic_shift #(.MULT_PIPE(MULT_PIPE)) u_bwd (
    .clk     (clk),
    .lane_i  (core_out_lane),
    .shift_i (tau_back),
    .lane_o  (bwd_lane)
  );

  // valid / last travel beside the multiplier pipelines
  if (MULT_PIPE == 0) begin : g_nodelay
    assign fwd_valid = in_valid_q;
    assign bwd_valid = core_out_valid;
    assign bwd_last  = core_out_last;
  end else begin : g_delay
    logic [MULT_PIPE-1:0] fv_q, bv_q, bl_q;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        fv_q <= '0;
        bv_q <= '0;
        bl_q <= '0;
      end else begin
        fv_q <= {fv_q[MULT_PIPE-2:0], in_valid_q};
        bv_q <= {bv_q[MULT_PIPE-2:0], core_out_valid};
        bl_q <= {bl_q[MULT_PIPE-2:0], core_out_last};
      end
    end
    assign fwd_valid = fv_q[MULT_PIPE-1];
    assign bwd_valid = bv_q[MULT_PIPE-1];
    assign bwd_last  = bl_q[MULT_PIPE-1];
  end

  // ---- registers ----------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q       <= 1'b0;
      nin_q       <= '0;
      tau_q       <= '0;
      in_valid_q  <= 1'b0;
      fwd_valid_q <= 1'b0;
      bwd_valid_q <= 1'b0;
      bwd_last_q  <= 1'b0;
      out_valid   <= 1'b0;
      out_last    <= 1'b0;
    end else begin
      if (accept && !run_q) begin
        run_q <= 1'b1;
        tau_q <= tau_i;
        nin_q <= LANE_IDX_W'(1);
      end else if (accept) begin
        nin_q <= nin_q + 1'b1;
      end
      if (out_valid && out_last) begin
        run_q <= 1'b0;
        nin_q <= '0;
      end
      in_valid_q  <= accept;
      fwd_valid_q <= fwd_valid;
      bwd_valid_q <= bwd_valid;
      bwd_last_q  <= bwd_last;
      out_valid   <= bwd_valid_q;
      out_last    <= bwd_last_q;
    end
  end

  always_ff @(posedge clk) begin
    in_lane_q  <= in_lane;
    fwd_lane_q <= fwd_lane;
    bwd_lane_q <= bwd_lane;
    out_lane   <= bwd_lane_q;
  end

  assign busy = run_q;

  // the rotated core must take every lane the forward path delivers
  property p_core_takes_lane;
    @(posedge clk) disable iff (!rst_n) fwd_valid_q |-> core_in_ready;
  endproperty
  a_core_takes_lane: assert property (p_core_takes_lane);

endmodule
