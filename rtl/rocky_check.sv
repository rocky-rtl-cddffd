// rocky_check: comparator of the redundant ROCKY pair.
//
// The same input is processed twice: once in the plain representation
// (reference stream) and once rotated by a secret tau and rotated back
// (protected stream). A fault injected into one computation shows up in only
// one of them, since the two hold the data in different positions, so any
// difference between the two result streams signals an attack.
//
// The reference stream (ref_valid/ref_lane, 12 lanes, lane 0 first) is
// buffered; each lane of the protected stream (dut_valid/dut_lane/dut_last)
// is compared with the buffered lane of the same number as it arrives.
// With dut_last, check_valid pulses for one cycle one clock later and
// check_error is 1 if any of the 12 lanes differed. The protected stream must
// not overtake the reference stream within a run (an assertion watches this).
//
// The comparison itself is the ROCKY publication's; buffering one stream to align
// two lane-serial results of different latency is this design's choice.
// Reset: active-low, synchronous.
module rocky_check
  import xoodoo_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ref_valid,
  input  lane_t ref_lane,
  input  logic  dut_valid,
  input  logic  dut_last,
  input  lane_t dut_lane,
  output logic  check_valid,
  output logic  check_error
);

  lane_t                 ref_q [NLANES];
  logic [LANE_IDX_W-1:0] ref_cnt_q;    // reference lanes buffered in this run
  logic [LANE_IDX_W-1:0] dut_cnt_q;    // protected lanes compared in this run
  logic                  mismatch_q;
  logic                  lane_differs;

  assign lane_differs = dut_valid && (dut_lane != ref_q[dut_cnt_q]);

  always_ff @(posedge clk) begin
    if (ref_valid) ref_q[ref_cnt_q] <= ref_lane;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_cnt_q   <= '0;
      dut_cnt_q   <= '0;
      mismatch_q  <= 1'b0;
      check_valid <= 1'b0;
      check_error <= 1'b0;
    end else begin
      check_valid <= 1'b0;
      if (ref_valid) ref_cnt_q <= ref_cnt_q + 1'b1;
      if (dut_valid) begin
        if (dut_last) begin
          check_valid <= 1'b1;
          check_error <= mismatch_q || lane_differs;
          mismatch_q  <= 1'b0;
          dut_cnt_q   <= '0;
          ref_cnt_q   <= '0;
        end else begin
          mismatch_q <= mismatch_q || lane_differs;
          dut_cnt_q  <= dut_cnt_q + 1'b1;
        end
      end
    end
  end

  // a protected lane is compared only after its reference lane is buffered
  property p_ref_first;
    @(posedge clk) disable iff (!rst_n) dut_valid |-> (ref_cnt_q > dut_cnt_q);
  endproperty
  a_ref_first: assert property (p_ref_first);

  // the next reference run starts only after the protected run is compared
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) ref_valid |-> (ref_cnt_q < LANE_IDX_W'(NLANES));
  endproperty
  a_no_overrun: assert property (p_no_overrun);

endmodule
