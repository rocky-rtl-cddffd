// cyclic_shift: constant-time rotation of one 32-bit lane by a 5-bit amount.
//
// The rotation is computed arithmetically so that its timing and structure do
// not depend on the rotation value:
//   1. a 5-to-32 decoder turns the shift value s into the one-hot word 2^s;
//   2. a 32x32 multiplier forms the 64-bit product lane * 2^s, which is the
//      lane shifted left by s with the bits that left the top in [63:32];
//   3. the two 32-bit halves are added; since they never overlap, the sum is
//      the lane rotated left (towards higher z) by s.
// This decoder / multiplier / adder structure is the ROCKY publication's.
//
// MULT_PIPE selects the multiplier:
//   0 : combinational multiplier, zero latency (the basic architecture);
//   N : pipelined multiplier of N register ranks (5 in the high-clock-rate
//       architecture). Rank 1 registers the operands; each of the N-1 later
//       ranks adds one slice of 32/(N-1) multiplier bits to a running partial
//       product. 32 must divide by N-1. How the multiplication is split
//       between the ranks is this design's choice.
// Latency from lane_i/shift_i to lane_o is MULT_PIPE cycles; a new lane can
// enter every cycle. There is no reset: the pipeline holds only data and the
// caller tracks validity.
module cyclic_shift
  import xoodoo_pkg::*;
#(
  parameter int unsigned MULT_PIPE = 0
) (
  input  logic   clk,
  input  lane_t  lane_i,
  input  shift_t shift_i,
  output lane_t  lane_o
);

  localparam int unsigned PW = 2 * LANE_W;

  lane_t          onehot;
  logic [PW-1:0]  product;

  // 5-to-32 decoder
  always_comb begin
    onehot = '0;
    onehot[shift_i] = 1'b1;
  end

  if (MULT_PIPE == 0) begin : g_comb
    always_comb product = PW'(lane_i) * PW'(onehot);
  end else begin : g_pipe
    localparam int unsigned NSLICE  = MULT_PIPE - 1;
    localparam int unsigned SLICE_W = LANE_W / NSLICE;

    initial begin
      assert (MULT_PIPE >= 2 && (LANE_W % NSLICE) == 0)
        else $fatal(1, "cyclic_shift: MULT_PIPE-1 must divide %0d", LANE_W);
    end

    lane_t         a_q   [MULT_PIPE];
    lane_t         b_q   [MULT_PIPE];
    logic [PW-1:0] acc_q [MULT_PIPE];

    always_ff @(posedge clk) begin
      a_q[0]   <= lane_i;
      b_q[0]   <= onehot;
      acc_q[0] <= '0;
      for (int unsigned k = 1; k < MULT_PIPE; k++) begin
        a_q[k]   <= a_q[k-1];
        b_q[k]   <= b_q[k-1];
        acc_q[k] <= acc_q[k-1]
                  + ((PW'(a_q[k-1]) * PW'(b_q[k-1][(k-1)*SLICE_W +: SLICE_W]))
                     << ((k-1)*SLICE_W));
      end
    end

    assign product = acc_q[MULT_PIPE-1];
  end

  // add the high half (bits rotated out) onto the low half
  assign lane_o = product[PW-1:LANE_W] + product[LANE_W-1:0];

endmodule
