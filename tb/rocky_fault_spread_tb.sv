// rocky_fault_spread_tb: fault-spread experiment on the ROCKY core.
//
// A single bit flip is injected into the physical lane 1, bits 0..7 (state
// bits 32..39, byte group 0x04), as that lane leaves the forward shifter
// and enters the state register (a force on the shifter output for one
// clock). After the first round the state register is read, rotated back by
// -tau and compared with the fault-free first round of the reference model.
//   - Every sample's error pattern must equal the one the reference model
//     predicts for a flip of logical bit 32 + ((k - tau) mod 32).
//   - Without rotation (tau = 0) the flip always hits the same 8 logical bits;
//     with a random tau it lands anywhere in lane 1, so the set of state bits
//     that can be in error after one round must be strictly larger.
// A histogram of errors per 8-bit group is printed for both cases. Each
// sample is aborted by a reset after its first round.
module rocky_fault_spread_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  localparam int NSAMPLES = 1000;   // per case

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid, in_ready;
  lane_t  in_lane;
  shift_t tau;
  logic   out_valid, out_last, busy, round_active;
  lane_t  out_lane;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rocky_core dut (.clk, .rst_n, .in_valid, .in_ready, .in_lane, .tau_i(tau), .out_valid,
                  .out_last, .out_lane, .busy, .round_active);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lane_t fault_lane;
  int hist [2][48];
  bit ever [2][384];

  initial begin
    in_valid = 1'b0; in_lane = '0; tau = '0;
    for (int c = 0; c < 2; c++)
      for (int g = 0; g < 48; g++) hist[c][g] = 0;
    for (int c = 0; c < 2; c++)
      for (int b = 0; b < 384; b++) ever[c][b] = 1'b0;
    for (int c = 0; c < 2; c++) begin
      for (int s = 0; s < NSAMPLES; s++) begin
        flat_t a, after, err, exp_err;
        int t, k, lz;
        a = rand_state();
        t = (c == 0) ? 0 : $urandom_range(31);
        k = $urandom_range(7);
        rst_n = 1'b0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int l = 0; l < NLANES; l++) begin
          in_valid = 1'b1;
          in_lane  = a[32*l +: 32];
          tau      = 5'(t);
          @(negedge clk);
          if (l == 1) begin
            // lane 1 is now in the input register; the shifter output holds
            // its rotation until the next edge writes it to fwd_lane_q
            fault_lane = dut.u_fwd.lane_o ^ (lane_t'(1) << k);
            force dut.u_fwd.lane_o = fault_lane;
          end
          if (l == 2) release dut.u_fwd.lane_o;
        end
        in_valid = 1'b0;
        // wait for the first round to complete
        while (!round_active) @(negedge clk);
        @(negedge clk);
        after = ref_rots(flat_t'(dut.u_core.state_q), 32 - t);
        err   = after ^ ref_round(a, REF_RC[0]);
        lz    = ((k - t) % 32 + 32) % 32;
        exp_err = ref_round(a ^ (flat_t'(1) << (32 + lz)), REF_RC[0]) ^ ref_round(a, REF_RC[0]);
        checks++;
        if (err !== exp_err) begin
          failures++;
          $display("case %0d sample %0d: error pattern differs from prediction", c, s);
        end
        for (int b = 0; b < 384; b++)
          if (err[b]) begin
            hist[c][b / 8]++;
            ever[c][b] = 1'b1;
          end
      end
    end
    begin
      int n0, n1;
      n0 = 0; n1 = 0;
      for (int b = 0; b < 384; b++) begin
        n0 += ever[0][b];
        n1 += ever[1][b];
      end
      for (int c = 0; c < 2; c++) begin
        string line;
        line = (c == 0) ? "unmodified:" : "shifted:   ";
        for (int g = 0; g < 48; g++) line = {line, $sformatf(" %0d", hist[c][g])};
        $display("%s", line);
      end
      $display("state bits that can be in error after one round: unmodified %0d, shifted %0d", n0, n1);
      checks++;
      if (!(n1 > n0)) begin
        failures++;
        $display("rotation did not enlarge the fault space");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
