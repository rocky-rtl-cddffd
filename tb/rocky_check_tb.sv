// rocky_check_tb: drives the comparator with hand-made lane streams: the
// reference stream first, then the protected stream a few cycles later, as
// in the full design. Runs with equal streams must give check_error = 0, runs
// with one lane (first, middle or last) or one bit differing must give 1,
// and check_valid must pulse exactly once per run, the cycle after the last
// protected lane.
module rocky_check_tb;
  import xoodoo_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  ref_valid, dut_valid, dut_last;
  lane_t ref_lane, dut_lane;
  logic  check_valid, check_error;
  int checks = 0, failures = 0;
  int nvalid = 0;

  always #5 clk = ~clk;

  rocky_check dut (.clk, .rst_n, .ref_valid, .ref_lane, .dut_valid, .dut_last, .dut_lane,
                   .check_valid, .check_error);

  always @(negedge clk) if (rst_n && check_valid) nvalid++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lane_t data [NLANES];
    ref_valid = 0; dut_valid = 0; dut_last = 0; ref_lane = '0; dut_lane = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      int bad;       // lane to corrupt, -1 for none
      int n_before;
      bad = (r % 2 == 0) ? -1 : (r == 1) ? 0 : (r == 3) ? 11 : $urandom_range(1, 10);
      for (int l = 0; l < NLANES; l++) data[l] = $urandom();
      // reference stream
      for (int l = 0; l < NLANES; l++) begin
        ref_valid = 1; ref_lane = data[l];
        @(negedge clk);
      end
      ref_valid = 0;
      repeat (r) @(negedge clk);
      n_before = nvalid;
      // protected stream
      for (int l = 0; l < NLANES; l++) begin
        dut_valid = 1; dut_last = (l == NLANES - 1);
        dut_lane  = (l == bad) ? data[l] ^ (32'h1 << $urandom_range(31)) : data[l];
        @(negedge clk);
        checks++;
        if (check_valid !== (l == NLANES - 1)) begin
          failures++;
          $display("run %0d: check_valid wrong after lane %0d", r, l);
        end
        if (l == NLANES - 1) begin
          checks++;
          if (check_error !== (bad >= 0)) begin
            failures++;
            $display("run %0d: check_error %0d, corrupted lane %0d", r, check_error, bad);
          end
        end
        dut_valid = 0; dut_last = 0;
      end
      @(negedge clk);
      checks++;
      if (nvalid - n_before != 1) begin
        failures++;
        $display("run %0d: %0d check_valid pulses", r, nvalid - n_before);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
