// xoodoo_core_tb: runs the iterative Xoodoo core with 1 and 3 rounds per
// cycle on the same inputs and checks every result lane against the
// reference permutation. Runs use tau = 0 (plain Xoodoo) and random tau with
// a pre-rotated input, where the result must be the reference result rotated
// by tau. One run has gaps in the input stream. The cycle count from lane 0
// in to result lane 0 out must be 12 + 12/RPC when lanes arrive back to back.
module xoodoo_core_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  localparam int NRUNS = 12;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid;
  lane_t  in_lane;
  shift_t tau;
  logic   rdy1, rdy3;
  logic   ov1, ol1, ov3, ol3, busy1, busy3, ra1, ra3;
  lane_t  o1, o3;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  xoodoo_core #(.RPC(1)) u1 (.clk, .rst_n, .in_valid, .in_ready(rdy1), .in_lane, .tau_i(tau),
    .out_valid(ov1), .out_last(ol1), .out_lane(o1), .busy(busy1), .round_active(ra1));
  xoodoo_core #(.RPC(3)) u3 (.clk, .rst_n, .in_valid, .in_ready(rdy3), .in_lane, .tau_i(tau),
    .out_valid(ov3), .out_last(ol3), .out_lane(o3), .busy(busy3), .round_active(ra3));

  flat_t exp_q [$];     // expected results, one per run
  int    start_q [$];   // cycle of lane 0, one per run
  bit    gap_q [$];     // run had gaps in its input

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collect and check the result stream of one instance
  task automatic monitor(input int rpc);
    for (int r = 0; r < NRUNS; r++) begin
      flat_t got;
      int    first;
      for (int l = 0; l < NLANES; l++) begin
        do @(posedge clk); while (!(rpc == 1 ? ov1 : ov3));
        if (l == 0) first = cyc;
        got[32*l +: 32] = (rpc == 1) ? o1 : o3;
        checks++;
        if ((rpc == 1 ? ol1 : ol3) !== (l == NLANES - 1)) begin
          failures++;
          $display("RPC=%0d run %0d: out_last wrong at lane %0d", rpc, r, l);
        end
      end
      checks++;
      if (got !== exp_q[r]) begin
        failures++;
        $display("RPC=%0d run %0d: result mismatch", rpc, r);
      end
      if (!gap_q[r]) begin
        checks++;
        if (first - start_q[r] != NLANES + NROUNDS / rpc) begin
          failures++;
          $display("RPC=%0d run %0d: latency %0d", rpc, r, first - start_q[r]);
        end
      end
    end
  endtask

  initial begin
    in_valid = 1'b0; in_lane = '0; tau = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      monitor(1);
      monitor(3);
      begin
        for (int r = 0; r < NRUNS; r++) begin
          flat_t a, x;
          int    t;
          bit    gaps;
          a    = (r == 0) ? '0 : rand_state();
          t    = (r < 2) ? 0 : (r == 2) ? 31 : $urandom_range(31);
          gaps = (r == 3);
          x    = ref_rots(a, t);
          exp_q.push_back(ref_rots(ref_perm(a), t));
          gap_q.push_back(gaps);
          // wait until both cores are idle
          while (busy1 || busy3) @(negedge clk);
          for (int l = 0; l < NLANES; l++) begin
            if (gaps && l % 4 == 1) begin
              in_valid = 1'b0;
              @(negedge clk);
            end
            in_valid = 1'b1;
            in_lane  = x[32*l +: 32];
            tau      = (l == 0) ? 5'(t) : 5'($urandom());
            if (l == 0) start_q.push_back(cyc);
            @(negedge clk);
          end
          in_valid = 1'b0;
        end
        // let the monitors finish
        repeat (60) @(negedge clk);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
