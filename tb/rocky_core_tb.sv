// rocky_core_tb: runs the three ROCKY architectures side by side on the same
// inputs and shift values:
//   A: 1 round/cycle, combinational multipliers   (expected 40 cycles)
//   B: 3 rounds/cycle, combinational multipliers  (expected 32 cycles)
//   C: 1 round/cycle, 5-rank pipelined multipliers (expected 50 cycles)
// Every result must equal the reference Xoodoo[12] of the input, whatever
// tau is; tau = 0, 31 and random values are used. The run time, counted
// inclusively from the cycle lane 0 is offered to the cycle result lane 11
// leaves, must match the numbers above. Results are sampled on the falling
// clock edge.
module rocky_core_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  localparam int NRUNS = 10;
  localparam int NARCH = 3;
  localparam int EXP_CYC [NARCH] = '{40, 32, 50};

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid;
  lane_t  in_lane;
  shift_t tau;
  logic   rdy [NARCH];
  logic   ov [NARCH];
  logic   ol [NARCH];
  lane_t  ol_lane [NARCH];
  logic   bsy [NARCH];
  logic   ra [NARCH];
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rocky_core #(.RPC(1), .MULT_PIPE(0)) u_a (.clk, .rst_n, .in_valid(in_valid && rdy[0]), .in_ready(rdy[0]),
    .in_lane, .tau_i(tau), .out_valid(ov[0]), .out_last(ol[0]), .out_lane(ol_lane[0]), .busy(bsy[0]),
    .round_active(ra[0]));
  rocky_core #(.RPC(3), .MULT_PIPE(0)) u_b (.clk, .rst_n, .in_valid(in_valid && rdy[1]), .in_ready(rdy[1]),
    .in_lane, .tau_i(tau), .out_valid(ov[1]), .out_last(ol[1]), .out_lane(ol_lane[1]), .busy(bsy[1]),
    .round_active(ra[1]));
  rocky_core #(.RPC(1), .MULT_PIPE(5)) u_c (.clk, .rst_n, .in_valid(in_valid && rdy[2]), .in_ready(rdy[2]),
    .in_lane, .tau_i(tau), .out_valid(ov[2]), .out_last(ol[2]), .out_lane(ol_lane[2]), .busy(bsy[2]),
    .round_active(ra[2]));

  flat_t exp_q [$];
  int    start_q [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic monitor(input int k);
    for (int r = 0; r < NRUNS; r++) begin
      flat_t got;
      for (int l = 0; l < NLANES; l++) begin
        do @(negedge clk); while (!ov[k]);
        got[32*l +: 32] = ol_lane[k];
        if (l == NLANES - 1) begin
          checks++;
          if (!ol[k]) begin
            failures++;
            $display("arch %0d run %0d: out_last missing", k, r);
          end
          checks++;
          if (cyc - start_q[r] + 1 != EXP_CYC[k]) begin
            failures++;
            $display("arch %0d run %0d: %0d cycles, expected %0d", k, r,
                     cyc - start_q[r] + 1, EXP_CYC[k]);
          end
        end
      end
      checks++;
      if (got !== exp_q[r]) begin
        failures++;
        $display("arch %0d run %0d: result mismatch", k, r);
      end
    end
  endtask

  initial begin
    in_valid = 1'b0; in_lane = '0; tau = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    fork
      monitor(0);
      monitor(1);
      monitor(2);
      begin
        for (int r = 0; r < NRUNS; r++) begin
          flat_t a;
          int    t;
          a = (r == 1) ? '0 : rand_state();
          t = (r == 0) ? 0 : (r == 1) ? 31 : $urandom_range(1, 31);
          exp_q.push_back(ref_perm(a));
          while (bsy[0] || bsy[1] || bsy[2]) @(negedge clk);
          start_q.push_back(cyc);
          for (int l = 0; l < NLANES; l++) begin
            in_valid = 1'b1;
            in_lane  = a[32*l +: 32];
            tau      = (l == 0) ? 5'(t) : 5'($urandom());
            @(negedge clk);
            checks++;
            if (!(rdy[0] || l == NLANES - 1)) begin
              failures++;
              $display("run %0d: in_ready dropped at lane %0d", r, l);
            end
          end
          in_valid = 1'b0;
        end
        repeat (80) @(negedge clk);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
