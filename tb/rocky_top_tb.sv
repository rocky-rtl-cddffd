// rocky_top_tb: end-to-end test of the redundant ROCKY design at its default
// parameters (1 round per cycle, combinational multipliers).
//
// A stream of runs is offered back to back, so the input stalls while the
// design is busy. Each run has an input state and a shift value tau (0, 31
// and random values). For every run the result lanes must equal the
// reference Xoodoo[12] of the input and the check must pass, except in runs
// where the testbench injects a fault: it flips one state bit of either the
// protected or the reference path for one clock during the rounds (a force on
// the state register), and then the check must report an error. In some
// runs the same bit is flipped in both paths at the same round, the attack
// that defeats plain duplication: with tau != 0 the check must still report
// it, with tau = 0 both results are wrong in the same way and the check
// passes, which is why tau must never be 0 or known in use. Timing:
// result lane 0 appears 24 cycles and check_valid 40 cycles after lane 0 was
// taken. Every mechanism (tau = 0, tau != 0, input stall, round iteration,
// passing check, fault detected in either path, identical fault in both
// paths caught and, with tau = 0, missed) is counted and must occur.
module rocky_top_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  localparam int NRUNS = 22;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   in_valid, in_ready;
  lane_t  in_lane;
  shift_t tau;
  logic   out_valid, out_last, check_valid, check_error, busy;
  lane_t  out_lane;
  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_tau_zero = 0, n_tau_nonzero = 0, n_stall = 0, n_round_cycles = 0;
  int n_check_pass = 0, n_fault_rot = 0, n_fault_ref = 0;
  int n_fault_both = 0, n_fault_both_missed = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  rocky_top dut (.clk, .rst_n, .in_valid, .in_ready, .in_lane, .tau, .out_valid, .out_last,
                 .out_lane, .check_valid, .check_error, .busy);

  flat_t fault_state, fault_state_ref;   // values forced onto the state registers
  flat_t exp_q   [$];
  int    fault_q [$];   // 0 none, 1 protected, 2 reference, 3 both paths
  int    tau_q   [$];
  int    start_q [$];

  always @(negedge clk) begin
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && dut.u_rocky.round_active) n_round_cycles++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fault injection: one bit of a state register flipped, held for a clock.
  // path 1: protected path, 2: reference path, 3: both paths, same physical
  // bit at the same round (the attack that defeats plain duplication)
  task automatic inject(input int path);
    int b, d;
    b = $urandom_range(383);
    d = $urandom_range(0, 10);
    fork
      if (path == 1 || path == 3) begin
        while (!dut.u_rocky.round_active) @(negedge clk);
        repeat (d) @(negedge clk);
        fault_state = dut.u_rocky.u_core.state_q ^ (flat_t'(1) << b);
        force dut.u_rocky.u_core.state_q = fault_state;
        @(negedge clk);
        release dut.u_rocky.u_core.state_q;
      end
      if (path == 2 || path == 3) begin
        while (!dut.u_ref.round_active) @(negedge clk);
        repeat (d) @(negedge clk);
        fault_state_ref = dut.u_ref.state_q ^ (flat_t'(1) << b);
        force dut.u_ref.state_q = fault_state_ref;
        @(negedge clk);
        release dut.u_ref.state_q;
      end
    join
  endtask

  // result monitor
  initial begin
    for (int r = 0; r < NRUNS; r++) begin
      flat_t got;
      for (int l = 0; l < NLANES; l++) begin
        do @(negedge clk); while (!out_valid);
        if (l == 0) begin
          checks++;
          if (cyc - start_q[r] != 24) begin
            failures++;
            $display("run %0d: result after %0d cycles", r, cyc - start_q[r]);
          end
        end
        got[32*l +: 32] = out_lane;
        checks++;
        if (out_last !== (l == NLANES - 1)) begin
          failures++;
          $display("run %0d: out_last wrong", r);
        end
      end
      // a fault in the reference path corrupts the output; otherwise it is exact
      if (fault_q[r] == 0 || fault_q[r] == 1) begin
        checks++;
        if (got !== exp_q[r]) begin
          failures++;
          $display("run %0d: result mismatch", r);
        end
      end
    end
  end

  // check monitor
  initial begin
    for (int r = 0; r < NRUNS; r++) begin
      do @(negedge clk); while (!check_valid);
      checks++;
      if (cyc - start_q[r] != 40) begin
        failures++;
        $display("run %0d: check after %0d cycles", r, cyc - start_q[r]);
      end
      checks++;
      // the same fault in both paths is caught only when tau != 0
      if (check_error !== (fault_q[r] != 0 && !(fault_q[r] == 3 && tau_q[r] == 0))) begin
        failures++;
        $display("run %0d: check_error %0d with fault mode %0d, tau %0d", r, check_error,
                 fault_q[r], tau_q[r]);
      end else begin
        if (fault_q[r] == 0) n_check_pass++;
        if (fault_q[r] == 1) n_fault_rot++;
        if (fault_q[r] == 2) n_fault_ref++;
        if (fault_q[r] == 3 && tau_q[r] != 0) n_fault_both++;
        if (fault_q[r] == 3 && tau_q[r] == 0) n_fault_both_missed++;
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_lane = '0; tau = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < NRUNS; r++) begin
      flat_t a;
      int    t, f;
      a = (r == 0) ? '0 : rand_state();
      t = (r == 0 || r == 5 || r == 20) ? 0 : (r == 1) ? 31 : $urandom_range(1, 31);
      f = (r == 3 || r == 9 || r == 14) ? 1 : (r == 6 || r == 12) ? 2 :
          (r == 16 || r == 17 || r == 18 || r == 20) ? 3 : 0;
      exp_q.push_back(ref_perm(a));
      fault_q.push_back(f);
      tau_q.push_back(t);
      if (t == 0) n_tau_zero++; else n_tau_nonzero++;
      for (int l = 0; l < NLANES; l++) begin
        in_valid = 1'b1;
        in_lane  = a[32*l +: 32];
        tau      = (l == 0) ? 5'(t) : 5'($urandom());
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        if (l == 0) start_q.push_back(cyc);
        @(negedge clk);
      end
      in_valid = 1'b0;
      if (f != 0) inject(f);
      // keep the next run waiting on in_ready in most runs
      if (r % 4 == 3) repeat (50) @(negedge clk);
    end
    wait (!busy);
    repeat (5) @(negedge clk);

    $display("mechanisms: tau0=%0d tau!=0=%0d stall=%0d round_cycles=%0d pass=%0d fault_rot=%0d fault_ref=%0d",
             n_tau_zero, n_tau_nonzero, n_stall, n_round_cycles, n_check_pass, n_fault_rot, n_fault_ref);
    $display("same fault in both paths: caught with tau != 0: %0d, missed with tau = 0: %0d",
             n_fault_both, n_fault_both_missed);
    checks += 9;
    if (n_fault_both == 0)        begin failures++; $display("no identical double fault caught"); end
    if (n_fault_both_missed == 0) begin failures++; $display("no identical double fault with tau = 0"); end
    if (n_tau_zero == 0)     begin failures++; $display("no run with tau = 0"); end
    if (n_tau_nonzero == 0)  begin failures++; $display("no run with tau != 0"); end
    if (n_stall == 0)        begin failures++; $display("input never stalled"); end
    if (n_round_cycles != 12 * NRUNS) begin failures++; $display("round cycles %0d", n_round_cycles); end
    if (n_check_pass == 0)   begin failures++; $display("no passing check"); end
    if (n_fault_rot == 0)    begin failures++; $display("no fault detected in the protected path"); end
    if (n_fault_ref == 0)    begin failures++; $display("no fault detected in the reference path"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
