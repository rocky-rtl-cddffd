// xoodoo_rc_mem_tb: reads every word of the rotated round-constant memory
// for 1 and 3 rounds per cycle and compares it, one clock after the address,
// with the Xoodoo constants rotated bit by bit.
module xoodoo_rc_mem_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  logic       clk = 1'b0;
  logic [4:0] tau;
  logic [3:0] step1;
  logic [1:0] step3;
  lane_t      rc1 [1];
  lane_t      rc3 [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xoodoo_rc_mem #(.RPC(1)) u1 (.clk(clk), .tau_i(tau), .step_i(step1), .rc_o(rc1));
  xoodoo_rc_mem #(.RPC(3)) u3 (.clk(clk), .tau_i(tau), .step_i(step3), .rc_o(rc3));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 32; t++) begin
      for (int s = 0; s < 12; s++) begin
        @(negedge clk);
        tau = 5'(t); step1 = 4'(s); step3 = 2'(s % 4);
        @(negedge clk);
        checks++;
        if (rc1[0] !== ref_rotw(REF_RC[s], t)) begin
          failures++;
          $display("RPC=1 tau %0d step %0d: %h", t, s, rc1[0]);
        end
        if (s < 4) begin
          for (int k = 0; k < 3; k++) begin
            checks++;
            if (rc3[k] !== ref_rotw(REF_RC[3*s + k], t)) begin
              failures++;
              $display("RPC=3 tau %0d step %0d slot %0d: %h", t, s, k, rc3[k]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
