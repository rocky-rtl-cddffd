// xoodoo_round_tb: checks one combinational Xoodoo round against the
// bit-level reference model, for edge-case and random states and constants,
// and checks that rotating input and constant by tau rotates the output by
// tau (the shift invariance the countermeasure depends on).
module xoodoo_round_tb;
  import xoodoo_pkg::*;
  import xoodoo_ref_pkg::*;

  state_t st_in, st_out;
  lane_t  rc;
  int checks = 0, failures = 0;

  xoodoo_round dut (.state_i(st_in), .rc(rc), .state_o(st_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flat_t a, e, r0;
    for (int t = 0; t < 300; t++) begin
      case (t)
        0: a = '0;
        1: a = '1;
        2: a = flat_t'(1);
        default: a = rand_state();
      endcase
      rc = (t < 12) ? REF_RC[t] : $urandom();
      st_in = a;
      #1;
      e = ref_round(a, rc);
      checks++;
      if (flat_t'(st_out) !== e) begin
        failures++;
        $display("round mismatch, test %0d", t);
      end
      // shift invariance
      r0 = st_out;
      begin
        int tau;
        tau = $urandom_range(31);
        st_in = ref_rots(a, tau);
        rc    = ref_rotw(rc, tau);
        #1;
        checks++;
        if (flat_t'(st_out) !== ref_rots(r0, tau)) begin
          failures++;
          $display("shift invariance broken, test %0d tau %0d", t, tau);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
