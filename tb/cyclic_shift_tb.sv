// cyclic_shift_tb: checks the multiplier-based lane rotator.
//
// Two instances run side by side: the combinational one (MULT_PIPE = 0) is
// checked in the same cycle; the 5-rank pipelined one is fed a new lane every
// cycle and its result is checked exactly 5 cycles later. Expected values are
// bit-by-bit rotations computed by the reference package. All 32 shift
// values are covered for several random and edge-case lanes.
module cyclic_shift_tb;
  import xoodoo_ref_pkg::*;

  localparam int PIPE = 5;

  logic        clk = 1'b0;
  logic [31:0] lane;
  logic [4:0]  sh;
  logic [31:0] out_c, out_p;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cyclic_shift #(.MULT_PIPE(0))    u_comb (.clk(clk), .lane_i(lane), .shift_i(sh), .lane_o(out_c));
  cyclic_shift #(.MULT_PIPE(PIPE)) u_pipe (.clk(clk), .lane_i(lane), .shift_i(sh), .lane_o(out_p));

  logic [31:0] exp_q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    n = 0;
    lane = '0; sh = '0;
    for (int v = 0; v < 12; v++) begin
      for (int s = 0; s < 32; s++) begin
        @(negedge clk);
        case (v)
          0: lane = 32'h0000_0001;
          1: lane = 32'h8000_0000;
          2: lane = 32'hFFFF_FFFF;
          3: lane = 32'h0000_0000;
          default: lane = $urandom();
        endcase
        sh = 5'(s);
        #1;
        checks++;
        if (out_c !== ref_rotw(lane, s)) begin
          failures++;
          $display("comb: lane %h by %0d gave %h", lane, s, out_c);
        end
        exp_q.push_back(ref_rotw(lane, s));
        n++;
        if (n > PIPE) begin
          logic [31:0] e;
          e = exp_q.pop_front();
          checks++;
          if (out_p !== e) begin
            failures++;
            $display("pipe: expected %h got %h", e, out_p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
