// tb_gray_tdc_mismatch: the stage-mismatch experiment. The 6-bit TDC is built
// with the first cell of the G0 ring at 9.7 ns instead of 10 ns, which makes
// that ring run 1.5% fast, so odd codes arrive progressively early. The
// stop time is swept from 0.25 ns to 639.25 ns in 1 ns steps (640 points).
// Checked at each point:
//  - gray and bin equal the reference model built from the cell delays
//  - bin is within one code of the ideal floor(T/10 ns)
//  - glitch-free: between consecutive points bin stays or rises by one,
//    never jumps or falls
// The sweep must also reach every code and must see the mismatch move at
// least one code away from the ideal, or the test fails.
module tb_gray_tdc_mismatch;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_ref_pkg::*;

  localparam int  N      = 6;
  localparam real TAU    = 10.0;
  localparam real TAU0   = 9.7;
  localparam real SETTLE = (2 ** (N - 1)) * TAU + 20.0;

  int checks = 0, failures = 0;
  int n_off_ideal = 0;
  int codes_seen [2**N];
  int prev_bin;

  logic init_value = 1'b0;
  logic start      = 1'b0;
  logic stop       = 1'b0;
  logic [N-1:0] gray, bin;

  gray_tdc #(.NBITS(N), .TAU_NS(TAU), .G0_TAU0_NS(TAU0)) dut (.init_value, .start, .stop, .gray, .bin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: gray=%b bin=%0d", what, $realtime, gray, bin);
    end
  endtask

  initial begin
    prev_bin = 0;
    for (int s = 0; s < 640; s++) begin
      real t;
      int unsigned eg;
      int ideal;
      t     = s + 0.25;
      eg    = expected_gray(t, N, TAU, TAU0);
      ideal = int'($floor(t / TAU));
      start = 1'b0;
      #(SETTLE);
      start = 1'b1;
      #(t);
      stop = 1'b1;
      #1;
      stop = 1'b0;
      check(gray == eg, $sformatf("gray vs model at %0.2f ns", t));
      check(bin == gray_to_bin(eg, N), $sformatf("bin vs model at %0.2f ns", t));
      check(int'(bin) - ideal <= 1 && ideal - int'(bin) <= 1,
            $sformatf("within one code of ideal %0d at %0.2f ns", ideal, t));
      check(int'(bin) == prev_bin || int'(bin) == prev_bin + 1,
            $sformatf("glitch-free step from %0d at %0.2f ns", prev_bin, t));
      if (int'(bin) != ideal) n_off_ideal++;
      codes_seen[bin]++;
      prev_bin = bin;
    end
    for (int c = 0; c < 2 ** N; c++) check(codes_seen[c] > 0, $sformatf("code %0d seen", c));
    check(n_off_ideal > 0, "mismatch visible");
    $display("points off the ideal line: %0d", n_off_ideal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
