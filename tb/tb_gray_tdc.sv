// tb_gray_tdc: end-to-end test of the Gray code TDC at its default size
// (6 bits, 62 cells of 10 ns, no mismatch). For every code 0..63 it measures
// a start-to-stop time in the middle of the code's 10 ns bin and near both
// bin edges, and checks gray and bin against floor(T/tau) and against the
// reference model. It also covers:
//  - re-arming: start is dropped and the rings settle before each measurement
//  - init_value = 1: every tap starts high, so the captured Gray code is the
//    complement of the init_value = 0 code
//  - over-range: times of 64*tau or more, where the code wraps to 0
// A monitor on the live (uncaptured) ring taps checks the property the
// design rests on: while the rings run, no two taps ever change at the same
// instant, so the live code moves one Gray bit at a time.
// Each Gray bit must be captured both as 0 and as 1. Every mechanism is
// counted and one that never happened is a failure.
module tb_gray_tdc;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_ref_pkg::*;

  localparam int  N      = 6;
  localparam real TAU    = 10.0;
  localparam real SETTLE = (2 ** (N - 1)) * TAU + 20.0;

  int checks = 0, failures = 0;
  int n_meas = 0, n_rearm = 0, n_init1 = 0, n_over = 0;
  int codes_seen [2**N];
  int bit_one [N], bit_zero [N];

  logic init_value = 1'b0;
  logic start      = 1'b0;
  logic stop       = 1'b0;
  logic [N-1:0] gray, bin;

  gray_tdc dut (.init_value, .start, .stop, .gray, .bin);

  // Live-code monitor: count the steps of the running Gray code and flag any
  // two bit changes that happen at the same time.
  int      n_live_steps = 0;
  realtime last_change  = -1.0;
  always @(dut.gray_live) begin
    if (start) begin
      n_live_steps++;
      checks++;
      if ($realtime == last_change) begin
        failures++;
        $display("FAIL two live Gray bits changed together at %0t", $realtime);
      end
      last_change = $realtime;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: gray=%b bin=%0d", what, $realtime, gray, bin);
    end
  endtask

  // One measurement of t_ns; returns after bin has settled.
  task automatic measure(input real t_ns, input logic iv);
    start      = 1'b0;
    stop       = 1'b0;
    init_value = iv;
    #(SETTLE);
    n_rearm++;
    start = 1'b1;
    #(t_ns);
    stop = 1'b1;
    #1;
    n_meas++;
    stop  = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < 2 ** N; c++) begin
      real offs [3] = '{0.5, 5.0, 9.5};
      foreach (offs[i]) begin
        real t;
        int unsigned eg;
        t  = c * TAU + offs[i];
        eg = expected_gray(t, N, TAU, TAU);
        measure(t, 1'b0);
        check(bin == c, $sformatf("code %0d at %0.1f ns", c, t));
        check(gray == eg, $sformatf("gray vs model at %0.1f ns", t));
        check(gray == N'(c ^ (c >> 1)), $sformatf("gray of %0d", c));
        codes_seen[bin]++;
        for (int k = 0; k < N; k++) begin
          if (gray[k]) bit_one[k]++;
          else         bit_zero[k]++;
        end
      end
    end
    // init_value = 1: complemented Gray code.
    for (int c = 0; c < 2 ** N; c += 7) begin
      real t;
      t = c * TAU + 5.0;
      measure(t, 1'b1);
      check(gray == N'(~(c ^ (c >> 1))), $sformatf("init 1, code %0d", c));
      n_init1++;
    end
    // Over-range: past the last code the count wraps around.
    for (int c = 2 ** N; c < 2 ** N + 8; c++) begin
      real t;
      int unsigned eg;
      t  = c * TAU + 5.0;
      eg = expected_gray(t, N, TAU, TAU);
      measure(t, 1'b0);
      check(gray == eg, $sformatf("over-range gray at %0.1f ns", t));
      check(bin == gray_to_bin(eg, N), $sformatf("over-range bin at %0.1f ns", t));
      check(bin == c - 2 ** N, $sformatf("over-range wraps at %0.1f ns", t));
      n_over++;
    end

    for (int c = 0; c < 2 ** N; c++) check(codes_seen[c] > 0, $sformatf("code %0d seen", c));
    for (int k = 0; k < N; k++) check(bit_one[k] > 0 && bit_zero[k] > 0, $sformatf("G%0d toggled", k));
    check(n_rearm > 0 && n_init1 > 0 && n_over > 0 && n_live_steps > 0, "all mechanisms exercised");
    $display("measurements=%0d rearm=%0d init1=%0d overrange=%0d live_steps=%0d",
             n_meas, n_rearm, n_init1, n_over, n_live_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
