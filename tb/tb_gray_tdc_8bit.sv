// tb_gray_tdc_8bit: the 8-bit configuration (7 rings, 254 cells of 10 ns,
// 8 flip-flops, range 0..2550 ns). Every code 0..255 is measured at the
// middle of its bin and checked against floor(T/tau), the Gray code of that
// value and the reference model.
module tb_gray_tdc_8bit;
  timeunit 1ns;
  timeprecision 1ps;
  import tdc_ref_pkg::*;

  localparam int  N      = 8;
  localparam real TAU    = 10.0;
  localparam real SETTLE = (2 ** (N - 1)) * TAU + 20.0;

  int checks = 0, failures = 0;

  logic init_value = 1'b0;
  logic start      = 1'b0;
  logic stop       = 1'b0;
  logic [N-1:0] gray, bin;

  gray_tdc #(.NBITS(N)) dut (.init_value, .start, .stop, .gray, .bin);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: gray=%b bin=%0d", what, $realtime, gray, bin);
    end
  endtask

  initial begin
    for (int c = 0; c < 2 ** N; c++) begin
      real t;
      t     = c * TAU + 5.0;
      start = 1'b0;
      #(SETTLE);
      start = 1'b1;
      #(t);
      stop = 1'b1;
      #1;
      stop = 1'b0;
      check(bin == c, $sformatf("code %0d", c));
      check(gray == N'(c ^ (c >> 1)), $sformatf("gray of %0d", c));
      check(gray == expected_gray(t, N, TAU, TAU), $sformatf("gray vs model at %0.1f ns", t));
    end
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
