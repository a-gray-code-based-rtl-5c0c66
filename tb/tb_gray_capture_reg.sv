// tb_gray_capture_reg: drives random 6-bit words and stop pulses. Checks that
// q takes d on each rising stop edge, and that d changes while stop is steady
// or falling leave q alone. Self-checking; prints TB_RESULT.
module tb_gray_capture_reg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 6;
  int checks = 0, failures = 0;
  logic         stop = 1'b0;
  logic [N-1:0] d    = '0;
  logic [N-1:0] q;
  logic [N-1:0] held;

  gray_capture_reg #(.N(N)) dut (.stop(stop), .d(d), .q(q));

  task automatic check(input logic [N-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%b expected %b", what, $realtime, q, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = N'($urandom);
      #5 stop = 1'b1;
      held = d;
      #1 check(held, "capture on rising stop");
      d = ~held;
      #2 check(held, "hold while stop high");
      stop = 1'b0;
      #1 check(held, "no capture on falling stop");
      d = N'($urandom);
      #2 check(held, "hold while stop low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
