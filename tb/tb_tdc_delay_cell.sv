// tb_tdc_delay_cell: checks that the delay cell model delays both edges by
// its DELAY_NS (10 ns nominal, 9.7 ns for the mismatched instance) and does
// not move earlier. Self-checking; prints TB_RESULT.
module tb_tdc_delay_cell;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a = 1'b0;
  logic y_nom, y_mis;

  tdc_delay_cell dut_nom (.a(a), .y(y_nom));
  tdc_delay_cell #(.DELAY_NS(9.7)) dut_mis (.a(a), .y(y_mis));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $realtime, got, exp);
    end
  endtask

  initial begin
    #50;
    check(y_nom, 1'b0, "settled low nominal");
    check(y_mis, 1'b0, "settled low mismatch");
    for (int rep = 0; rep < 4; rep++) begin
      logic v;
      v = (rep % 2 == 0);
      a = v;
      #9.6;  check(y_mis, !v, "mismatch before 9.7");
      #0.2;  check(y_mis,  v, "mismatch after 9.7");
             check(y_nom, !v, "nominal before 10");
      #0.2;  check(y_nom,  v, "nominal after 10");
      #30;   check(y_nom,  v, "nominal holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
