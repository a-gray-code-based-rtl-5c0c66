// tb_gray_decoder: checks the Gray-to-binary converter.
//  - N=6, exhaustive: every binary value b is Gray-encoded as b ^ (b >> 1)
//    and the decoder must return b.
//  - N=4: the 16 rows of the standard 4-bit Gray code table.
//  - N=6 and N=8: the worked example 101001 -> 110001 and
//    10100101 -> 11000110.
// Self-checking; prints TB_RESULT.
module tb_gray_decoder;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [5:0] g6, b6;
  logic [3:0] g4, b4;
  logic [7:0] g8, b8;

  gray_decoder              dut6 (.g(g6), .b(b6));
  gray_decoder #(.N(4))     dut4 (.g(g4), .b(b4));
  gray_decoder #(.N(8))     dut8 (.g(g8), .b(b8));

  // 4-bit Gray code table, index = decimal value.
  localparam logic [3:0] GRAY4 [16] = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0111, 4'b0101, 4'b0100,
    4'b1100, 4'b1101, 4'b1111, 4'b1110, 4'b1010, 4'b1011, 4'b1001, 4'b1000
  };

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    for (int b = 0; b < 64; b++) begin
      g6 = 6'(b ^ (b >> 1));
      #1 check(8'(b6), 8'(b), "6-bit exhaustive");
    end
    for (int b = 0; b < 16; b++) begin
      g4 = GRAY4[b];
      #1 check(8'(b4), 8'(b), "4-bit table");
    end
    g6 = 6'b101001;
    #1 check(8'(b6), 8'b00110001, "6-bit example");
    g8 = 8'b10100101;
    #1 check(b8, 8'b11000110, "8-bit example");
    for (int i = 0; i < 200; i++) begin
      logic [7:0] b;
      b  = 8'($urandom);
      g8 = b ^ (b >> 1);
      #1 check(b8, b, "8-bit random");
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
