// gray_capture_reg: the STOP-clocked sampling flip-flops of the Gray code TDC.
//
// One D flip-flop per Gray bit. Each samples the level of its ring tap on the
// rising edge of stop, freezing the Gray-coded elapsed time. Because the ring
// taps form a Gray code, at most one input can be changing when stop arrives,
// so a metastable or late flip-flop costs at most one code step.
//
// Interface: stop (the sampling clock), d[N-1:0] live Gray bits; q[N-1:0]
// the captured code, valid from the stop edge until the next one.
// Timing: q changes only on a rising stop edge. There is no reset, as in the
// original circuit; q is undefined until the first stop edge.
module gray_capture_reg #(
  parameter int unsigned N = 6
) (
  input  logic         stop,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge stop) begin
    q <= d;
  end
endmodule
