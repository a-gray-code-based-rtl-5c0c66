// tdc_delay_cell: behavioural model of one delay element ("tau" buffer) of
// the Gray code TDC rings.
//
// Kind: behavioural model. The real element is a non-inverting buffer whose
// propagation delay sets the TDC resolution; on an FPGA it is one LUT
// configured as a buffer. Its timing cannot be expressed as synthesizable
// logic, so this model is a continuous assignment with a delay of DELAY_NS.
//
// Interface: a (input) -> y (output), y follows a after DELAY_NS.
// Timing: rising and falling edges are delayed equally. The nominal delay of
// 10 ns and the 9.7 ns value used to model a mismatched stage follow the
// simulated TDC of the original description; equal rise/fall delay is this
// model's choice.
module tdc_delay_cell #(
  parameter real DELAY_NS = 10.0
) (
  input  logic a,
  output logic y
);
  timeunit 1ns;
  timeprecision 1ps;

  assign #(DELAY_NS) y = a;
endmodule
