// gray_decoder: combinational Gray-to-binary converter.
//
// The MSB passes through (B[N-1] = G[N-1]); every lower binary bit is the XOR
// of the binary bit above it and the Gray bit at its own position,
// B[i] = B[i+1] ^ G[i]. Unrolled, B[i] is the XOR of G[N-1:i], which is how
// it is written here; a synthesizer may build it as the chain or as a tree.
//
// Interface: g[N-1:0] in, b[N-1:0] out. Timing: purely combinational.
// The conversion rule follows the original decoder equations; N generalises
// the 6-bit case.
module gray_decoder #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] g,
  output logic [N-1:0] b
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      b[i] = ^(g >> i);
    end
  end
endmodule
