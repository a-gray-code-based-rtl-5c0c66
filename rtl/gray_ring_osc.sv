// gray_ring_osc: one START-gated ring oscillator of the Gray code TDC.
//
// The ring is a 2:1 MUX, a chain of NCELL = 2^(K+1) delay cells and an
// inverter that feeds the chain's end back to the MUX. While start is low the
// MUX drives init_value into the chain, so after NCELL cell delays every node
// holds init_value. When start rises the MUX passes the inverted chain end,
// a transition enters the chain and the ring oscillates with half period
// NCELL*tau.
//
// The tap after 2^K cells toggles at 2^K*tau and then every 2^(K+1)*tau after
// start rises, which is exactly how bit K of a Gray-coded count of tau units
// toggles. chain_end (after all NCELL cells) toggles every 2^(K+1)*tau, which
// for the largest ring is the Gray code's MSB.
//
// Interface: init_value, start in; tap, chain_end out (asynchronous levels).
// Timing: all delay sits in the cells. The MUX and the inverter are modelled
// without delay; that is this design's reading, because the measured TDC
// steps by exactly one cell delay per code. TAU0_NS lets the first cell
// differ from the rest, to model a stage mismatch.
//
// The ring, the cell count, the tap position and the MUX/inverter loop
// follow the original architecture. The MUX select polarity (start high =
// run) is this design's choice.
//
// Circuit warning: the ring is deliberately a closed loop through the cells;
// an oscillator has no other form. On an FPGA each cell is a LUT buffer that
// must be kept by the tools.
module gray_ring_osc #(
  parameter int unsigned K       = 0,
  parameter real         TAU_NS  = 10.0,
  parameter real         TAU0_NS = TAU_NS
) (
  input  logic init_value,
  input  logic start,
  output logic tap,
  output logic chain_end
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NCELL = 2 ** (K + 1);

  // node[0] is the MUX output, node[i] the output of cell i-1.
  logic node [NCELL+1];
  logic feedback;

  assign node[0]  = start ? feedback : init_value;
  assign feedback = ~node[NCELL];

  for (genvar i = 0; i < NCELL; i++) begin : g_cell
    tdc_delay_cell #(
      .DELAY_NS(i == 0 ? TAU0_NS : TAU_NS)
    ) u_cell (
      .a(node[i]),
      .y(node[i+1])
    );
  end

  assign tap       = node[NCELL/2];
  assign chain_end = node[NCELL];
endmodule
