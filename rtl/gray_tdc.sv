// gray_tdc: Gray code time-to-digital converter (top level).
//
// The converter measures the time from a rising edge of start to a rising
// edge of stop in units of one delay-cell delay (tau). Instead of a flash
// TDC's 2^n taps and 2^n flip-flops it uses NBITS-1 ring oscillators that are
// all released by start. Ring k has 2^(k+1) cells and is tapped after 2^k of
// them, so its tap toggles like bit k of a Gray-coded count of tau units;
// the end of the largest ring supplies the MSB. Together the taps count
// 0..2^NBITS-1 in Gray code, one bit changing per tau. A rising stop edge
// captures the count in NBITS flip-flops and a Gray code decoder turns it
// into binary.
//
// For NBITS = 6: 62 delay cells, 6 flip-flops, longest ring 32 cells; range
// 64 codes (0..630 ns at tau = 10 ns).
//
// Interface:
//   init_value  level all ring nodes take while start is low (0 for a
//               count starting at 0)
//   start       low: rings held at init_value; high: rings run
//   stop        rising edge captures the code
//   gray, bin   captured Gray code and its binary value
// Timing: before a measurement start must be low for at least 2^(NBITS-1)
// cell delays so the longest ring settles. bin is valid right after the stop
// edge and holds until the next one. Times of 2^NBITS*tau or more wrap.
//
// The structure follows the original architecture. G0_TAU0_NS sets the delay
// of the first cell of the G0 ring only, to reproduce the stage-mismatch
// experiment; by default it equals TAU_NS.
//
// Circuit warnings: each ring is a deliberate loop (see gray_ring_osc). A
// synthesis run that ignores the delay cells sees every ring as a
// zero-delay MUX/inverter loop, and merges G[NBITS-1] with G[NBITS-2]
// because the cells between them vanish; on an FPGA the cells must be
// preserved as LUT buffers. The empty chain_end pins of the inner rings are
// intentional: only the largest ring's chain end is a Gray bit.
module gray_tdc #(
  parameter int unsigned NBITS      = 6,
  parameter real         TAU_NS     = 10.0,
  parameter real         G0_TAU0_NS = TAU_NS
) (
  input  logic             init_value,
  input  logic             start,
  input  logic             stop,
  output logic [NBITS-1:0] gray,
  output logic [NBITS-1:0] bin
);
  timeunit 1ns;
  timeprecision 1ps;

  if (NBITS < 2) begin : g_bad_nbits
    $error("gray_tdc: NBITS must be at least 2");
  end

  logic [NBITS-1:0] gray_live;

  // Ring k drives Gray bit k from its mid-chain tap; the largest ring also
  // drives the MSB from the end of its chain.
  for (genvar k = 0; k < NBITS - 1; k++) begin : g_ring
    if (k == NBITS - 2) begin : g_last
      gray_ring_osc #(
        .K      (k),
        .TAU_NS (TAU_NS),
        .TAU0_NS(k == 0 ? G0_TAU0_NS : TAU_NS)
      ) u_ring (
        .init_value(init_value),
        .start     (start),
        .tap       (gray_live[k]),
        .chain_end (gray_live[NBITS-1])
      );
    end else begin : g_inner
      gray_ring_osc #(
        .K      (k),
        .TAU_NS (TAU_NS),
        .TAU0_NS(k == 0 ? G0_TAU0_NS : TAU_NS)
      ) u_ring (
        .init_value(init_value),
        .start     (start),
        .tap       (gray_live[k]),
        .chain_end ()
      );
    end
  end

  gray_capture_reg #(.N(NBITS)) u_capture (
    .stop(stop),
    .d   (gray_live),
    .q   (gray)
  );

  gray_decoder #(.N(NBITS)) u_decoder (
    .g(gray),
    .b(bin)
  );
endmodule
