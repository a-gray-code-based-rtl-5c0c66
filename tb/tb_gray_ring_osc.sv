// tb_gray_ring_osc: checks the START-gated ring oscillator.
// Three rings: K=0 (2 cells), K=2 (8 cells) and K=0 with a 9.7 ns first cell.
//  - With start low every output settles to init_value (both 0 and 1).
//  - After start rises, tap edge m must occur at d_tap + m*L and chain_end
//    edge m at (m+1)*L, where d_tap is the summed delay of the cells before
//    the tap and L the summed delay of the whole chain (MUX and inverter are
//    ideal). Edge times are compared with a 1 ps tolerance.
//  - Dropping start again returns the ring to init_value.
// Self-checking; prints TB_RESULT.
module tb_gray_ring_osc;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NR     = 3;
  localparam int NEDGES = 12;

  int checks = 0, failures = 0;
  logic init_value = 1'b0;
  logic start      = 1'b0;
  logic [NR-1:0] tap, chain_end;
  realtime t_start;
  realtime tap_t   [NR][$];
  realtime end_t   [NR][$];

  gray_ring_osc #(.K(0))                 r0 (.init_value, .start, .tap(tap[0]), .chain_end(chain_end[0]));
  gray_ring_osc #(.K(2))                 r1 (.init_value, .start, .tap(tap[1]), .chain_end(chain_end[1]));
  gray_ring_osc #(.K(0), .TAU0_NS(9.7))  r2 (.init_value, .start, .tap(tap[2]), .chain_end(chain_end[2]));

  // Independent model of each ring: delay to the tap and around the chain.
  function automatic real d_tap(int r);
    case (r)
      0: return 10.0;
      1: return 40.0;
      default: return 9.7;
    endcase
  endfunction
  function automatic real loop_len(int r);
    case (r)
      0: return 20.0;
      1: return 80.0;
      default: return 19.7;
    endcase
  endfunction

  for (genvar r = 0; r < NR; r++) begin : g_mon
    always @(tap[r])       if (start) tap_t[r].push_back($realtime - t_start);
    always @(chain_end[r]) if (start) end_t[r].push_back($realtime - t_start);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic check_time(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 0.001 || got > exp + 0.001) begin
      failures++;
      $display("FAIL %s: edge at %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      init_value = pass[0];
      start      = 1'b0;
      #200;
      for (int r = 0; r < NR; r++) begin
        check(tap[r] == init_value, $sformatf("ring %0d tap at init value", r));
        check(chain_end[r] == init_value, $sformatf("ring %0d end at init value", r));
        tap_t[r].delete();
        end_t[r].delete();
      end
      t_start = $realtime;
      start   = 1'b1;
      #(NEDGES * 80.0 + 5.0);
      for (int r = 0; r < NR; r++) begin
        int n_tap, n_end;
        n_tap = 0;
        n_end = 0;
        for (int m = 0; m < NEDGES; m++) begin
          real et, ee;
          et = d_tap(r) + m * loop_len(r);
          ee = (m + 1) * loop_len(r);
          if (et < NEDGES * 80.0) begin
            check(m < tap_t[r].size(), $sformatf("ring %0d tap edge %0d present", r, m));
            if (m < tap_t[r].size()) check_time(tap_t[r][m], et, $sformatf("ring %0d tap edge %0d", r, m));
            n_tap++;
          end
          if (ee < NEDGES * 80.0) begin
            check(m < end_t[r].size(), $sformatf("ring %0d end edge %0d present", r, m));
            if (m < end_t[r].size()) check_time(end_t[r][m], ee, $sformatf("ring %0d end edge %0d", r, m));
            n_end++;
          end
        end
        check(tap_t[r].size() >= n_tap, $sformatf("ring %0d tap edge count", r));
      end
    end
    // Release: start low returns the ring to the initial value.
    init_value = 1'b0;
    start      = 1'b0;
    #200;
    for (int r = 0; r < NR; r++) check(tap[r] == 1'b0 && chain_end[r] == 1'b0,
                                       $sformatf("ring %0d stops at init value", r));
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
