// tdc_ref_pkg: reference model of the Gray code TDC for the testbenches.
// It works from the cell delays alone, independent of the RTL structure:
// ring k (k = 0..n-2) has 2^(k+1) cells and is tapped after 2^k of them, so
// its tap toggles at d_tap + m*L (m = 0, 1, ...), where d_tap is the delay of
// the cells before the tap and L the delay of the whole chain. The MSB is the
// end of ring n-2 and toggles at (m+1)*L. Counting the toggles before time T
// gives each Gray bit; gray_to_bin decodes by the XOR of the bits above.
package tdc_ref_pkg;
  function automatic int unsigned expected_gray(real t_ns, int n, real tau, real tau0);
    int unsigned g;
    g = 0;
    for (int k = 0; k <= n - 2; k++) begin
      real d_tap, loop_l;
      int  cells, edges;
      cells  = 2 ** (k + 1);
      d_tap  = (2 ** k) * tau + ((k == 0) ? (tau0 - tau) : 0.0);
      loop_l = cells * tau + ((k == 0) ? (tau0 - tau) : 0.0);
      edges  = (t_ns < d_tap) ? 0 : int'($floor((t_ns - d_tap) / loop_l)) + 1;
      g |= (edges % 2) << k;
      if (k == n - 2) begin
        edges = int'($floor(t_ns / loop_l));
        g |= (edges % 2) << (n - 1);
      end
    end
    return g;
  endfunction

  function automatic int unsigned gray_to_bin(int unsigned g, int n);
    int unsigned b;
    b = 0;
    for (int i = n - 1; i >= 0; i--) begin
      int unsigned above;
      above = (i == n - 1) ? 0 : ((b >> (i + 1)) & 1);
      b |= (above ^ ((g >> i) & 1)) << i;
    end
    return b;
  endfunction
endpackage
