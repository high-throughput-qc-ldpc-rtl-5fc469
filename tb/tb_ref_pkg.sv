// tb_ref_pkg: integer reference of one check-node row update, used by the
// CNBP testbenches. Written from the update equations, independent of the RTL:
//   L_j    = clamp127(y_j - Rold_j)
//   Rnew_j = clamp31( (m - floor(m/8)) * sign ), m = min |L_k| over the other
//            edges k, sign = product of the other edges' signs
//   ynew_j = clamp127(ylatest_j - Rold_j + Rnew_j)
// Slots with mask=0 do not take part.
package tb_ref_pkg;
  function automatic int clampv(int v, int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  task automatic row_ref(input int y[8], input int rold[8], input bit mask[8], input int ylat[8],
                         output int rnew[8], output int ynew[8]);
    int l [8];
    for (int j = 0; j < 8; j++) l[j] = clampv(y[j] - rold[j], 127);
    for (int j = 0; j < 8; j++) begin
      int m = 127;
      int s = 0;
      for (int k = 0; k < 8; k++) if (k != j && mask[k]) begin
        int a = (l[k] < 0) ? -l[k] : l[k];
        if (a < m) m = a;
        if (l[k] < 0) s ^= 1;
      end
      m = m - m / 8;
      rnew[j] = clampv(s ? -m : m, 31);
      ynew[j] = clampv(ylat[j] - rold[j] + rnew[j], 127);
    end
  endtask
endpackage
