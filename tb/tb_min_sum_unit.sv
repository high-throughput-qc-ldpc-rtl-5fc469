// tb_min_sum_unit: random sign/magnitude rows with random edge masks (at
// least two edges), including ties and zero magnitudes, against an integer
// model of alpha*min over the other edges (alpha = 0.875, truncated).
module tb_min_sum_unit;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic [DC-1:0] sgn, mask, osgn;
  mag_t [DC-1:0] mag, omag;

  min_sum_unit u_dut (.sgn(sgn), .mag(mag), .mask(mask), .out_sgn(osgn), .out_mag(omag));

  initial begin
    for (int t = 0; t < 2000; t++) begin
      sgn  = DC'($urandom);
      mask = (t % 3 == 0) ? '1 : DC'($urandom) | DC'(3);
      for (int j = 0; j < DC; j++)
        mag[j] = (t % 5 == 0) ? mag_t'($urandom_range(0, 3)) : mag_t'($urandom);
      #1;
      for (int j = 0; j < DC; j++) if (mask[j]) begin
        automatic int m = 127;
        automatic bit s = 0;
        for (int k = 0; k < DC; k++) if (k != j && mask[k]) begin
          if (int'(mag[k]) < m) m = int'(mag[k]);
          s ^= sgn[k];
        end
        m = m - (m >> 3);
        checks += 2;
        if (int'(omag[j]) != m) failures++;
        if (osgn[j] != s) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
