// tb_cnbp_group: random block rows into the 21 parallel CNBPs; every row of
// the result, two cycles later, is checked against the integer reference.
module tb_cnbp_group;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid;
  row_blk_t      vm, lvm, nvm;
  c2v_row_t      c2v, nc2v;
  logic [DC-1:0] mask;

  cnbp_group u_dut (.clk, .rst_n, .in_valid, .vm, .c2v, .mask, .latest_vm(lvm), .out_valid, .nc2v, .nvm);

  row_blk_t      h_vm   [3];
  c2v_row_t      h_c2v  [3];
  logic [DC-1:0] h_mask [3];
  bit            h_v    [3];

  initial begin
    in_valid = 0; vm = '0; c2v = '0; mask = '1; lvm = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      in_valid = (t % 4 != 3);
      mask = DC'(8'hff >> (t % 4));
      for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++) begin
        vm[j][r]  = msg_t'($urandom_range(0, 60) - 30);
        c2v[j][r] = c2v_t'($urandom_range(0, 62) - 31);
        lvm[j][r] = msg_t'($urandom);
      end
      h_vm[2] = h_vm[1]; h_c2v[2] = h_c2v[1]; h_mask[2] = h_mask[1]; h_v[2] = h_v[1];
      h_vm[1] = h_vm[0]; h_c2v[1] = h_c2v[0]; h_mask[1] = h_mask[0]; h_v[1] = h_v[0];
      h_vm[0] = vm;      h_c2v[0] = c2v;      h_mask[0] = mask;      h_v[0] = in_valid;
      #1;
      if (t >= 2) begin
        checks++;
        if (out_valid != h_v[2]) failures++;
        if (h_v[2]) for (int r = 0; r < Z; r++) begin
          int y [8], ro [8], yl [8], rn [8], yn [8];
          bit m [8];
          for (int j = 0; j < DC; j++) begin
            y[j] = int'(h_vm[2][j][r]); ro[j] = int'(h_c2v[2][j][r]);
            yl[j] = int'(lvm[j][r]);    m[j] = h_mask[2][j];
          end
          row_ref(y, ro, m, yl, rn, yn);
          for (int j = 0; j < DC; j++) if (m[j]) begin
            checks += 2;
            if (int'(nc2v[j][r]) != rn[j]) failures++;
            if (int'(nvm[j][r]) != yn[j]) failures++;
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
