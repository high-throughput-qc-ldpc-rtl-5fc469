// tb_bura: loads a random frame, checks that both read ports present, for
// every layer, the register of the column each slot is mapped to (column
// formula re-typed here: 8*((g+c)%4) + (j+3c)%8), then writes every layer
// with random data and checks that exactly the used columns changed, that
// unused slots write nothing, and the hard-decision output.
module tb_bura;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                load, wr_en;
  llr_blk_t [NCOL-1:0] load_llr;
  layer_t              rd_a_layer, rd_c_layer, wr_layer;
  layer_blk_t          rd_a, rd_c, wr_data;
  logic [N-1:0]        hard;

  bura u_dut (.clk, .load, .load_llr, .rd_a_layer, .rd_a, .rd_c_layer, .rd_c, .wr_en, .wr_layer, .wr_data, .hard);

  int model [NCOL][Z];
  localparam int W [4] = '{5, 7, 6, 8};

  function automatic int colf(int c, int g, int j);
    return 8 * ((g + c) % 4) + ((j + 3 * c) % 8);
  endfunction

  task automatic check_reads();
    for (int c = 0; c < 4; c++) begin
      rd_a_layer = layer_t'(c); rd_c_layer = layer_t'(3 - c);
      #1;
      for (int g = 0; g < PAR; g++) for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++) begin
        checks += 2;
        if (int'(rd_a[g][j][r]) != model[colf(c, g, j)][r])     failures++;
        if (int'(rd_c[g][j][r]) != model[colf(3 - c, g, j)][r]) failures++;
      end
    end
    for (int b = 0; b < NCOL; b++) for (int r = 0; r < Z; r++) begin
      checks++;
      if (hard[b * Z + r] != (model[b][r] < 0)) failures++;
    end
  endtask

  initial begin
    load = 0; wr_en = 0; wr_layer = 0; wr_data = '0; rd_a_layer = 0; rd_c_layer = 0;
    for (int b = 0; b < NCOL; b++) for (int r = 0; r < Z; r++) begin
      automatic int v = int'($urandom_range(0, 63)) - 32;
      load_llr[b][r] = llr_t'(v);
      model[b][r] = v;
    end
    @(posedge clk); #1 load = 1;
    @(posedge clk); #1 load = 0;
    check_reads();
    for (int it = 0; it < 8; it++) begin
      automatic int c = it % 4;
      wr_layer = layer_t'(c);
      wr_en = (it != 5);
      for (int g = 0; g < PAR; g++) for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++)
        wr_data[g][j][r] = msg_t'($urandom_range(0, 254) - 127);
      if (wr_en)
        for (int g = 0; g < PAR; g++) for (int j = 0; j < W[c]; j++) for (int r = 0; r < Z; r++)
          model[colf(c, g, j)][r] = int'(wr_data[g][j][r]);
      @(posedge clk); #1 wr_en = 0;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
