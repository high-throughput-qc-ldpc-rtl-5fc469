// tb_c2v_memory: writes random C2V words layer by layer, reads them back for
// each layer through the 32:8 MUXes, checks that a read and a write of
// different layers in the same cycle do not interfere, that unused slots do
// not write, and that rd_zero returns zero.
module tb_c2v_memory;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  layer_t     rd_layer, wr_layer;
  logic       rd_zero, wr_en;
  c2v_layer_t rd_data, wr_data;

  c2v_memory u_dut (.clk, .rd_layer, .rd_zero, .rd_data, .wr_en, .wr_layer, .wr_data);

  int model [4][PAR][DC][Z];   // by layer, group, slot
  localparam int W [4] = '{5, 7, 6, 8};

  task automatic rand_write(input int c);
    wr_layer = layer_t'(c);
    wr_en = 1;
    for (int g = 0; g < PAR; g++) for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++) begin
      wr_data[g][j][r] = c2v_t'($urandom_range(0, 62) - 31);
      if (j < W[c]) model[c][g][j][r] = int'(wr_data[g][j][r]);
    end
  endtask

  task automatic check_read(input int c);
    rd_layer = layer_t'(c);
    #1;
    for (int g = 0; g < PAR; g++) for (int j = 0; j < W[c]; j++) for (int r = 0; r < Z; r++) begin
      checks++;
      if (int'(rd_data[g][j][r]) != (rd_zero ? 0 : model[c][g][j][r])) failures++;
    end
  endtask

  initial begin
    rd_zero = 0; wr_en = 0; rd_layer = 0; wr_layer = 0; wr_data = '0;
    for (int c = 0; c < 4; c++) begin
      rand_write(c);
      @(posedge clk); #1 wr_en = 0;
    end
    for (int c = 0; c < 4; c++) check_read(c);
    // read layer c while writing layer c+2
    for (int k = 0; k < 8; k++) begin
      automatic int c = k % 4;
      rand_write((c + 2) % 4);
      check_read(c);
      @(posedge clk); #1 wr_en = 0;
    end
    for (int c = 0; c < 4; c++) check_read(c);
    rd_zero = 1;
    for (int c = 0; c < 4; c++) check_read(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
