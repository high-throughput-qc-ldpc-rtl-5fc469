// tb_iter5_workload: the decoder with its iteration limit set to 5 (the
// comparison point used for other WPAN decoders). Three lightly noisy
// all-zero codewords are decoded with early termination off; each must take
// 4*5+2 = 22 cycles from the first layer to the end of the last write-back,
// report 5 iterations, and come out as the all-zero codeword.
module tb_iter5_workload;
  import ldpc_pkg::*;

  localparam int IT  = 5;
  localparam int NFR = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, et_en;
  llr_blk_t      in_llr;
  logic          out_valid, out_last, early_term, busy;
  logic [Z-1:0]  out_bits;
  logic [3:0]    iters;

  qc_ldpc_decoder #(.MAX_IT(IT)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int t_start, dec_cyc [$];
  bit in_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.load) t_start = cycle + 1;
    if (dut.u_ctrl.state == 2'd3 /* DONE */ && !in_done) dec_cyc.push_back(cycle - t_start);
    in_done = (dut.u_ctrl.state == 2'd3 /* DONE */);
  end

  int frames = 0, ones = 0, beats = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int r = 0; r < Z; r++) if (out_bits[r]) ones++;
    beats++;
    if (out_last) begin
      int dc;
      dc = dec_cyc.pop_front();
      checks += 4;
      if (dc != 4 * IT + 2) begin failures++; $display("FAIL: decode took %0d cycles", dc); end
      if (iters != 4'(IT) || early_term) begin failures++; $display("FAIL: iters %0d", iters); end
      if (ones != 0) begin failures++; $display("FAIL: %0d residual errors", ones); end
      if (beats != NCOL) failures++;
      $display("codeword %0d: %0d cycles, %0d iterations", frames, dc, iters);
      frames++; ones = 0; beats = 0;
    end
  end

  initial begin
    in_valid = 1'b0; in_llr = '0; et_en = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < NFR; f++)
      for (int b = 0; b < NCOL; b++) begin
        for (int r = 0; r < Z; r++) begin
          // mostly confident, one wrong bit in every 64
          automatic int v = ($urandom_range(0, 63) == 0) ? -int'($urandom_range(1, 6)) : int'($urandom_range(4, 20));
          in_llr[r] = llr_t'(v);
        end
        in_valid = 1'b1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
    in_valid = 1'b0;
    wait (frames == NFR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
