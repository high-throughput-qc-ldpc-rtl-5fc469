// tb_input_buffer: pushes two frames with random valid gaps, checks that
// full rises after exactly 32 accepted beats, that in_ready falls while full
// (back-pressure), that the frame holds the beats in column order, and that
// take empties the buffer.
module tb_input_buffer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                in_valid, in_ready, full, take;
  llr_blk_t            in_llr;
  llr_blk_t [NCOL-1:0] frame;

  input_buffer u_dut (.clk, .rst_n, .in_valid, .in_ready, .in_llr, .full, .take, .frame);

  llr_blk_t ref_f [NCOL];
  int stalls = 0;

  initial begin
    in_valid = 0; take = 0; in_llr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      automatic int b = 0;
      while (b < NCOL) begin
        in_valid = ($urandom_range(0, 3) != 0);
        for (int r = 0; r < Z; r++) in_llr[r] = llr_t'($urandom);
        #1;
        checks++;
        if (full) failures++;
        if (in_valid) begin ref_f[b] = in_llr; b++; end
        @(posedge clk); #1;
      end
      in_valid = 1;
      #1;
      checks += 2;
      if (!full) failures++;
      if (in_ready) failures++;
      repeat (3) begin
        @(posedge clk); #1;
        if (!in_ready) stalls++;
      end
      for (int k = 0; k < NCOL; k++) begin
        checks++;
        if (frame[k] != ref_f[k]) failures++;
      end
      in_valid = 0; take = 1;
      @(posedge clk); #1 take = 0;
      checks += 2;
      if (full) failures++;
      if (!in_ready) failures++;
    end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
