// tb_output_buffer: captures two random 672-bit words and checks the 32
// beats of 21 bits each, in column order, with out_last on beat 32 and busy
// for exactly 32 cycles.
module tb_output_buffer;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         capture, busy, out_valid, out_last;
  logic [N-1:0] hard;
  logic [Z-1:0] out_bits;

  output_buffer u_dut (.clk, .rst_n, .capture, .hard, .busy, .out_valid, .out_bits, .out_last);

  logic [N-1:0] word;

  initial begin
    capture = 0; hard = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < N; i++) word[i] = 1'($urandom);
      hard = word; capture = 1;
      @(posedge clk); #1 capture = 0; hard = '0;
      for (int b = 0; b < NCOL; b++) begin
        checks += 4;
        if (!out_valid || !busy) failures++;
        if (out_last != (b == NCOL - 1)) failures++;
        for (int r = 0; r < Z; r++) if (out_bits[r] != word[b * Z + r]) begin failures++; break; end
        if (out_bits != word[b * Z +: Z]) failures++;
        @(posedge clk); #1;
      end
      checks++;
      if (out_valid || busy) failures++;
      repeat (3) @(posedge clk);
      #1;
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
