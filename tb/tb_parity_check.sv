// tb_parity_check: initialises with random decisions, then samples sequences
// in which zero, one or many bits change, and checks changed/hit against a
// direct comparison with the previously sampled vector.
module tb_parity_check;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic         init, sample, changed, hit;
  logic [K-1:0] init_info, hard_info, prev;
  int           hits = 0;

  parity_check u_dut (.clk, .init, .init_info, .sample, .hard_info, .changed, .hit);

  initial begin
    init = 0; sample = 0; hard_info = '0;
    for (int i = 0; i < K; i++) init_info[i] = 1'($urandom);
    @(posedge clk); #1 init = 1;
    prev = init_info;
    @(posedge clk); #1 init = 0;
    for (int t = 0; t < 200; t++) begin
      automatic int kind = $urandom_range(0, 2);
      hard_info = prev;
      if (kind == 1) hard_info[$urandom_range(0, K - 1)] ^= 1'b1;
      if (kind == 2) for (int i = 0; i < K; i++) hard_info[i] = 1'($urandom);
      sample = (t % 3 != 2);
      #1;
      checks += 2;
      if (changed != (hard_info != prev)) failures++;
      if (hit != (sample && hard_info == prev)) failures++;
      if (hit) hits++;
      if (sample) prev = hard_info;
      @(posedge clk); #1;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
