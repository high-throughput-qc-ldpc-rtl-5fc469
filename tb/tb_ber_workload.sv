// tb_ber_workload: bit-error-rate run of the decoder at its default sizes.
//
// BPSK over AWGN at Eb/N0 = 2.0, 2.5 and 3.0 dB for a rate-1/2 code
// (noise variance 1/(Eb/N0)); channel values are 2y/sigma^2 quantized to six
// bits with two fraction bits (scale 4, saturated to -32..31). The all-zero
// codeword is sent, which is a codeword of any parity-check matrix. Early
// termination is on, 12 iterations at most. For each point it reports the
// channel and decoded bit error rates and the average iteration count, and
// checks that every codeword's decode time follows the schedule (4*12+2
// cycles for a full decode, 4*i+8 for a stop after iteration i), that
// decoding never adds errors overall, and that the error rate falls as
// Eb/N0 rises.
module tb_ber_workload;
  import ldpc_pkg::*;

  localparam int NPT = 3;
  localparam int NFR = 12;            // codewords per point
  localparam real EBN0_DB [NPT] = '{2.0, 2.5, 3.0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, et_en;
  llr_blk_t      in_llr;
  logic          out_valid, out_last, early_term, busy;
  logic [Z-1:0]  out_bits;
  logic [3:0]    iters;

  qc_ldpc_decoder dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // decode time of each codeword
  int t_start, dec_cyc [$];
  bit in_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.load) t_start = cycle + 1;
    if (dut.u_ctrl.state == 2'd3 /* DONE */ && !in_done) dec_cyc.push_back(cycle - t_start);
    in_done = (dut.u_ctrl.state == 2'd3 /* DONE */);
  end

  int raw_err = 0, dec_err = 0, it_sum = 0, beat = 0, frames = 0, fr_err = 0, fr_bad = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    for (int r = 0; r < Z; r++) if (out_bits[r]) fr_err++;
    beat++;
    if (out_last) begin
      int dc;
      dc = dec_cyc.pop_front();
      check(beat == NCOL, "codeword length");
      if (early_term) check(dc == 4 * (int'(iters) - 1) + 8, $sformatf("early stop after %0d iterations took %0d cycles", iters, dc));
      else            check(dc == 4 * MAX_ITER + 2 && iters == 4'(MAX_ITER), $sformatf("full decode took %0d cycles", dc));
      dec_err += fr_err;
      if (fr_err != 0) fr_bad++;
      it_sum  += int'(iters);
      frames++;
      fr_err = 0;
      beat = 0;
    end
  end

  real ber_prev;

  initial begin
    in_valid = 1'b0; in_llr = '0; et_en = 1'b1;
    ber_prev = 1.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int p = 0; p < NPT; p++) begin
      real sigma2, ber_raw, ber_dec;
      sigma2 = 1.0 / (10.0 ** (EBN0_DB[p] / 10.0));
      raw_err = 0; dec_err = 0; it_sum = 0; frames = 0; fr_bad = 0;
      for (int f = 0; f < NFR; f++) begin
        for (int b = 0; b < NCOL; b++) begin
          for (int r = 0; r < Z; r++) begin
            real y, l;
            int q;
            y = 1.0 + $sqrt(sigma2) * gauss();
            l = 2.0 * y / sigma2;
            q = int'(l * 4.0);
            if (q > 31) q = 31;
            if (q < -32) q = -32;
            if (q < 0) raw_err++;
            in_llr[r] = llr_t'(q);
          end
          in_valid = 1'b1;
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          #1;
        end
        in_valid = 1'b0;
      end
      wait (frames == NFR);
      ber_raw = real'(raw_err) / real'(NFR * N);
      ber_dec = real'(dec_err) / real'(NFR * N);
      $display("Eb/N0 %.1f dB: channel BER %.5f, decoded BER %.5f, codeword errors %0d/%0d, average iterations %.2f",
               EBN0_DB[p], ber_raw, ber_dec, fr_bad, NFR, real'(it_sum) / real'(NFR));
      check(dec_err <= raw_err, "decoding added errors");
      check(ber_dec <= ber_prev, "error rate did not fall with Eb/N0");
      ber_prev = ber_dec;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
