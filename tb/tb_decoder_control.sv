// tb_decoder_control: runs the controller on its own. Checks for a full
// decode: 48 issues with layers 0,1,2,3 repeating, first_iter_a only on the
// first four, valid_c/layer_c two cycles behind issue/layer_a, iter_done one
// cycle after each layer-3 write-back, DONE 4*12+2 cycles after the first
// issue, capture held off while the output buffer is busy, iters = 12.
// Then an early stop: et_hit at the second iteration boundary must stop
// issuing at once and report early_term with 2 iterations.
module tb_decoder_control;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ibuf_full, obuf_busy, et_en, load, issue, first_iter_a;
  logic       valid_c, iter_done, capture, early_term, busy;
  layer_t     layer_a, layer_c;
  logic [3:0] iters;

  decoder_control u_dut (.clk, .rst_n, .ibuf_full, .obuf_busy, .et_en, .et_hit, .load, .issue,
                         .layer_a, .first_iter_a, .valid_c, .layer_c, .iter_done, .capture,
                         .iters, .early_term, .busy);

  int cyc = 0, n_issue = 0, n_first = 0, t0 = -1, t_cap = -1, t_done = -1, n_idone = 0, hold = 0;
  bit     et_phase = 0;
  logic   et_hit;
  // parity-check stand-in: reports "no change" at the second iteration boundary
  assign et_hit = et_phase && iter_done && (n_idone == 1);
  bit     h_v [3];
  layer_t h_l [3];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    h_v[2] = h_v[1]; h_v[1] = h_v[0]; h_v[0] = issue;
    h_l[2] = h_l[1]; h_l[1] = h_l[0]; h_l[0] = layer_a;
    if (issue) begin
      if (t0 < 0) t0 = cyc;
      checks++;
      if (int'(layer_a) != n_issue % 4) failures++;
      if (first_iter_a) n_first++;
      n_issue++;
    end
    checks++;
    if (valid_c != h_v[2] || (valid_c && layer_c != h_l[2])) failures++;
    if (iter_done) n_idone++;
    if (u_dut.state == 2'd3 /* DONE */ && t_done < 0) t_done = cyc;
    if (u_dut.state == 2'd3 /* DONE */ && obuf_busy) hold++;
    if (capture) t_cap = cyc;
  end

  initial begin
    ibuf_full = 0; obuf_busy = 0; et_en = 0;
    h_v = '{0, 0, 0}; h_l = '{0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---- full decode ----
    ibuf_full = 1;
    #1;
    checks++;
    if (!load) failures++;
    @(posedge clk); #1 ibuf_full = 0; obuf_busy = 1;
    wait (t_done >= 0);
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (capture) failures++;
    obuf_busy = 0;
    wait (t_cap >= 0);
    @(posedge clk); #1;
    checks += 6;
    if (n_issue != 4 * MAX_ITER) failures++;
    if (n_first != 4) failures++;
    if (t_done - t0 != 4 * MAX_ITER + 2) begin failures++; $display("done after %0d", t_done - t0); end
    if (n_idone != MAX_ITER) failures++;
    if (iters != 4'(MAX_ITER) || early_term) failures++;
    if (hold == 0) failures++;
    // ---- early stop after the second iteration ----
    n_issue = 0; t0 = -1; t_done = -1; t_cap = -1; n_idone = 0;
    et_en = 1;
    ibuf_full = 1;
    @(posedge clk); #1 ibuf_full = 0;
    et_phase = 1;
    wait (et_hit);
    #1;
    checks++;
    if (issue) failures++;
    wait (t_cap >= 0);
    @(posedge clk); #1;
    checks += 3;
    if (n_issue != 4 * 2 + 2) begin failures++; $display("issued %0d", n_issue); end
    if (iters != 4'd2 || !early_term) begin failures++; $display("iters %0d et %0b", iters, early_term); end
    if (t_done - t0 != 4 * 1 + 8) begin failures++; $display("et done after %0d", t_done - t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
