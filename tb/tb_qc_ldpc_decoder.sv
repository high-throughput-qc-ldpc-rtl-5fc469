// tb_qc_ldpc_decoder: end-to-end test of the decoder at its default sizes.
//
// Channel values for the all-zero codeword with pseudo-Gaussian noise are
// streamed in, one block column per beat, with the input always offered so
// the input buffer fills while the previous codeword is decoded. Every
// codeword is also run through a cycle-level reference model written here
// from the update equations (L = y - R_old; R_new = 0.875*min * sign over the
// other edges, limited to +-31; y_new = y_latest - R_old + R_new with the two-layer pipeline
// lag) and the decoder's 672 output bits, iteration count, early-termination
// flag and decode time (first layer issue to the end of the last
// write-back) must match it. The
// decode time of a 12-iteration codeword must be 4*12+2 = 50 cycles. Runs
// first with early termination off, then on, and counts how often each
// mechanism happened: full 12-iteration runs, early stops, input-buffer
// back-pressure, waits for a busy output buffer, first-iteration zero C2V
// reads, message saturation and pipeline write-back/issue overlap.
module tb_qc_ldpc_decoder;
  import ldpc_pkg::*;

  localparam int NFR0 = 2;   // frames with early termination off
  localparam int NFR1 = 6;   // frames with early termination on
  localparam int NFR  = NFR0 + NFR1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, et_en;
  llr_blk_t      in_llr;
  logic          out_valid, out_last, early_term, busy;
  logic [Z-1:0]  out_bits;
  logic [3:0]    iters;

  qc_ldpc_decoder dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ---------------------------------------------------------------------
  // reference model
  // ---------------------------------------------------------------------
  int  llr_q   [NFR][NCOL][Z];
  bit  exp_bit [NFR][N];
  int  exp_it  [NFR];
  bit  exp_et  [NFR];
  int  exp_cyc [NFR];
  bit  fr_et   [NFR];
  int  n_sat = 0;

  function automatic int clampm(int v);
    if (v > 127)  begin n_sat++; return 127;  end
    if (v < -127) begin n_sat++; return -127; end
    return v;
  endfunction

  task automatic model(input int f);
    int y [NCOL][Z];
    int rm [NLAYER][NCOL][Z];
    bit prev [K];
    // two pipeline slots: stage 2 and stage 3
    bit p_v [2];
    int p_c [2];
    int p_rold [2][PAR][DC][Z];
    int p_rnew [2][PAR][DC][Z];
    int issued, t, done_it, total;
    bit stop, hit, idone, etf;
    total = 4 * MAX_ITER;
    for (int b = 0; b < NCOL; b++) for (int r = 0; r < Z; r++) begin
      y[b][r] = llr_q[f][b][r];
      for (int c = 0; c < NLAYER; c++) rm[c][b][r] = 0;
    end
    for (int i = 0; i < K; i++) prev[i] = (y[i / Z][i % Z] < 0);
    p_v[0] = 0; p_v[1] = 0;
    issued = 0; t = 0; done_it = 0; stop = 0; idone = 0; etf = 0;
    forever begin
      // iteration-boundary sample
      hit = 0;
      if (idone) begin
        bit changed = 0;
        done_it++;
        for (int i = 0; i < K; i++) begin
          bit h = (y[i / Z][i % Z] < 0);
          if (h != prev[i]) changed = 1;
          prev[i] = h;
        end
        if (fr_et[f] && !changed && !stop && issued < total) hit = 1;
      end
      if (hit) begin stop = 1; etf = 1; end
      // new stage-2 contents
      begin
        bit nv = 0;
        int nc = 0;
        int rold [PAR][DC][Z];
        int rnew [PAR][DC][Z];
        if (!stop && issued < total) begin
          nv = 1;
          nc = issued % 4;
          for (int g = 0; g < PAR; g++) for (int r = 0; r < Z; r++) begin
            int lv [DC];
            int m1, m2, ix, sp;
            m1 = 127; m2 = 127; ix = 0; sp = 0;
            for (int j = 0; j < DC; j++) begin
              int b = col_of(nc, g, j);
              int s = shift_of(g, j);
              rold[g][j][r] = (issued < 4) ? 0 : rm[nc][b][r];
              lv[j] = clampm(y[b][(r + s) % Z] - rold[g][j][r]);
              if (j < int'(row_weight(nc))) begin
                int a = (lv[j] < 0) ? -lv[j] : lv[j];
                if (a < m1) begin m2 = m1; m1 = a; ix = j; end
                else if (a < m2) m2 = a;
                if (lv[j] < 0) sp ^= 1;
              end
            end
            for (int j = 0; j < DC; j++) begin
              int mm = (j == ix) ? m2 : m1;
              int sg = sp ^ ((j < int'(row_weight(nc)) && lv[j] < 0) ? 1 : 0);
              mm = mm - (mm / 8);
              if (mm > 31) begin mm = 31; n_sat++; end
              rnew[g][j][r] = (sg != 0) ? -mm : mm;
            end
          end
          issued++;
        end
        // stage 3 write-back of the layer two behind
        idone = 0;
        if (p_v[1]) begin
          int c = p_c[1];
          for (int g = 0; g < PAR; g++) for (int j = 0; j < int'(row_weight(c)); j++) begin
            int b = col_of(c, g, j);
            int s = shift_of(g, j);
            for (int r = 0; r < Z; r++) begin
              y[b][(r + s) % Z] = clampm(y[b][(r + s) % Z] - p_rold[1][g][j][r] + p_rnew[1][g][j][r]);
              rm[c][b][r] = p_rnew[1][g][j][r];
            end
          end
          if (c == 3) idone = 1;
        end
        p_v[1] = p_v[0]; p_c[1] = p_c[0]; p_rold[1] = p_rold[0]; p_rnew[1] = p_rnew[0];
        p_v[0] = nv;     p_c[0] = nc;     p_rold[0] = rold;      p_rnew[0] = rnew;
      end
      t++;
      if (!p_v[1] && (stop || issued == total)) break;
    end
    if (idone) done_it++;
    // t = cycles from the first layer issue to the cycle after the last write-back
    exp_cyc[f] = t;
    exp_it[f]  = done_it;
    exp_et[f]  = etf;
    for (int i = 0; i < N; i++) exp_bit[f][i] = (y[i / Z][i % Z] < 0);
  endtask

  // ---------------------------------------------------------------------
  // stimulus
  // ---------------------------------------------------------------------
  int raw_err [NFR];

  function automatic int noise(int k);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 64));
    return ((s - 128) * k) / 64;
  endfunction

  task automatic make_frame(input int f, input int k);
    raw_err[f] = 0;
    for (int b = 0; b < NCOL; b++) for (int r = 0; r < Z; r++) begin
      int v = 8 + noise(k);
      if (v > 31) v = 31;
      if (v < -32) v = -32;
      llr_q[f][b][r] = v;
      if (v < 0) raw_err[f]++;
    end
  endtask

  int n_ibuf_stall = 0, n_obuf_wait = 0, n_first_zero = 0, n_overlap = 0;
  int n_full = 0, n_et = 0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_ibuf_stall++;
    if (dut.u_ctrl.state == 2'd3 /* DONE */ && dut.obuf_busy) n_obuf_wait++;
    if (dut.issue && dut.first_iter_a) n_first_zero++;
    if (dut.issue && dut.valid_c) n_overlap++;
  end

  // decode time: first layer issue after load, to the first cycle in DONE
  // (the result is complete in the BURA from then on)
  int t_start, dec_cyc [$];
  bit in_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.load) t_start = cycle + 1;
    if (dut.u_ctrl.state == 2'd3 /* DONE */ && !in_done) dec_cyc.push_back(cycle - t_start);
    in_done = (dut.u_ctrl.state == 2'd3 /* DONE */);
  end

  task automatic send_frame(input int f);
    for (int b = 0; b < NCOL; b++) begin
      for (int r = 0; r < Z; r++) in_llr[r] = llr_t'(llr_q[f][b][r]);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
  endtask

  // ---------------------------------------------------------------------
  // output monitor
  // ---------------------------------------------------------------------
  int rx_frame = 0, rx_beat = 0, resid [NFR];
  bit mism;

  always @(posedge clk) if (rst_n && out_valid) begin
    if (rx_beat == 0) begin
      mism = 0;
      resid[rx_frame] = 0;
    end
    for (int r = 0; r < Z; r++) begin
      if (out_bits[r] != exp_bit[rx_frame][rx_beat * Z + r]) mism = 1;
      if (out_bits[r]) resid[rx_frame]++;
    end
    check(out_last == (rx_beat == NCOL - 1), "out_last position");
    rx_beat++;
    if (rx_beat == NCOL) begin
      int dc;
      dc = dec_cyc.pop_front();
      check(!mism, $sformatf("frame %0d: hard decisions differ from model", rx_frame));
      check(int'(iters) == exp_it[rx_frame],
            $sformatf("frame %0d: iters %0d, model %0d", rx_frame, iters, exp_it[rx_frame]));
      check(early_term == exp_et[rx_frame], $sformatf("frame %0d: early_term", rx_frame));
      check(dc == exp_cyc[rx_frame],
            $sformatf("frame %0d: decode took %0d cycles, model %0d", rx_frame, dc, exp_cyc[rx_frame]));
      if (!exp_et[rx_frame]) begin
        check(dc == 4 * MAX_ITER + 2, $sformatf("frame %0d: full decode %0d cycles, expected 50", rx_frame, dc));
        n_full++;
      end else n_et++;
      $display("frame %0d: raw errors %0d, residual %0d, iterations %0d, early %0b, %0d cycles",
               rx_frame, raw_err[rx_frame], resid[rx_frame], iters, early_term, dc);
      rx_frame++;
      rx_beat = 0;
    end
  end

  // ---------------------------------------------------------------------
  initial begin
    in_valid = 1'b0;
    in_llr   = '0;
    et_en    = 1'b0;
    for (int f = 0; f < NFR; f++) begin
      make_frame(f, (f == NFR0 + 1) ? 0 : 6 + (f % 3));
      fr_et[f] = (f >= NFR0);
      model(f);
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int f = 0; f < NFR0; f++) send_frame(f);
    wait (rx_frame == NFR0);
    @(posedge clk); #1;
    et_en = 1'b1;
    for (int f = NFR0; f < NFR; f++) send_frame(f);
    wait (rx_frame == NFR);
    repeat (5) @(posedge clk);
    // low-noise frames must decode to the all-zero codeword
    for (int f = 0; f < NFR; f++)
      if (raw_err[f] < 30) check(resid[f] == 0, $sformatf("frame %0d not corrected", f));
    $display("mechanisms: full=%0d early=%0d ibuf_stall=%0d obuf_wait=%0d first_iter_zero=%0d overlap=%0d saturation=%0d",
             n_full, n_et, n_ibuf_stall, n_obuf_wait, n_first_zero, n_overlap, n_sat);
    check(n_full > 0,       "no 12-iteration decode");
    check(n_et > 0,         "no early termination");
    check(n_ibuf_stall > 0, "input buffer never applied back-pressure");
    check(n_obuf_wait > 0,  "never waited for the output buffer");
    check(n_first_zero > 0, "first-iteration zero read never used");
    check(n_overlap > 0,    "pipeline never overlapped issue and write-back");
    check(n_sat > 0,        "message saturation never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
