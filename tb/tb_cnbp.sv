// tb_cnbp: streams a new random row into the CNBP every cycle (with gaps)
// and checks, two cycles later, the new C2V and variable messages against
// the integer reference, with latest_vm supplied in the result cycle.
// Also checks the valid timing (latency exactly 2).
module tb_cnbp;
  import ldpc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  msg_t [DC-1:0] vm, lvm, nvm;
  c2v_t [DC-1:0] c2v, nc2v;
  logic [DC-1:0] mask;

  cnbp u_dut (.clk, .rst_n, .in_valid, .vm, .c2v, .mask, .latest_vm(lvm), .out_valid, .nc2v, .nvm);

  int  q_y [$][8], q_r [$][8];
  bit  q_m [$][8];
  bit  q_v [$];

  initial begin
    in_valid = 0; vm = '0; c2v = '0; mask = '1; lvm = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int y [8], r [8];
      bit m [8];
      in_valid = ($urandom_range(0, 3) != 0);
      mask = (t % 2) ? '1 : DC'($urandom) | DC'(8'h1f);
      for (int j = 0; j < DC; j++) begin
        vm[j]  = msg_t'((t % 7 == 0) ? $urandom_range(0, 255) : $urandom_range(0, 40) - 20);
        c2v[j] = c2v_t'($urandom_range(0, 62) - 31);
        y[j] = int'(vm[j]); r[j] = int'(c2v[j]); m[j] = mask[j];
        lvm[j] = msg_t'($urandom);
      end
      q_y.push_back(y); q_r.push_back(r); q_m.push_back(m); q_v.push_back(in_valid);
      #1;
      if (q_v.size() == 3) begin
        int ylat [8], rn [8], yn [8];
        bit v;
        for (int j = 0; j < DC; j++) ylat[j] = int'(lvm[j]);
        row_ref(q_y[0], q_r[0], q_m[0], ylat, rn, yn);
        v = q_v[0];
        checks++;
        if (out_valid != v) failures++;
        if (v) for (int j = 0; j < DC; j++) if (q_m[0][j]) begin
          checks += 2;
          if (int'(nc2v[j]) != rn[j]) failures++;
          if (int'(nvm[j]) != yn[j]) failures++;
        end
        void'(q_y.pop_front()); void'(q_r.pop_front()); void'(q_m.pop_front()); void'(q_v.pop_front());
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
