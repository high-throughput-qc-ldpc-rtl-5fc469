// tb_sub_switch_network: checks the fixed rotation (forward and inverse) for
// several shifts on random sub-blocks, and that inverse undoes forward.
module tb_sub_switch_network;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  blk_t din, f5, f20, i5, back;

  sub_switch_network #(.SHIFT(5),  .INVERSE(1'b0)) u_f5  (.din(din), .dout(f5));
  sub_switch_network #(.SHIFT(20), .INVERSE(1'b0)) u_f20 (.din(din), .dout(f20));
  sub_switch_network #(.SHIFT(5),  .INVERSE(1'b1)) u_i5  (.din(din), .dout(i5));
  sub_switch_network #(.SHIFT(5),  .INVERSE(1'b1)) u_bk  (.din(f5),  .dout(back));

  initial begin
    repeat (50) begin
      for (int r = 0; r < Z; r++) din[r] = msg_t'($urandom);
      #1;
      for (int r = 0; r < Z; r++) begin
        checks += 4;
        if (f5[r]   != din[(r + 5) % Z])  failures++;
        if (f20[r]  != din[(r + 20) % Z]) failures++;
        if (i5[(r + 5) % Z] != din[r])    failures++;
        if (back[r] != din[r])            failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
