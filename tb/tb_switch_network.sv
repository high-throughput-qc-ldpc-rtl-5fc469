// tb_switch_network: SN1/SN2 of group 3 against that group's shift sequence
// {18,0,10,16,9,12,4,17}, typed in here independently of the package.
module tb_switch_network;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  localparam int SH [8] = '{18, 0, 10, 16, 9, 12, 4, 17};
  row_blk_t din, fwd, inv;

  switch_network #(.G(3), .INVERSE(1'b0)) u_sn1 (.din(din), .dout(fwd));
  switch_network #(.G(3), .INVERSE(1'b1)) u_sn2 (.din(din), .dout(inv));

  initial begin
    repeat (40) begin
      for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++) din[j][r] = msg_t'($urandom);
      #1;
      for (int j = 0; j < DC; j++) for (int r = 0; r < Z; r++) begin
        checks += 2;
        if (fwd[j][r] != din[j][(r + SH[j]) % Z]) failures++;
        if (inv[j][(r + SH[j]) % Z] != din[j][r]) failures++;
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
