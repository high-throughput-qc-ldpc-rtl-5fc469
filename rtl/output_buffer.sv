// output_buffer: hands out the hard decisions of a decoded codeword.
//
// On `capture` it copies all N hard-decision bits (bit index column*Z + row)
// and then presents them one block column per cycle, column 0 first, for
// NCOL cycles (out_valid high, out_last on the final beat). There is no
// back-pressure. `busy` is high while beats remain; the controller does not
// capture again until it falls. Streaming every code bit, not only the
// information bits, is this design's choice.
module output_buffer
  import ldpc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture,
  input  logic [N-1:0]  hard,
  output logic          busy,
  output logic          out_valid,
  output logic [Z-1:0]  out_bits,
  output logic          out_last
);
  logic [N-1:0]              sr;
  logic [$clog2(NCOL+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (capture) cnt <= ($clog2(NCOL+1))'(NCOL);
    else if (cnt != 0) cnt <= cnt - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (capture)        sr <= hard;
    else if (cnt != 0)  sr <= sr >> Z;
  end

  assign busy      = (cnt != 0);
  assign out_valid = busy;
  assign out_bits  = sr[Z-1:0];
  assign out_last  = (cnt == 1);
endmodule
