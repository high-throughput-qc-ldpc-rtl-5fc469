// input_buffer: collects the channel values of the next codeword.
//
// A shift register of NCOL sub-blocks. Each accepted beat (in_valid &&
// in_ready) carries the Z channel values of one block column, in column
// order; it enters at the top and the register shifts down, so after NCOL
// beats column b sits in frame[b] and `full` rises. While full the buffer
// refuses input (in_ready=0) until `take`, which the controller asserts in
// the cycle the frame is copied into the BURA. A new frame can therefore be
// collected while the previous one is being decoded. The beat format and
// handshake are this design's choice.
module input_buffer
  import ldpc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  llr_blk_t             in_llr,
  output logic                 full,
  input  logic                 take,
  output llr_blk_t [NCOL-1:0]  frame
);
  logic [$clog2(NCOL+1)-1:0] cnt;

  assign full     = (cnt == ($clog2(NCOL+1))'(NCOL));
  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  cnt <= '0;
    else if (take)               cnt <= '0;
    else if (in_valid && !full)  cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (in_valid && !full) begin
      for (int b = 0; b < NCOL - 1; b++) frame[b] <= frame[b+1];
      frame[NCOL-1] <= in_llr;
    end
  end
endmodule
