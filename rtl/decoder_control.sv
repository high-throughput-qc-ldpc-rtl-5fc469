// decoder_control: sequencing of the pipelined layered decoder.
//
// States:
//   IDLE   wait for a full input buffer; then `load` for one cycle (frame ->
//          BURA, channel decisions -> parity check, buffer emptied).
//   DECODE issue one layer per cycle (layer 0,1,2,3,0,...), `first_iter_a`
//          during the first four, for at most MAX_ITER iterations. When
//          early termination is enabled and the parity check reports no
//          change at an iteration boundary, issuing stops at once.
//   DRAIN  wait until the two layers still in the CNBP pipeline are written
//          (DONE is entered in the cycle after the last write-back).
//   DONE   wait for the output buffer to be free, then `capture`.
// The layer index and a valid bit are delayed alongside the CNBP pipeline:
// *_a is the layer entering stage 1, *_c the one in stage 3 (writing back).
// `iter_done` is high one cycle after a layer-3 write-back, when the BURA
// holds the result of a whole iteration. A full decode takes
// 4*MAX_ITER + 2 cycles from the first issue to an empty pipeline.
// `iters` and `early_term` describe the last finished codeword.
// The state machine is this design's own; the cycle budget is the published one.
module decoder_control
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_IT = MAX_ITER
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ibuf_full,
  input  logic        obuf_busy,
  input  logic        et_en,
  input  logic        et_hit,
  output logic        load,
  output logic        issue,
  output layer_t      layer_a,
  output logic        first_iter_a,
  output logic        valid_c,
  output layer_t      layer_c,
  output logic        iter_done,
  output logic        capture,
  output logic [3:0]  iters,
  output logic        early_term,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_DECODE, S_DRAIN, S_DONE} state_t;
  state_t state;

  logic [3:0] iter_cnt;    // iteration of the layer being issued
  logic [3:0] done_cnt;    // iterations completely written back
  logic       valid_b;
  layer_t     layer_b;
  logic       stop_et;
  logic       last_issue;
  logic       et_flag;     // current codeword stopped early

  assign load         = (state == S_IDLE) && ibuf_full;
  assign stop_et      = et_en && et_hit;
  assign issue        = (state == S_DECODE) && !stop_et;
  assign first_iter_a = (iter_cnt == 0);
  assign last_issue   = issue && (layer_a == 2'd3) && (iter_cnt == 4'(MAX_IT - 1));
  assign capture      = (state == S_DONE) && !obuf_busy;
  assign busy         = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      layer_a    <= '0;
      iter_cnt   <= '0;
      done_cnt   <= '0;
      valid_b    <= 1'b0;
      valid_c    <= 1'b0;
      layer_b    <= '0;
      layer_c    <= '0;
      iter_done  <= 1'b0;
      iters      <= '0;
      early_term <= 1'b0;
      et_flag    <= 1'b0;
    end else begin
      valid_b   <= issue;
      layer_b   <= layer_a;
      valid_c   <= valid_b;
      layer_c   <= layer_b;
      iter_done <= valid_c && (layer_c == 2'd3);
      if (iter_done) done_cnt <= done_cnt + 1'b1;

      unique case (state)
        S_IDLE: if (load) begin
          state    <= S_DECODE;
          layer_a  <= '0;
          iter_cnt <= '0;
          done_cnt <= '0;
        end
        S_DECODE: begin
          if (issue) begin
            layer_a <= layer_a + 1'b1;
            if (layer_a == 2'd3) iter_cnt <= iter_cnt + 1'b1;
          end
          if (stop_et || last_issue) state <= S_DRAIN;
          et_flag <= stop_et;
        end
        S_DRAIN: if (!valid_b) state <= S_DONE;   // last write-back is in progress
        S_DONE: if (capture) begin
          state <= S_IDLE;
          iters      <= done_cnt + 4'(iter_done);
          early_term <= et_flag;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A write-back only ever follows an issue two cycles earlier.
  assert property (@(posedge clk) disable iff (!rst_n) valid_c |-> $past(issue, 2))
    else $error("decoder_control: write-back without matching issue");
endmodule
