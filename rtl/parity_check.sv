// parity_check: early-termination unit.
//
// Instead of evaluating all parity equations, it watches whether the hard
// decisions of the M information bits still change: M flip-flops keep the
// decisions of the previous sample, M XOR gates compare them with the
// current ones and one M-input OR says whether any bit changed. `init`
// loads `init_info`, the decisions of the channel values, when a codeword
// is loaded;
// `sample` (one cycle after the last layer of an iteration has been written)
// compares and stores. `hit` = sample && no bit changed, combinational.
// Sampling once per iteration and initialising from the channel values are
// this design's choices.
module parity_check
  import ldpc_pkg::*;
#(
  parameter int unsigned M = K
) (
  input  logic          clk,
  input  logic          init,
  input  logic [M-1:0]  init_info,
  input  logic          sample,
  input  logic [M-1:0]  hard_info,
  output logic          changed,
  output logic          hit
);
  logic [M-1:0] prev;

  assign changed = |(prev ^ hard_info);
  assign hit     = sample && !changed;

  always_ff @(posedge clk) begin
    if (init)        prev <= init_info;
    else if (sample) prev <= hard_info;
  end
endmodule
