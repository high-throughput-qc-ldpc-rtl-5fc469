// cnbp: pipelined check-node-based processor for one row of a block row.
//
// Implements the approximate layered update with two pipeline registers:
//   stage 1: L = sat(y - R_old) for every slot (bit extension, subtract,
//            quantization), then conversion to sign-magnitude;
//   ---- pipeline register ----
//   stage 2: modified min-sum (min_sum_unit) gives the new C2V messages
//            in sign-magnitude form;
//   ---- pipeline register ----
//   stage 3: two's complement of the new C2V message, quantized to WC2V
//            bits (R_new), and y_new = sat(y_latest - R_old + R_new), where
//            y_latest is the
//            variable message read from the BURA in this cycle (via SN3).
// R_old travels with the row through both registers. y_latest is the only
// operand that joins late, so updates made by the two layers ahead of this
// one in the pipeline are not lost. Results (nc2v, nvm) are valid two cycles
// after the operands, qualified by out_valid, and are combinational in the
// latest_vm input of that cycle. The stage split follows the published CNBP
// pipeline; widths and saturation points are this design's choice.
module cnbp
  import ldpc_pkg::*;
#(
  parameter int unsigned NIN = DC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  msg_t [NIN-1:0]    vm,         // variable messages (after SN1)
  input  c2v_t [NIN-1:0]    c2v,        // old C2V messages (from memory)
  input  logic [NIN-1:0]    mask,       // slot is an edge
  input  msg_t [NIN-1:0]    latest_vm,  // stage 3: latest variable messages (after SN3)
  output logic              out_valid,
  output c2v_t [NIN-1:0]    nc2v,       // new C2V messages
  output msg_t [NIN-1:0]    nvm         // new variable messages
);
  // ---------------- stage 1 ----------------
  logic [NIN-1:0] s1_sgn;
  mag_t [NIN-1:0] s1_mag;
  msg_t           l_msg;

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      l_msg     = sat_msg(int'(vm[i]) - int'(c2v[i]));
      s1_sgn[i] = l_msg[WMSG-1];
      s1_mag[i] = l_msg[WMSG-1] ? mag_t'(-l_msg) : mag_t'(l_msg);
    end
  end

  // pipeline register 1
  logic           p1_valid;
  logic [NIN-1:0] p1_sgn, p1_mask;
  mag_t [NIN-1:0] p1_mag;
  c2v_t [NIN-1:0] p1_c2v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1_valid <= 1'b0;
    else        p1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    p1_sgn  <= s1_sgn;
    p1_mag  <= s1_mag;
    p1_mask <= mask;
    p1_c2v  <= c2v;
  end

  // ---------------- stage 2 ----------------
  logic [NIN-1:0] s2_sgn;
  mag_t [NIN-1:0] s2_mag;

  min_sum_unit #(.NIN(NIN)) u_ms (
    .sgn    (p1_sgn),
    .mag    (p1_mag),
    .mask   (p1_mask),
    .out_sgn(s2_sgn),
    .out_mag(s2_mag)
  );

  // pipeline register 2
  logic           p2_valid;
  logic [NIN-1:0] p2_sgn;
  mag_t [NIN-1:0] p2_mag;
  c2v_t [NIN-1:0] p2_c2v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p2_valid <= 1'b0;
    else        p2_valid <= p1_valid;
  end
  always_ff @(posedge clk) begin
    p2_sgn <= s2_sgn;
    p2_mag <= s2_mag;
    p2_c2v <= p1_c2v;
  end

  // ---------------- stage 3 ----------------
  int   r_new;

  always_comb begin
    for (int i = 0; i < NIN; i++) begin
      r_new   = p2_sgn[i] ? -int'(p2_mag[i]) : int'(p2_mag[i]);
      nc2v[i] = sat_c2v(r_new);
      nvm[i]  = sat_msg(int'(latest_vm[i]) - int'(p2_c2v[i]) + int'(nc2v[i]));
    end
  end

  assign out_valid = p2_valid;
endmodule
