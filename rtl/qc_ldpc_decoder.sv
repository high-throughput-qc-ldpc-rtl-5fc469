// qc_ldpc_decoder: pipelined four block-parallel layered decoder (4-BPLDA)
// for the 672-bit rate-1/2 QC-LDPC code of 60 GHz WPAN.
//
// Structure: input buffer -> bit updating register array (BURA) -> per CNBPs
// group g (0..3): SN1 (fixed rotation) -> CNBPs (21 two-stage pipelined
// check-node processors) -> SN2 (inverse rotation) -> BURA. SN3 feeds the
// latest BURA contents into the last CNBP stage. The C2V memory supplies the
// previous C2V messages of each layer and receives the new ones. Each clock
// one layer (four block rows, one per group) enters the pipeline, so an
// iteration of 16 block rows takes 4 cycles; a whole codeword takes
// 4*iterations + 2 cycles. Layer l reads variable messages that include the
// updates of layers up to l-3 (p = 2); its write-back uses
// y_latest - R_old + R_new so that no update is overwritten.
// The parity check module stops decoding when the information-bit decisions
// did not change over an iteration (if et_en), else MAX_IT (12) iterations
// are run.
//
// Interface: in_valid/in_ready, one block column (21 six-bit channel values,
// 2 fraction bits, positive = bit 0) per beat, 32 beats per codeword; out_valid
// with 21 hard decisions per beat, 32 beats, out_last on the last. iters and
// early_term describe the last codeword sent out.
module qc_ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned MAX_IT = MAX_ITER   // iteration limit (12)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  llr_blk_t      in_llr,
  input  logic          et_en,
  output logic          out_valid,
  output logic [Z-1:0]  out_bits,
  output logic          out_last,
  output logic [3:0]    iters,
  output logic          early_term,
  output logic          busy
);
  // ---------------- control ----------------
  logic   ibuf_full, obuf_busy, et_hit, load, issue, first_iter_a;
  logic   valid_c, iter_done, capture;
  layer_t layer_a, layer_c;

  decoder_control #(.MAX_IT(MAX_IT)) u_ctrl (
    .clk, .rst_n, .ibuf_full, .obuf_busy, .et_en, .et_hit,
    .load, .issue, .layer_a, .first_iter_a, .valid_c, .layer_c,
    .iter_done, .capture, .iters, .early_term, .busy
  );

  // ---------------- input buffer ----------------
  llr_blk_t [NCOL-1:0] frame;

  input_buffer u_ibuf (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .full(ibuf_full), .take(load), .frame
  );

  // ---------------- BURA ----------------
  layer_blk_t   bura_a, bura_c, wb_vm;
  logic [N-1:0] hard;

  bura u_bura (
    .clk,
    .load      (load),
    .load_llr  (frame),
    .rd_a_layer(layer_a),
    .rd_a      (bura_a),
    .rd_c_layer(layer_c),
    .rd_c      (bura_c),
    .wr_en     (valid_c),
    .wr_layer  (layer_c),
    .wr_data   (wb_vm),
    .hard      (hard)
  );

  // ---------------- C2V memory ----------------
  c2v_layer_t c2v_old, c2v_new;

  c2v_memory u_mem (
    .clk,
    .rd_layer(layer_a),
    .rd_zero (first_iter_a),
    .rd_data (c2v_old),
    .wr_en   (valid_c),
    .wr_layer(layer_c),
    .wr_data (c2v_new)
  );

  // ---------------- four CNBPs groups with their switch networks ----------------
  logic [DC-1:0] mask_a;
  always_comb
    for (int j = 0; j < DC; j++) mask_a[j] = (j < int'(row_weight(int'(layer_a))));

  for (genvar g = 0; g < PAR; g++) begin : g_grp
    row_blk_t vm_sn1, lvm_sn3, nvm;
    logic     grp_valid;

    switch_network #(.G(g), .INVERSE(1'b0)) u_sn1 (.din(bura_a[g]), .dout(vm_sn1));
    switch_network #(.G(g), .INVERSE(1'b0)) u_sn3 (.din(bura_c[g]), .dout(lvm_sn3));

    cnbp_group u_cnbps (
      .clk, .rst_n,
      .in_valid (issue),
      .vm       (vm_sn1),
      .c2v      (c2v_old[g]),
      .mask     (mask_a),
      .latest_vm(lvm_sn3),
      .out_valid(grp_valid),
      .nc2v     (c2v_new[g]),
      .nvm      (nvm)
    );

    switch_network #(.G(g), .INVERSE(1'b1)) u_sn2 (.din(nvm), .dout(wb_vm[g]));

    // the CNBP pipeline and the controller's delay line must agree
    assert property (@(posedge clk) disable iff (!rst_n) grp_valid == valid_c)
      else $error("CNBPs group %0d out of step with control", g);
  end

  // ---------------- early termination ----------------
  logic         pc_changed;
  logic [K-1:0] ch_info;     // decisions of the channel values being loaded

  for (genvar i = 0; i < K; i++) begin : g_ch_info
    assign ch_info[i] = frame[i / Z][i % Z][WIN-1];
  end

  parity_check u_pc (
    .clk,
    .init     (load),
    .init_info(ch_info),
    .sample   (iter_done),
    .hard_info(hard[K-1:0]),
    .changed  (pc_changed),
    .hit      (et_hit)
  );

  // ---------------- output buffer ----------------
  output_buffer u_obuf (
    .clk, .rst_n, .capture, .hard,
    .busy(obuf_busy), .out_valid, .out_bits, .out_last
  );
endmodule
