// bura: bit updating register array.
//
// Holds the current variable (a-posteriori) message of every code bit as
// NCOL=32 registers of Z messages, one register per block column. Around it
// sit the selection networks that connect it to the four CNBPs groups:
//   - read port A (to SN1): for the layer entering the pipeline, slot j of
//     group g gets register col_of(layer, g, j);
//   - read port C (to SN3): same selection for the layer in the last
//     pipeline stage, giving the latest variable messages;
//   - write port (from SN2): the updated sub-blocks of the last stage are
//     written back to the same registers (a DEMUX per group); the four block
//     rows of a layer never share a column, so writes never collide.
// Because the column table is fixed, each slot only chooses among four
// registers (one per layer). `load` copies a whole frame of channel values
// (sign-extended to WMSG bits) in one clock and has priority over a write.
// `hard` is the sign bit of every message, bit index = column*Z + row.
// Reads are combinational; writes take effect at the clock edge.
module bura
  import ldpc_pkg::*;
(
  input  logic                  clk,
  input  logic                  load,
  input  llr_blk_t [NCOL-1:0]   load_llr,
  input  layer_t                rd_a_layer,
  output layer_blk_t            rd_a,
  input  layer_t                rd_c_layer,
  output layer_blk_t            rd_c,
  input  logic                  wr_en,
  input  layer_t                wr_layer,
  input  layer_blk_t            wr_data,
  output logic [N-1:0]          hard
);
  blk_t regs [NCOL];

  // write DEMUX: in each layer at most one slot feeds a register; which one
  // is fixed by the base matrix and resolved at elaboration.
  logic [NCOL-1:0] wen;
  blk_t            wdat [NCOL];

  for (genvar b = 0; b < NCOL; b++) begin : g_demux
    logic [NLAYER-1:0] cand_en;
    blk_t              cand [NLAYER];
    for (genvar c = 0; c < NLAYER; c++) begin : g_layer
      localparam int S = slot_at(c, b);
      if (S >= 0) begin : g_used
        assign cand_en[c] = 1'b1;
        assign cand[c]    = wr_data[S / DC][S % DC];
      end else begin : g_free
        assign cand_en[c] = 1'b0;
        assign cand[c]    = regs[b];
      end
    end
    assign wen[b]  = wr_en && cand_en[wr_layer];
    assign wdat[b] = cand[wr_layer];
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < NCOL; b++) begin
      if (load) begin
        for (int r = 0; r < Z; r++) regs[b][r] <= msg_t'(load_llr[b][r]);
      end else if (wen[b]) begin
        regs[b] <= wdat[b];
      end
    end
  end

  // read MUXes: each slot chooses among the four registers it can meet
  for (genvar g = 0; g < PAR; g++) begin : g_rd_grp
    for (genvar j = 0; j < DC; j++) begin : g_rd_slot
      blk_t cand [NLAYER];
      for (genvar c = 0; c < NLAYER; c++) begin : g_layer
        assign cand[c] = regs[col_of(c, g, j)];
      end
      assign rd_a[g][j] = cand[rd_a_layer];
      assign rd_c[g][j] = cand[rd_c_layer];
    end
  end

  for (genvar b = 0; b < NCOL; b++) begin : g_hard
    for (genvar r = 0; r < Z; r++) begin : g_bit
      assign hard[b*Z + r] = regs[b][r][WMSG-1];
    end
  end
endmodule
