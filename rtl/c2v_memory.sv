// c2v_memory: check-to-variable message memory.
//
// NCOL=32 dual-port banks, one per block column, each NLAYER=4 words deep;
// a word is one sub-block of Z C2V messages of WC2V bits. Word c of bank b holds the
// messages of the block of layer c that sits in block column b, so the four
// words at one address form a "group" with the C2V messages of the four
// block rows of that layer. Every cycle one group is read (for the layer
// entering the CNBPs) and another is written (for the layer leaving them);
// the two layers differ by the pipeline depth, so a bank never reads and
// writes the same word. Write side: per CNBPs group an 8:32 DEMUX (slot j of
// group g -> bank col_of(layer,g,j)); read side: the matching 32:8 MUX.
// Read is combinational; `rd_zero` forces zero (first iteration, when no
// C2V message exists yet). Write takes effect at the clock edge.
module c2v_memory
  import ldpc_pkg::*;
(
  input  logic        clk,
  input  layer_t      rd_layer,
  input  logic        rd_zero,
  output c2v_layer_t  rd_data,
  input  logic        wr_en,
  input  layer_t      wr_layer,
  input  c2v_layer_t  wr_data
);
  c2v_blk_t mem [NCOL][NLAYER];

  // 8:32 DEMUX per group (slot feeding each bank resolved at elaboration)
  logic [NCOL-1:0] wen;
  c2v_blk_t        wdat [NCOL];

  for (genvar b = 0; b < NCOL; b++) begin : g_demux
    logic [NLAYER-1:0] cand_en;
    c2v_blk_t          cand [NLAYER];
    for (genvar c = 0; c < NLAYER; c++) begin : g_layer
      localparam int S = slot_at(c, b);
      if (S >= 0) begin : g_used
        assign cand_en[c] = 1'b1;
        assign cand[c]    = wr_data[S / DC][S % DC];
      end else begin : g_free
        assign cand_en[c] = 1'b0;
        assign cand[c]    = '0;
      end
    end
    assign wen[b]  = wr_en && cand_en[wr_layer];
    assign wdat[b] = cand[wr_layer];

    always_ff @(posedge clk) begin
      if (wen[b]) mem[b][wr_layer] <= wdat[b];
    end
  end

  // 32:8 MUX per group
  for (genvar g = 0; g < PAR; g++) begin : g_rd_grp
    for (genvar j = 0; j < DC; j++) begin : g_rd_slot
      c2v_blk_t cand [NLAYER];
      for (genvar c = 0; c < NLAYER; c++) begin : g_layer
        assign cand[c] = mem[col_of(c, g, j)][c];
      end
      assign rd_data[g][j] = rd_zero ? '0 : cand[rd_layer];
    end
  end
endmodule
