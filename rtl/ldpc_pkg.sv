// ldpc_pkg: constants, message types and base-matrix tables shared by the
// pipelined four block-parallel layered QC-LDPC decoder.
//
// The code is the 672-bit rate-1/2 quasi-cyclic code of the 60 GHz WPAN
// standard: 16 block rows x 32 block columns of Z=21 circulants. Block rows
// g, g+4, g+8 and g+12 (g = 0..3) use the same sequence of circulant shifts,
// so CNBPs group g always applies the same rotation in each of its eight row
// slots and every switch network is fixed wiring. One layer = four block rows
// (one per group) processed in one clock cycle; four layers are one iteration.
//
// Tables:
//   shift_of(g,j)    circulant shift of slot j of group g. Groups 0 and 3 are
//                    the published sequences; slots 5..7 of groups 1 and 2 are
//                    this design's placeholders.
//   row_weight(c)    non-zero blocks per block row in layer c (5,7,6,8, from the
//                    published switching pattern of group 0).
//   col_of(c,g,j)    block column used by slot j of group g in layer c. The
//                    column positions are this design's own choice:
//                    8*((g+c) mod 4) + ((j+3c) mod 8); it keeps the four block
//                    rows of a layer column-disjoint, which is what makes the
//                    block-parallel schedule legal. Replace these tables with
//                    the standard's matrix to decode standard codewords.
//
// Message format: channel values are WIN=6 bits with 2 fraction bits; variable
// and L messages are WMSG=8 bits, check-to-variable (C2V) messages are
// WC2V=6 bits, all with the same scaling. "Quantization" saturates
// symmetrically to +-(2^(W-1)-1). Keeping C2V messages narrower than the
// variable messages matters: with equal widths, a saturated variable message
// minus a large old C2V message loses information every iteration and the
// decoder drifts away from the codeword.
package ldpc_pkg;

  localparam int unsigned Z        = 21;   // circulant size
  localparam int unsigned NCOL     = 32;   // block columns = BURA registers
  localparam int unsigned NLAYER   = 4;    // layers per iteration
  localparam int unsigned PAR      = 4;    // block rows per layer (CNBPs groups)
  localparam int unsigned DC       = 8;    // row slots per CNBP
  localparam int unsigned WIN      = 6;    // channel value width
  localparam int unsigned WMSG     = 8;    // variable / L message width
  localparam int unsigned WC2V     = 6;    // stored C2V message width
  localparam int unsigned WMAG     = WMSG - 1;
  localparam int unsigned N        = Z * NCOL;       // 672 code bits
  localparam int unsigned K        = N / 2;          // 336 information bits
  localparam int unsigned MAX_ITER = 12;

  localparam int MSG_MAX = (1 << (WMSG - 1)) - 1;    // +127
  localparam int C2V_MAX = (1 << (WC2V - 1)) - 1;    // +31

  typedef logic signed [WMSG-1:0] msg_t;             // one message
  typedef msg_t [Z-1:0]            blk_t;            // one sub-block (Z messages)
  typedef blk_t [DC-1:0]           row_blk_t;        // the eight slots of one group
  typedef row_blk_t [PAR-1:0]      layer_blk_t;      // all slots of one layer
  typedef logic signed [WIN-1:0]   llr_t;            // channel value
  typedef llr_t [Z-1:0]            llr_blk_t;
  typedef logic signed [WC2V-1:0]  c2v_t;            // one C2V message
  typedef c2v_t [Z-1:0]            c2v_blk_t;
  typedef c2v_blk_t [DC-1:0]       c2v_row_t;
  typedef c2v_row_t [PAR-1:0]      c2v_layer_t;
  typedef logic [1:0]              layer_t;          // layer index 0..3
  typedef logic [WMAG-1:0]         mag_t;

  // Circulant shifts, listed group-major, first entry = group 0 slot 0; entry PAR*DC-1-(g*DC+j) is the shift of slot j of group g.
  localparam logic [PAR*DC-1:0][4:0] SHIFTS = {
    5'd5,  5'd18, 5'd3,  5'd10, 5'd5,  5'd4,  5'd5,  5'd7,    // group 0 (block rows 1,5,9,13)
    5'd0,  5'd16, 5'd6,  5'd0,  5'd7,  5'd11, 5'd2,  5'd19,   // group 1 (block rows 2,6,10,14)
    5'd6,  5'd7,  5'd2,  5'd9,  5'd20, 5'd14, 5'd1,  5'd8,    // group 2 (block rows 3,7,11,15)
    5'd18, 5'd0,  5'd10, 5'd16, 5'd9,  5'd12, 5'd4,  5'd17    // group 3 (block rows 4,8,12,16)
  };

  // Circulant shift of slot j of group g.
  function automatic int unsigned shift_of(int unsigned g, int unsigned j);
    return int'(SHIFTS[PAR*DC - 1 - ((g % PAR) * DC + (j % DC))]);
  endfunction

  // Non-zero blocks per block row in layer c.
  function automatic int unsigned row_weight(int unsigned c);
    case (c % NLAYER)
      0:       return 5;
      1:       return 7;
      2:       return 6;
      default: return 8;
    endcase
  endfunction

  // Block column of slot j of group g in layer c.
  function automatic int unsigned col_of(int unsigned c, int unsigned g, int unsigned j);
    return 8 * ((g + c) % 4) + ((j + 3 * c) % 8);
  endfunction

  // Slot j of every group is a real edge in layer c.
  function automatic logic slot_used(int unsigned c, int unsigned j);
    return j < row_weight(c);
  endfunction

  // Symmetric saturation of a wide signed value to a message.
  function automatic msg_t sat_msg(int signed v);
    if (v > MSG_MAX)       return msg_t'(MSG_MAX);
    else if (v < -MSG_MAX) return msg_t'(-MSG_MAX);
    else                   return msg_t'(v);
  endfunction

  // Symmetric saturation of a wide signed value to a C2V message.
  function automatic c2v_t sat_c2v(int signed v);
    if (v > C2V_MAX)       return c2v_t'(C2V_MAX);
    else if (v < -C2V_MAX) return c2v_t'(-C2V_MAX);
    else                   return c2v_t'(v);
  endfunction

  // Row slot (g*DC + j) that uses block column b in layer c, or -1.
  function automatic int slot_at(int unsigned c, int unsigned b);
    for (int g = 0; g < PAR; g++)
      for (int j = 0; j < DC; j++)
        if (slot_used(c, j) && col_of(c, g, j) == b) return g * DC + j;
    return -1;
  endfunction

endpackage
