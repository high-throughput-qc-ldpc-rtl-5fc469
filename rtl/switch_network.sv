// switch_network: SN1, SN2 or SN3 of one CNBPs group.
//
// Eight sub-switch networks, one per row slot. Slot j of group G is always
// rotated by shift_of(G, j) (the group's fixed shift sequence), so the whole
// network is fixed wiring. INVERSE=0 gives SN1/SN3 (BURA -> CNBPs),
// INVERSE=1 gives SN2 (CNBPs -> BURA). Combinational.
module switch_network
  import ldpc_pkg::*;
#(
  parameter int unsigned G       = 0,
  parameter bit          INVERSE = 1'b0
) (
  input  row_blk_t din,
  output row_blk_t dout
);
  for (genvar j = 0; j < DC; j++) begin : g_sub
    sub_switch_network #(.SHIFT(shift_of(G, j)), .INVERSE(INVERSE)) u_sub (
      .din (din[j]),
      .dout(dout[j])
    );
  end
endmodule
