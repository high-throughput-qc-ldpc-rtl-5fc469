// sub_switch_network: fixed-wire cyclic rotation of one sub-block.
//
// In this decoder every slot of every CNBPs group always sees the same
// circulant shift, so the switch that would normally be a barrel shifter or
// crossbar reduces to a constant permutation of wires (no logic at all).
// Forward (SN1/SN3): dout[r] = din[(r + SHIFT) mod Z], i.e. row r of the
// circulant gets the variable it is connected to. Inverse (SN2):
// dout[(r + SHIFT) mod Z] = din[r], which puts updated variables back in
// column order. The rotation convention is this design's reading of
// "right cyclic shift". Purely combinational.
module sub_switch_network
  import ldpc_pkg::*;
#(
  parameter int unsigned SHIFT   = 0,
  parameter bit          INVERSE = 1'b0
) (
  input  blk_t din,
  output blk_t dout
);
  for (genvar r = 0; r < Z; r++) begin : g_wire
    if (!INVERSE) begin : g_fwd
      assign dout[r] = din[(r + SHIFT) % Z];
    end else begin : g_inv
      assign dout[(r + SHIFT) % Z] = din[r];
    end
  end
endmodule
