// cnbp_group: one "CNBPs" unit, Z check-node-based processors in parallel.
//
// Processes one whole block row per clock: CNBP r takes element r of each of
// the eight slot sub-blocks. Same two-cycle pipeline as cnbp; operands in
// cycle t, results in cycle t+2 (combinational in latest_vm of that cycle).
module cnbp_group
  import ldpc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  row_blk_t       vm,
  input  c2v_row_t       c2v,
  input  logic [DC-1:0]  mask,
  input  row_blk_t       latest_vm,
  output logic           out_valid,
  output c2v_row_t       nc2v,
  output row_blk_t       nvm
);
  logic [Z-1:0] ov;

  for (genvar r = 0; r < Z; r++) begin : g_row
    msg_t [DC-1:0] vm_r, lvm_r, nvm_r;
    c2v_t [DC-1:0] c2v_r, nc2v_r;
    for (genvar j = 0; j < DC; j++) begin : g_slot
      assign vm_r[j]     = vm[j][r];
      assign c2v_r[j]    = c2v[j][r];
      assign lvm_r[j]    = latest_vm[j][r];
      assign nc2v[j][r]  = nc2v_r[j];
      assign nvm[j][r]   = nvm_r[j];
    end
    cnbp u_cnbp (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .vm       (vm_r),
      .c2v      (c2v_r),
      .mask     (mask),
      .latest_vm(lvm_r),
      .out_valid(ov[r]),
      .nc2v     (nc2v_r),
      .nvm      (nvm_r)
    );
  end

  assign out_valid = ov[0];
endmodule
