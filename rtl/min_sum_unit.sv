// min_sum_unit: modified (normalised) min-sum check-node update.
//
// Input: sign and magnitude of the L messages of one row (DC slots) and a
// mask of the slots that are real edges. The unit finds the smallest and
// second-smallest magnitude, the position of the smallest, and the product
// of all signs. For each edge v the new C2V magnitude is alpha * (min over
// the other edges), alpha = 0.875 implemented as m - (m >> 3) with
// truncation, and its sign is the product of the other edges' signs.
// Slots that are not edges are treated as magnitude 127 with a positive sign.
// Combinational; the CNBP registers around it.
module min_sum_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned NIN = DC
) (
  input  logic [NIN-1:0]  sgn,
  input  mag_t [NIN-1:0]  mag,
  input  logic [NIN-1:0]  mask,
  output logic [NIN-1:0]  out_sgn,
  output mag_t [NIN-1:0]  out_mag
);
  mag_t min1, min2, m, sel;
  logic [$clog2(NIN)-1:0] idx;
  logic prod;

  always_comb begin
    min1 = '1;
    min2 = '1;
    idx  = '0;
    prod = 1'b0;
    for (int i = 0; i < NIN; i++) begin
      m = mask[i] ? mag[i] : '1;
      if (m < min1) begin
        min2 = min1;
        min1 = m;
        idx  = ($clog2(NIN))'(i);
      end else if (m < min2) begin
        min2 = m;
      end
      prod ^= mask[i] & sgn[i];
    end
    for (int i = 0; i < NIN; i++) begin
      sel        = (idx == ($clog2(NIN))'(i)) ? min2 : min1;
      out_mag[i] = sel - (sel >> 3);
      out_sgn[i] = prod ^ (mask[i] & sgn[i]);
    end
  end
endmodule
