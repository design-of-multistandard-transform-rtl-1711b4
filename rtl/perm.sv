// perm: output permutation of the 1-D MST core.
//
// The adder trees deliver Z0..Z7 in natural order. For an eight-point
// transform the output T equals Z. In a four-point mode the even path holds
// the transform of the first four-sample vector (Z0, Z2, Z4, Z6) and the odd
// path that of the second (Z1, Z3, Z5, Z7), so the module regroups them:
//   T0..T3 = Z0, Z2, Z4, Z6   and   T4..T7 = Z1, Z3, Z5, Z7.
// Purely combinational.
module perm
  import mst_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  mode_e                 mode,
  input  logic signed [W-1:0]   z [8],
  output logic signed [W-1:0]   t [8]
);

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      if (is_four_point(mode)) begin
        t[k]   = z[2*k];
        t[4+k] = z[2*k+1];
      end else begin
        t[k]   = z[k];
        t[4+k] = z[4+k];
      end
    end
  end

endmodule
