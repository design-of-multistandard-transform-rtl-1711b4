// sbf: selected butterfly, the first stage of the 1-D MST core.
//
// In an eight-point mode it forms the butterfly of the eight input samples,
//   a_i = x_i + x_{7-i},  b_i = x_i - x_{7-i}   (i = 0..3),
// which splits the transform into the even part (fed by a) and the odd part
// (fed by b). In a four-point mode the eight lanes carry two independent
// four-sample vectors, and the butterfly is bypassed: a = x0..x3 goes to the
// even part and b = x4..x7 to the odd part, which then computes a second
// four-point transform. Purely combinational; outputs are one bit wider than
// the inputs. The bypass arrangement for four-point vectors is this design's
// reading of the selected-butterfly block.
module sbf
  import mst_pkg::*;
#(
  parameter int unsigned IN_W = 9
) (
  input  mode_e                   mode,
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [IN_W:0]    a [4],
  output logic signed [IN_W:0]    b [4]
);

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (is_four_point(mode)) begin
        a[i] = (IN_W+1)'(x[i]);
        b[i] = (IN_W+1)'(x[4+i]);
      end else begin
        a[i] = (IN_W+1)'(x[i]) + (IN_W+1)'(x[7-i]);
        b[i] = (IN_W+1)'(x[i]) - (IN_W+1)'(x[7-i]);
      end
    end
  end

endmodule
