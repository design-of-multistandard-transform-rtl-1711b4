// ecat: error-compensated adder tree (ECAT) for one transform output.
//
// Takes the NDIG distributed-arithmetic partial sums y[j] of one output,
// weights each by 2^j and adds them, giving the full-precision product
// Z = sum_j y[j] * 2^j. The result is then brought to the core's output word
// length by an arithmetic right shift that depends on the mode
// (mst_pkg::out_shift). The truncation error of that shift is compensated by
// adding half an output LSB before shifting (round half up), and a result
// that would not fit OUT_W bits saturates. Rounding as the compensation
// method and saturation are this design's choices. Purely combinational.
module ecat
  import mst_pkg::*;
#(
  parameter int unsigned PW    = 13,  // width of each partial sum
  parameter int unsigned OUT_W = 12   // width of the rounded output
) (
  input  mode_e                  mode,
  input  logic signed [PW-1:0]   y [NDIG],
  output logic signed [OUT_W-1:0] z
);

  localparam int unsigned ACC_W = PW + NDIG + 1;

  logic signed [ACC_W-1:0] acc, rnd, sh;

  always_comb begin
    int unsigned s;
    s   = out_shift(mode);
    acc = '0;
    for (int j = 0; j < NDIG; j++)
      acc = acc + (ACC_W'(y[j]) <<< j);
    rnd = (s == 0) ? acc : acc + (ACC_W'(1) <<< (s - 1));
    sh  = rnd >>> s;
    if (sh > ACC_W'(2**(OUT_W-1) - 1))
      z = {1'b0, {(OUT_W-1){1'b1}}};
    else if (sh < -ACC_W'(2**(OUT_W-1)))
      z = {1'b1, {(OUT_W-1){1'b0}}};
    else
      z = OUT_W'(sh);
  end

endmodule
