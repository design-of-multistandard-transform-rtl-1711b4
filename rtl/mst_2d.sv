// mst_2d: two-dimensional CSDA multistandard transform core.
//
// Row-column decomposition: Core-1 (mst_core_1d, 9-bit in, 12-bit out)
// transforms the rows of an 8x8 tile, the transpose memory (tmem, 64 x 12
// bits) turns rows into columns, and Core-2 (mst_core_1d, 12-bit in, 16-bit
// out) transforms the columns. Eight samples enter and eight coefficients
// leave per clock.
//
// One tile is eight consecutive in_valid vectors, each one row of eight
// 9-bit residuals; the first vector after reset starts a tile. in_type
// (mst_pkg::xform_e) selects the transform and must be the same for the
// eight vectors of a tile: MPEG-1/2/4 8x8, H.264 8x8 and 4x4, VC-1 8x8, 8x4,
// 4x8 and 4x4. Smaller blocks are packed into the 8x8 tile: a 4-wide block
// occupies lanes 0..3 or 4..7 of a row, a 4-high block rows 0..3 or 4..7.
// The output is the coefficient tile transposed: output vector k is column k
// of the 2-D result (for packed 4-high blocks, out_data[0..3] belongs to the
// upper block and out_data[4..7] to the lower one).
//
// Timing: the first output vector of a tile appears 12 cycles after its
// first input vector when rows arrive back to back (5 cycles after the
// last), and the eight output vectors follow on consecutive cycles. Tiles
// may follow each other without a gap. Packing of small blocks, the output
// order and all word lengths other than the 12-bit transpose memory are
// this design's choices.
module mst_2d
  import mst_pkg::*;
#(
  parameter int unsigned IN_W  = 9,    // residual width
  parameter int unsigned MID_W = 12,   // Core-1 output and TMEM word width
  parameter int unsigned OUT_W = 16    // Core-2 output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  xform_e                  in_type,
  input  logic signed [IN_W-1:0]  in_data [8],
  output logic                    out_valid,
  output mode_e                   out_mode,
  output logic signed [OUT_W-1:0] out_data [8]
);

  // Core-1: row pass.
  logic                    c1_valid;
  logic signed [MID_W-1:0] c1_t [8];

  mst_core_1d #(.IN_W(IN_W), .OUT_W(MID_W)) u_core1 (
    .clk, .rst_n,
    .in_valid (in_valid),
    .in_mode  (row_mode(in_type)),
    .x        (in_data),
    .out_valid(c1_valid),
    .out_mode (),
    .t        (c1_t)
  );

  // The column mode of each row follows Core-1's two pipeline stages.
  mode_e cm_d1, cm_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cm_d1 <= M_MPEG8;
      cm_d2 <= M_MPEG8;
    end else begin
      cm_d1 <= col_mode(in_type);
      cm_d2 <= cm_d1;
    end
  end

  // Transpose memory.
  logic                    tm_valid;
  mode_e                   tm_mode;
  logic signed [MID_W-1:0] tm_data [8];

  tmem #(.W(MID_W)) u_tmem (
    .clk, .rst_n,
    .in_valid(c1_valid),
    .in_mode (cm_d2),
    .in_data (c1_t),
    .out_valid(tm_valid),
    .out_mode (tm_mode),
    .out_data (tm_data)
  );

  // Core-2: column pass.
  mst_core_1d #(.IN_W(MID_W), .OUT_W(OUT_W)) u_core2 (
    .clk, .rst_n,
    .in_valid (tm_valid),
    .in_mode  (tm_mode),
    .x        (tm_data),
    .out_valid(out_valid),
    .out_mode (out_mode),
    .t        (out_data)
  );

endmodule
