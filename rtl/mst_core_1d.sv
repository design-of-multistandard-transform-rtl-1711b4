// mst_core_1d: one-dimensional eight-path CSDA multistandard transform core.
//
// Transforms eight samples per clock. The datapath follows the CSDA-MST
// structure: a selected butterfly (sbf) splits the samples into an even and
// an odd four-sample vector; the even-part and odd-part CSDA units (csda_e,
// csda_o) produce, per output, the distributed-arithmetic partial sums of
// every canonic-signed-digit position; eight error-compensated adder trees
// (ecat) weight, add and round them; and the permutation module (perm)
// orders the eight results. The same core serves as Core-1 (row pass) and
// Core-2 (column pass) of the 2-D transform, with different word lengths
// set by IN_W and OUT_W.
//
// Modes (mst_pkg::mode_e): MPEG-1/2/4 8-point DCT, H.264 8- and 4-point,
// VC-1 8- and 4-point. In a 4-point mode, lanes 0..3 and 4..7 carry two
// independent vectors and t[0..3], t[4..7] are their transforms.
//
// Timing: two register stages. Samples presented with in_valid in cycle n
// appear on t with out_valid in cycle n+2; a new vector is accepted every
// cycle, so throughput is eight samples per clock. The mode travels with the
// data, so it may change on any cycle. The split into two stages (after the
// CSDA units and after the adder trees) is this design's choice. Reset is
// asynchronous, active low.
module mst_core_1d
  import mst_pkg::*;
#(
  parameter int unsigned IN_W  = 9,   // input sample width
  parameter int unsigned OUT_W = 12   // output coefficient width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  mode_e                   in_mode,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output mode_e                   out_mode,
  output logic signed [OUT_W-1:0] t [8]
);

  localparam int unsigned AW = IN_W + 1;   // butterfly output width
  localparam int unsigned PW = AW + 3;     // partial-sum width

  // Stage 0: butterfly and CSDA (combinational).
  logic signed [AW-1:0] a [4], b [4];
  logic signed [PW-1:0] ye [4][NDIG], yo [4][NDIG];

  sbf #(.IN_W(IN_W)) u_sbf (.mode(in_mode), .x(x), .a(a), .b(b));
  csda_e #(.AW(AW)) u_csda_e (.mode(in_mode), .a(a), .y(ye));
  csda_o #(.AW(AW)) u_csda_o (.mode(in_mode), .b(b), .y(yo));

  // Stage 1 registers: partial sums, ordered by output index Z0..Z7.
  logic                 s1_valid;
  mode_e                s1_mode;
  logic signed [PW-1:0] s1_y [8][NDIG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_mode  <= M_MPEG8;
      for (int k = 0; k < 8; k++)
        for (int j = 0; j < NDIG; j++)
          s1_y[k][j] <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_mode <= in_mode;
        for (int k = 0; k < 4; k++) begin
          s1_y[2*k]   <= ye[k];   // Z0, Z2, Z4, Z6
          s1_y[2*k+1] <= yo[k];   // Z1, Z3, Z5, Z7
        end
      end
    end
  end

  // Stage 1: eight adder trees and the permutation (combinational).
  logic signed [OUT_W-1:0] z [8], tp [8];

  for (genvar k = 0; k < 8; k++) begin : g_ecat
    ecat #(.PW(PW), .OUT_W(OUT_W)) u_ecat (.mode(s1_mode), .y(s1_y[k]), .z(z[k]));
  end

  perm #(.W(OUT_W)) u_perm (.mode(s1_mode), .z(z), .t(tp));

  // Stage 2 registers: core outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= M_MPEG8;
      for (int k = 0; k < 8; k++) t[k] <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_mode <= s1_mode;
        t        <= tp;
      end
    end
  end

endmodule
