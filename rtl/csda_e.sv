// csda_e: even-part common sharing distributed arithmetic (CSDA_E).
//
// Computes the even outputs Z0, Z2, Z4, Z6 of the eight-point transform, or
// the full four-point transform in a four-point mode, from a0..a3:
//   A0 = a0+a3, A1 = a1+a2, B0 = a0-a3, B1 = a1-a2
//   Z0 = c4 (A0+A1)        Z4 = c4 (A0-A1)
//   Z2 = c2 B0 + c6 B1     Z6 = c6 B0 - c2 B1
// The coefficients are not multiplied. Each is expanded into canonic signed
// digits, and for every digit position j the unit outputs the partial sum
//   y[k][j] = sum_i d_{k,i,j} * input_i,   d in {-1, 0, +1},
// so that Z_k = sum_j y[k][j] * 2^j. The input combinations are formed once
// and shared by every digit position and output: A0+A1 and A0-A1 serve all
// digits of Z0 and Z4, and B0, B1, B0+B1, B0-B1 serve Z2 and Z6, each digit
// only choosing one of them through a multiplexer driven by the mode. The
// weighting by 2^j is done by the adder trees that follow (ecat).
// Purely combinational. Output index k = 0..3 stands for Z0, Z2, Z4, Z6.
module csda_e
  import mst_pkg::*;
#(
  parameter int unsigned AW = 10   // width of a0..a3
) (
  input  mode_e                   mode,
  input  logic signed [AW-1:0]    a [4],
  output logic signed [AW+2:0]    y [4][NDIG]
);

  localparam int unsigned PW = AW + 3;   // one spare bit so that negation cannot overflow

  localparam logic [CTAB_W-1:0] DC2 = coef_csd(2);
  localparam logic [CTAB_W-1:0] DC4 = coef_csd(4);
  localparam logic [CTAB_W-1:0] DC6 = coef_csd(6);

  logic signed [PW-1:0] A0, A1, B0, B1;
  logic signed [PW-1:0] sA, dA, sB, dB;

  // d_p * p + d_q * q using the shared sum s = p+q and difference df = p-q.
  function automatic logic signed [PW-1:0] pick(csd_t dp, csd_t dq,
      logic signed [PW-1:0] p, logic signed [PW-1:0] q,
      logic signed [PW-1:0] s, logic signed [PW-1:0] df);
    logic signed [PW-1:0] v;
    if (dp == 0 && dq == 0)      v = '0;
    else if (dq == 0)            v = p;
    else if (dp == 0)            v = q;
    else if (dp == dq)           v = s;
    else                         v = df;
    // The sign of the first non-zero digit sets the sign of the selection.
    if ((dp != 0) ? (dp < 0) : (dq < 0)) v = -v;
    return v;
  endfunction

  always_comb begin
    int unsigned m;
    csd_t d2, d4, d6;
    m  = mode_idx(mode);
    A0 = PW'(a[0]) + PW'(a[3]);
    A1 = PW'(a[1]) + PW'(a[2]);
    B0 = PW'(a[0]) - PW'(a[3]);
    B1 = PW'(a[1]) - PW'(a[2]);
    sA = A0 + A1;
    dA = A0 - A1;
    sB = B0 + B1;
    dB = B0 - B1;
    for (int j = 0; j < NDIG; j++) begin
      d2 = DC2[(m*NDIG + j)*2 +: 2];
      d4 = DC4[(m*NDIG + j)*2 +: 2];
      d6 = DC6[(m*NDIG + j)*2 +: 2];
      y[0][j] = (d4 == 0) ? '0 : (d4 > 0) ? sA : -sA;   // Z0
      y[2][j] = (d4 == 0) ? '0 : (d4 > 0) ? dA : -dA;   // Z4
      y[1][j] = pick(d2, d6, B0, B1, sB, dB);           // Z2 =  c2 B0 + c6 B1
      y[3][j] = pick(d6, csd_t'(-d2), B0, B1, sB, dB);  // Z6 =  c6 B0 - c2 B1
    end
  end

endmodule
