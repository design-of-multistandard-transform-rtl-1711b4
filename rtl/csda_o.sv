// csda_o: odd-part common sharing distributed arithmetic (CSDA_O).
//
// In an eight-point mode it computes the odd outputs Z1, Z3, Z5, Z7 from the
// butterfly differences b0..b3 with the 4x4 matrix
//   [ c1  c3  c5  c7 ;  c3 -c7 -c1 -c5 ;  c5 -c1  c7  c3 ;  c7 -c5  c3 -c1 ].
// In a four-point mode the same hardware is given the four-point matrix
//   [ c4  c4  c4  c4 ;  c2  c6 -c6 -c2 ;  c4 -c4 -c4  c4 ;  c6 -c2  c2 -c6 ]
// and b0..b3 is a second four-sample vector, so the core completes two
// four-point transforms per cycle.
// As in csda_e, no coefficient is multiplied: each entry is recoded into
// canonic signed digits and, for digit position j, the unit outputs
//   y[r][j] = sum_i d_{r,i,j} * b_i,   d in {-1, 0, +1},
// with Z_r = sum_j y[r][j] * 2^j formed by the adder trees that follow.
// The pairwise combinations b0+-b1 and b2+-b3 are formed once and shared by
// every digit position of every row; each digit position selects one of
// them by a mode-driven multiplexer and adds the two selections.
// Purely combinational. Output row r = 0..3 stands for Z1, Z3, Z5, Z7.
module csda_o
  import mst_pkg::*;
#(
  parameter int unsigned AW = 10   // width of b0..b3
) (
  input  mode_e                   mode,
  input  logic signed [AW-1:0]    b [4],
  output logic signed [AW+2:0]    y [4][NDIG]
);

  localparam int unsigned PW = AW + 3;
  localparam logic [OTAB_W-1:0] DO = odd_csd();

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
    if ((dp != 0) ? (dp < 0) : (dq < 0)) v = -v;
    return v;
  endfunction

  always_comb begin
    int unsigned m;
    logic signed [PW-1:0] p0, p1, p2, p3, s01, t01, s23, t23;
    csd_t d [4];
    m   = mode_idx(mode);
    p0  = PW'(b[0]);
    p1  = PW'(b[1]);
    p2  = PW'(b[2]);
    p3  = PW'(b[3]);
    s01 = p0 + p1;
    t01 = p0 - p1;
    s23 = p2 + p3;
    t23 = p2 - p3;
    for (int r = 0; r < 4; r++) begin
      for (int j = 0; j < NDIG; j++) begin
        for (int i = 0; i < 4; i++)
          d[i] = DO[(((m*4 + r)*4 + i)*NDIG + j)*2 +: 2];
        y[r][j] = pick(d[0], d[1], p0, p1, s01, t01)
                + pick(d[2], d[3], p2, p3, s23, t23);
      end
    end
  end

endmodule
