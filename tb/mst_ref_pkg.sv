// mst_ref_pkg: reference model used by the testbenches.
//
// Holds the transform matrices of each standard written out in full (H.264
// and VC-1 as printed in their standards, MPEG as round(64*cos(k*pi/16)) in
// the DCT basis computed with $cos), and computes the exact 1-D transform of
// eight lanes, followed by the same round-half-up shift and saturation the
// hardware applies. Independent of the RTL's CSD tables.
package mst_ref_pkg;
  import mst_pkg::*;

  function automatic int mat8(mode_e m, int r, int c);
    int h264 [8][8] = '{
      '{ 8,   8,   8,   8,   8,   8,   8,   8},
      '{12,  10,   6,   3,  -3,  -6, -10, -12},
      '{ 8,   4,  -4,  -8,  -8,  -4,   4,   8},
      '{10,  -3, -12,  -6,   6,  12,   3, -10},
      '{ 8,  -8,  -8,   8,   8,  -8,  -8,   8},
      '{ 6, -12,   3,  10, -10,  -3,  12,  -6},
      '{ 4,  -8,   8,  -4,  -4,   8,  -8,   4},
      '{ 3,  -6,  10, -12,  12, -10,   6,  -3}};
    int vc1 [8][8] = '{
      '{12,  12,  12,  12,  12,  12,  12,  12},
      '{16,  15,   9,   4,  -4,  -9, -15, -16},
      '{16,   6,  -6, -16, -16,  -6,   6,  16},
      '{15,  -4, -16,  -9,   9,  16,   4, -15},
      '{12, -12, -12,  12,  12, -12, -12,  12},
      '{ 9, -16,   4,  15, -15,  -4,  16,  -9},
      '{ 6, -16,  16,  -6,  -6,  16, -16,   6},
      '{ 4,  -9,  15, -16,  16, -15,   9,  -4}};
    real v;
    case (m)
      M_H264_8: return h264[r][c];
      M_VC1_8:  return vc1[r][c];
      default: begin
        v = 64.0 * $cos(3.14159265358979 * real'((2*c + 1) * r) / 16.0);
        if (r == 0) v = 64.0 * $cos(3.14159265358979 / 4.0);
        return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    endcase
  endfunction

  function automatic int mat4(mode_e m, int r, int c);
    int h264 [4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int vc1  [4][4] = '{'{17, 17, 17, 17}, '{22, 10, -10, -22}, '{17, -17, -17, 17}, '{10, -22, 22, -10}};
    return (m == M_H264_4) ? h264[r][c] : vc1[r][c];
  endfunction

  function automatic int shift_of(mode_e m);
    case (m)
      M_MPEG8: return 6;  M_H264_8: return 3;  M_H264_4: return 0;
      M_VC1_8: return 4;  default:  return 4;
    endcase
  endfunction

  function automatic longint round_sat(longint v, int s, int w);
    longint r, hi, lo;
    r  = (s == 0) ? v : ((v + (longint'(1) << (s - 1))) >>> s);
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    return (r > hi) ? hi : (r < lo) ? lo : r;
  endfunction

  typedef longint vec8_t [8];

  // Exact (unrounded) 1-D transform of eight lanes, in output order T.
  function automatic vec8_t xform_exact(mode_e m, vec8_t x);
    vec8_t t;
    for (int k = 0; k < 8; k++) t[k] = 0;
    if (m == M_H264_4 || m == M_VC1_4) begin
      for (int h = 0; h < 2; h++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++)
            t[4*h + r] += longint'(mat4(m, r, c)) * x[4*h + c];
    end else begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          t[r] += longint'(mat8(m, r, c)) * x[c];
    end
    return t;
  endfunction

  // 1-D transform as the hardware delivers it: rounded and saturated.
  function automatic vec8_t xform(mode_e m, vec8_t x, int w);
    vec8_t t;
    t = xform_exact(m, x);
    for (int k = 0; k < 8; k++) t[k] = round_sat(t[k], shift_of(m), w);
    return t;
  endfunction
endpackage
