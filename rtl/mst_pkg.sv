// mst_pkg: types, coefficient tables and canonic-signed-digit (CSD) helpers
// shared by the multistandard transform (MST) core.
//
// The core computes the 1-D eight-point transform
//   Z = C * x,  with C built from seven coefficients c1..c7 in the usual
//   DCT sign pattern, and the four-point transform built from c2, c4, c6.
// Every supported standard fits that one pattern; only the values of c1..c7
// differ. The values are the integer matrices of H.264 and VC-1 and, for
// MPEG-1/2/4, the DCT cosines cos(k*pi/16) scaled by 64 and rounded (the
// MPEG word length is this design's choice).
//
// Each coefficient is recoded at elaboration into CSD (non-adjacent form)
// digits in {-1, 0, +1}; the distributed-arithmetic units select those
// digits by mode and sum the inputs per digit position.
package mst_pkg;

  // One-dimensional transform mode of a core.
  typedef enum logic [2:0] {
    M_MPEG8  = 3'd0,   // MPEG-1/2/4 8-point DCT
    M_H264_8 = 3'd1,   // H.264 8-point integer transform
    M_H264_4 = 3'd2,   // H.264 4-point integer transform
    M_VC1_8  = 3'd3,   // VC-1 8-point integer transform
    M_VC1_4  = 3'd4    // VC-1 4-point integer transform
  } mode_e;

  localparam int unsigned NMODES = 5;

  // Two-dimensional transform type of a block (width x height).
  typedef enum logic [2:0] {
    T_MPEG_8X8 = 3'd0,
    T_H264_8X8 = 3'd1,
    T_H264_4X4 = 3'd2,
    T_VC1_8X8  = 3'd3,
    T_VC1_8X4  = 3'd4,   // 8 wide, 4 high: 8-point rows, 4-point columns
    T_VC1_4X8  = 3'd5,   // 4 wide, 8 high: 4-point rows, 8-point columns
    T_VC1_4X4  = 3'd6
  } xform_e;

  // Number of CSD digit positions: the largest coefficient (63) needs 2^6.
  localparam int unsigned NDIG = 7;

  // Width of a CSD digit: 2-bit two's complement, values -1, 0, +1.
  typedef logic signed [1:0] csd_t;

  function automatic bit is_four_point(mode_e m);
    return (m == M_H264_4) || (m == M_VC1_4);
  endfunction

  // Row-pass (horizontal) mode of a 2-D transform type.
  function automatic mode_e row_mode(xform_e t);
    case (t)
      T_MPEG_8X8: return M_MPEG8;
      T_H264_8X8: return M_H264_8;
      T_H264_4X4: return M_H264_4;
      T_VC1_8X8:  return M_VC1_8;
      T_VC1_8X4:  return M_VC1_8;
      T_VC1_4X8:  return M_VC1_4;
      T_VC1_4X4:  return M_VC1_4;
      default:    return M_MPEG8;
    endcase
  endfunction

  // Column-pass (vertical) mode of a 2-D transform type.
  function automatic mode_e col_mode(xform_e t);
    case (t)
      T_MPEG_8X8: return M_MPEG8;
      T_H264_8X8: return M_H264_8;
      T_H264_4X4: return M_H264_4;
      T_VC1_8X8:  return M_VC1_8;
      T_VC1_8X4:  return M_VC1_4;
      T_VC1_4X8:  return M_VC1_8;
      T_VC1_4X4:  return M_VC1_4;
      default:    return M_MPEG8;
    endcase
  endfunction

  // Coefficient c_k (k = 1..7) of a mode. Four-point modes define only
  // c2, c4 and c6; the others are zero.
  function automatic int coef(int m, int k);
    logic [63:0] row;   // c7..c1 and a zero c0, eight bits each
    case (m)   // mode_e encodings
      0:        row = {8'd12, 8'd24, 8'd36, 8'd45, 8'd53, 8'd59, 8'd63, 8'd0};
      1:        row = {8'd3,  8'd4,  8'd6,  8'd8,  8'd10, 8'd8,  8'd12, 8'd0};
      2:        row = {8'd0,  8'd1,  8'd0,  8'd1,  8'd0,  8'd2,  8'd0,  8'd0};
      3:        row = {8'd4,  8'd6,  8'd9,  8'd12, 8'd15, 8'd16, 8'd16, 8'd0};
      4:        row = {8'd0,  8'd10, 8'd0,  8'd17, 8'd0,  8'd22, 8'd0,  8'd0};
      default:  row = '0;
    endcase
    return int'(row[(k % 8)*8 +: 8]);
  endfunction

  // Right shift applied by the output adder trees, per mode, so that a
  // 9-bit residual fits the 12-bit transpose memory after the row pass and
  // the 12-bit intermediate fits 16 bits after the column pass.
  function automatic int unsigned out_shift(mode_e m);
    case (m)
      M_MPEG8:  return 6;
      M_H264_8: return 3;
      M_H264_4: return 0;
      M_VC1_8:  return 4;
      M_VC1_4:  return 4;
      default:  return 0;
    endcase
  endfunction

  // Digit j of the CSD (non-adjacent form) recoding of the integer v.
  function automatic int csd_digit(int v, int j);
    int a, d, s;
    s = (v < 0) ? -1 : 1;
    a = (v < 0) ? -v : v;
    for (int i = 0; i <= j; i++) begin
      if (a % 2 == 1) begin
        d = ((a % 4) == 1) ? 1 : -1;
        a = a - d;
      end else begin
        d = 0;
      end
      a = a / 2;
    end
    return s * d;
  endfunction

  // Odd-part coefficient matrix entry (row r, column i, both 0..3).
  // Eight-point modes: rows give Z1, Z3, Z5, Z7 from b0..b3.
  // Four-point modes: rows give the four-point transform of b0..b3.
  function automatic int odd_coef(int m, int r, int i);
    int k, s;
    if ((m == 2) || (m == 4)) begin   // M_H264_4, M_VC1_4
      case (r*4 + i)
        0, 1, 2, 3:   begin k = 4; s = 1;  end
        4, 14:        begin k = 2; s = 1;  end
        5:            begin k = 6; s = 1;  end
        6:            begin k = 6; s = -1; end
        7, 13:        begin k = 2; s = -1; end
        8, 11:        begin k = 4; s = 1;  end
        9, 10:        begin k = 4; s = -1; end
        12:           begin k = 6; s = 1;  end
        15:           begin k = 6; s = -1; end
        default:      begin k = 0; s = 1;  end
      endcase
    end else begin
      case (r*4 + i)
        0:  begin k = 1; s = 1;  end
        1:  begin k = 3; s = 1;  end
        2:  begin k = 5; s = 1;  end
        3:  begin k = 7; s = 1;  end
        4:  begin k = 3; s = 1;  end
        5:  begin k = 7; s = -1; end
        6:  begin k = 1; s = -1; end
        7:  begin k = 5; s = -1; end
        8:  begin k = 5; s = 1;  end
        9:  begin k = 1; s = -1; end
        10: begin k = 7; s = 1;  end
        11: begin k = 3; s = 1;  end
        12: begin k = 7; s = 1;  end
        13: begin k = 5; s = -1; end
        14: begin k = 3; s = 1;  end
        15: begin k = 1; s = -1; end
        default: begin k = 0; s = 1; end
      endcase
    end
    return s * coef(m, k);
  endfunction

  // CSD digits of c_k for every mode, packed as [mode][digit] of 2 bits.
  localparam int unsigned CTAB_W = NMODES * NDIG * 2;
  function automatic logic [CTAB_W-1:0] coef_csd(int k);
    logic [CTAB_W-1:0] t;
    t = '0;
    for (int m = 0; m < NMODES; m++)
      for (int j = 0; j < NDIG; j++)
        t[(m*NDIG + j)*2 +: 2] = 2'(csd_digit(coef(m, k), j));
    return t;
  endfunction

  // CSD digits of the odd-part matrix, packed as [mode][row][col][digit].
  localparam int unsigned OTAB_W = NMODES * 16 * NDIG * 2;
  function automatic logic [OTAB_W-1:0] odd_csd();
    logic [OTAB_W-1:0] t;
    t = '0;
    for (int m = 0; m < NMODES; m++)
      for (int r = 0; r < 4; r++)
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < NDIG; j++)
            t[(((m*4 + r)*4 + i)*NDIG + j)*2 +: 2] = 2'(csd_digit(odd_coef(m, r, i), j));
    return t;
  endfunction

  // Mode as a table index; undefined encodings fall back to mode 0.
  function automatic int unsigned mode_idx(mode_e m);
    return (int'(m) < NMODES) ? int'(m) : 0;
  endfunction

endpackage
