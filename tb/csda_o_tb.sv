// csda_o_tb: self-checking test of the odd-part CSDA.
// For random b0..b3 in every mode, the digit partial sums of each output,
// weighted by 2^j, must equal the exact odd-part products Z1, Z3, Z5, Z7,
// taken here from rows 1, 3, 5, 7 (columns 0..3) of the full reference
// matrices, or the four-point transform of b in four-point modes.
module csda_o_tb;
  import mst_pkg::*;
  import mst_ref_pkg::*;

  localparam int unsigned AW = 10;

  mode_e                mode;
  logic signed [AW-1:0] a [4];
  logic signed [AW+2:0] y [4][NDIG];
  int checks = 0, failures = 0;

  csda_o #(.AW(AW)) dut (.mode(mode), .b(a), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint got, exp;
    for (int n = 0; n < 1000; n++) begin
      mode = mode_e'(n % 5);
      for (int i = 0; i < 4; i++) a[i] = AW'($urandom);
      if (n < 10) for (int i = 0; i < 4; i++) a[i] = (n % 2) ? -512 : 511;
      #1;
      for (int k = 0; k < 4; k++) begin
        got = 0;
        for (int j = 0; j < NDIG; j++) got += longint'(y[k][j]) * (longint'(1) << j);
        exp = 0;
        for (int i = 0; i < 4; i++) begin
          if (mode == M_H264_4 || mode == M_VC1_4)
            exp += longint'(mat4(mode, k, i)) * longint'(a[i]);
          else
            // b_i pairs x_i with -x_{7-i}: odd rows are antisymmetric.
            exp += longint'(mat8(mode, 2*k + 1, i)) * longint'(a[i]);
        end
        checks++;
        if (got != exp) begin
          failures++;
          $display("mismatch mode=%0d out=%0d got=%0d exp=%0d", mode, k, got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
