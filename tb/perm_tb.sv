// perm_tb: self-checking test of the output permutation.
// Checks T = Z in eight-point modes and T = [Z0 Z2 Z4 Z6 Z1 Z3 Z5 Z7] in
// four-point modes, with random words.
module perm_tb;
  import mst_pkg::*;

  localparam int unsigned W = 12;

  mode_e               mode;
  logic signed [W-1:0] z [8], t [8];
  int checks = 0, failures = 0;

  perm #(.W(W)) dut (.mode(mode), .z(z), .t(t));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src [2][8];
    src[0] = '{0, 1, 2, 3, 4, 5, 6, 7};
    src[1] = '{0, 2, 4, 6, 1, 3, 5, 7};
    for (int n = 0; n < 200; n++) begin
      mode = mode_e'(n % 5);
      for (int i = 0; i < 8; i++) z[i] = W'($urandom);
      #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (t[k] != z[src[(mode == M_H264_4 || mode == M_VC1_4) ? 1 : 0][k]]) begin
          failures++;
          $display("mismatch mode=%0d k=%0d", mode, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
