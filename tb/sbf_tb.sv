// sbf_tb: self-checking test of the selected butterfly.
// Drives random 9-bit samples in every mode and compares a and b with the
// butterfly sums and differences (eight-point modes) or with the two
// bypassed four-sample vectors (four-point modes).
module sbf_tb;
  import mst_pkg::*;

  localparam int unsigned IN_W = 9;

  mode_e                  mode;
  logic signed [IN_W-1:0] x [8];
  logic signed [IN_W:0]   a [4], b [4];

  int checks = 0, failures = 0;

  sbf #(.IN_W(IN_W)) dut (.mode(mode), .x(x), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int n = 0; n < 500; n++) begin
      mode = mode_e'(n % 5);
      for (int i = 0; i < 8; i++) x[i] = IN_W'($urandom_range(0, 511));
      if (n < 5) for (int i = 0; i < 8; i++) x[i] = (i < 4) ? -256 : 255;
      #1;
      for (int i = 0; i < 4; i++) begin
        if (mode == M_H264_4 || mode == M_VC1_4) begin
          ea = int'(x[i]);
          eb = int'(x[4+i]);
        end else begin
          ea = int'(x[i]) + int'(x[7-i]);
          eb = int'(x[i]) - int'(x[7-i]);
        end
        checks += 2;
        if (int'(a[i]) != ea || int'(b[i]) != eb) begin
          failures++;
          $display("mismatch mode=%0d i=%0d a=%0d/%0d b=%0d/%0d", mode, i, a[i], ea, b[i], eb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
