// ecat_tb: self-checking test of the error-compensated adder tree.
// Random partial sums are weighted by 2^j and added in the testbench, then
// rounded (half up) by the mode's shift and saturated to OUT_W bits; the
// result must equal the tree output. Includes extreme values to reach
// saturation.
module ecat_tb;
  import mst_pkg::*;

  localparam int unsigned PW = 13, OUT_W = 12;

  mode_e                   mode;
  logic signed [PW-1:0]    y [NDIG];
  logic signed [OUT_W-1:0] z;
  int checks = 0, failures = 0, sat = 0;

  ecat #(.PW(PW), .OUT_W(OUT_W)) dut (.mode(mode), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int shift_of(mode_e m);
    case (m)
      M_MPEG8: return 6;  M_H264_8: return 3;  M_H264_4: return 0;
      M_VC1_8: return 4;  default:  return 4;
    endcase
  endfunction

  initial begin
    longint sum, r, e;
    int s;
    for (int n = 0; n < 2000; n++) begin
      mode = mode_e'(n % 5);
      for (int j = 0; j < NDIG; j++) begin
        y[j] = PW'($urandom);
        if (n % 7 == 0) y[j] = PW'($urandom_range(0, 63));
      end
      #1;
      sum = 0;
      for (int j = 0; j < NDIG; j++) sum += longint'(y[j]) * (longint'(1) << j);
      s = shift_of(mode);
      r = (s == 0) ? sum : (sum + (longint'(1) << (s - 1)));
      e = r >>> s;
      if (e > 2047)  begin e = 2047;  sat++; end
      if (e < -2048) begin e = -2048; sat++; end
      checks++;
      if (longint'(z) != e) begin
        failures++;
        $display("mismatch mode=%0d sum=%0d z=%0d exp=%0d", mode, sum, z, e);
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
