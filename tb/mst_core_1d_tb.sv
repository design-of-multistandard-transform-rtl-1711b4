// mst_core_1d_tb: self-checking test of the 1-D CSDA-MST core.
// Two instances are tested side by side: the Core-1 word lengths (9-bit in,
// 12-bit out) and the Core-2 word lengths (12-bit in, 16-bit out). Random
// vectors, extreme vectors and idle cycles are driven with a mode that
// changes every cycle; each output vector is compared with the reference
// transform (exact matrix product, round half up, saturate) and must appear
// exactly two cycles after its input.
module mst_core_1d_tb;
  import mst_pkg::*;
  import mst_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                in_valid;
  mode_e               in_mode;
  logic signed [8:0]   x1 [8];
  logic signed [11:0]  x2 [8];
  logic                v1, v2;
  mode_e               m1, m2;
  logic signed [11:0]  t1 [8];
  logic signed [15:0]  t2 [8];

  int checks = 0, failures = 0, cycle = 0;

  mst_core_1d #(.IN_W(9),  .OUT_W(12)) dut1 (.clk, .rst_n, .in_valid, .in_mode,
    .x(x1), .out_valid(v1), .out_mode(m1), .t(t1));
  mst_core_1d #(.IN_W(12), .OUT_W(16)) dut2 (.clk, .rst_n, .in_valid, .in_mode,
    .x(x2), .out_valid(v2), .out_mode(m2), .t(t2));

  typedef struct {
    int     stamp;
    mode_e  mode;
    vec8_t  e1, e2;
  } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Output checker.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (v1 !== v2) begin failures++; $display("valid mismatch"); end
      if (v1) begin
        exp_t e;
        if (q.size() == 0) begin
          failures++; $display("unexpected output");
        end else begin
          e = q.pop_front();
          checks++;
          if (cycle - e.stamp != 2) begin
            failures++; $display("latency %0d", cycle - e.stamp);
          end
          checks++;
          if (m1 != e.mode || m2 != e.mode) begin failures++; $display("mode mismatch"); end
          for (int k = 0; k < 8; k++) begin
            checks += 2;
            if (longint'(t1[k]) != e.e1[k]) begin
              failures++; $display("core1 mode=%0d k=%0d got=%0d exp=%0d", e.mode, k, t1[k], e.e1[k]);
            end
            if (longint'(t2[k]) != e.e2[k]) begin
              failures++; $display("core2 mode=%0d k=%0d got=%0d exp=%0d", e.mode, k, t2[k], e.e2[k]);
            end
          end
        end
      end
    end
  end

  initial begin
    vec8_t a, b;
    exp_t  e;
    in_valid = 1'b0;
    in_mode  = M_MPEG8;
    for (int i = 0; i < 8; i++) begin x1[i] = '0; x2[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(0, 9) != 0);
      in_mode  = mode_e'($urandom_range(0, 4));
      for (int i = 0; i < 8; i++) begin
        x1[i] = 9'($urandom);
        x2[i] = 12'($urandom);
        if (n % 50 == 1) begin   // extreme patterns
          x1[i] = (i % 2 == 0) ? 9'sd255 : -9'sd256;
          x2[i] = (i % 2 == 0) ? 12'sd2047 : -12'sd2048;
        end
        if (n % 50 == 2) begin
          x1[i] = -9'sd256;
          x2[i] = -12'sd2048;
        end
        a[i] = longint'(x1[i]);
        b[i] = longint'(x2[i]);
      end
      if (in_valid) begin
        e.stamp = cycle;
        e.mode  = in_mode;
        e.e1    = xform(in_mode, a, 12);
        e.e2    = xform(in_mode, b, 16);
        q.push_back(e);
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
