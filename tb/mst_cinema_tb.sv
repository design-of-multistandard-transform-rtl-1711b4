// mst_cinema_tb: workload test, one full 4928 x 2048 digital-cinema frame.
// The frame is cut into 8x8 tiles (616 across, 256 down, 157,696 tiles) and
// streamed through the 2-D core back to back, one row of eight residuals
// per clock. The picture is synthetic: a smooth gradient plus noise, in the
// 9-bit residual range. The transform type rotates through all seven types
// from one tile stripe to the next. Every output coefficient is compared
// with the reference model. The test counts the clocks from the first input
// row to the last output column and checks that the frame takes exactly
// 8 clocks per tile plus the pipeline latency, i.e. 8 pixels per clock, and
// prints the clock rate that 24 frames/s would need.
module mst_cinema_tb;
  import mst_pkg::*;
  import mst_ref_pkg::*;

  localparam int WIDTH = 4928, HEIGHT = 2048;
  localparam int TX = WIDTH / 8, TY = HEIGHT / 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  xform_e             in_type;
  logic signed [8:0]  in_data [8];
  logic               out_valid;
  mode_e              out_mode;
  logic signed [15:0] out_data [8];

  int checks = 0, failures = 0, cycle = 0;
  int first_in = -1, last_out = -1, out_vectors = 0;

  mst_2d dut (.clk, .rst_n, .in_valid, .in_type, .in_data,
              .out_valid, .out_mode, .out_data);

  typedef struct {
    longint y [8][8];
    mode_e  cmode;
  } tile_t;
  tile_t q [$];
  tile_t cur;
  int    ocnt = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (TX * TY * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocnt == 0) begin
        if (q.size() == 0) begin failures++; $display("unexpected output"); end
        else cur = q.pop_front();
      end
      checks++;
      for (int r = 0; r < 8; r++)
        if (longint'(out_data[r]) != cur.y[ocnt][r] || out_mode != cur.cmode) begin
          failures++;
          if (failures < 10) $display("vector %0d lane %0d got %0d exp %0d", out_vectors, r, out_data[r], cur.y[ocnt][r]);
        end
      ocnt = (ocnt + 1) % 8;
      out_vectors++;
      last_out = cycle;
    end
  end

  initial begin
    tile_t  t;
    xform_e ty;
    vec8_t  x, v, w;
    longint mid [8][8];
    int     px;
    in_valid = 1'b0;
    in_type  = T_MPEG_8X8;
    for (int i = 0; i < 8; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int by = 0; by < TY; by++) begin
      ty = xform_e'(by % 7);
      for (int bx = 0; bx < TX; bx++) begin
        for (int r = 0; r < 8; r++) begin
          for (int c = 0; c < 8; c++) begin
            px   = ((bx * 8 + c) + (by * 8 + r)) % 256 - 128 + int'($urandom_range(0, 64)) - 32;
            x[c] = longint'(px);
          end
          v = xform(row_mode(ty), x, 12);
          for (int c = 0; c < 8; c++) mid[r][c] = v[c];
          @(posedge clk);
          #1;
          if (first_in < 0) first_in = cycle;
          in_valid = 1'b1;
          in_type  = ty;
          for (int c = 0; c < 8; c++) in_data[c] = 9'(x[c]);
        end
        for (int c = 0; c < 8; c++) begin
          for (int r = 0; r < 8; r++) w[r] = mid[r][c];
          v = xform(col_mode(ty), w, 16);
          for (int r = 0; r < 8; r++) t.y[c][r] = v[r];
        end
        t.cmode = col_mode(ty);
        q.push_back(t);
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (20) @(posedge clk);
    checks++;
    if (out_vectors != TX * TY * 8) begin failures++; $display("output vectors %0d", out_vectors); end
    // First row to first column is 12 clocks; the last column comes
    // 8*tiles - 1 clocks after the first one.
    checks++;
    if (last_out - first_in != TX * TY * 8 - 1 + 12) begin
      failures++; $display("frame took %0d clocks", last_out - first_in + 1);
    end
    $display("%0d pixels in %0d clocks: %0.3f pixels/clock; 24 frames/s need %0.1f MHz",
             WIDTH * HEIGHT, last_out - first_in + 1,
             real'(WIDTH * HEIGHT) / real'(last_out - first_in + 1),
             24.0 * real'(last_out - first_in + 1) / 1.0e6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
