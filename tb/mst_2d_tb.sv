// mst_2d_tb: end-to-end test of the 2-D CSDA-MST core at its default sizes.
// Streams 8x8 tiles of random 9-bit residuals through the core with every
// transform type (MPEG-1/2/4 8x8, H.264 8x8 and 4x4, VC-1 8x8, 8x4, 4x8,
// 4x4), mostly back to back, sometimes with idle cycles inside or between
// tiles. The reference applies the row transform (rounded to 12 bits), then
// the column transform (rounded to 16 bits), and expects output vector k to
// be column k of the result. It checks every coefficient, the column mode
// reported, the 12-cycle latency from a tile's first row to its first
// column when rows arrive back to back, and the sustained rate of eight
// coefficients per clock. It counts how often each mechanism occurred (each
// transform type, four-point row pass, four-point column pass, mode switch
// between tiles, tiles back to back, input pauses) and fails if one never
// did.
module mst_2d_tb;
  import mst_pkg::*;
  import mst_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  xform_e             in_type;
  logic signed [8:0]  in_data [8];
  logic               out_valid;
  mode_e              out_mode;
  logic signed [15:0] out_data [8];

  int checks = 0, failures = 0, cycle = 0;

  mst_2d dut (.clk, .rst_n, .in_valid, .in_type, .in_data,
              .out_valid, .out_mode, .out_data);

  typedef struct {
    longint y [8][8];   // y[col][row]: expected output vector per column
    mode_e  cmode;
    int     first;      // cycle of the first row
    bit     contiguous; // rows arrived back to back
  } tile_t;
  tile_t q [$];
  tile_t cur;
  int    ocnt = 0, tiles_out = 0, out_cycles = 0, first_out = -1, last_out = 0;

  // Mechanism counters.
  int n_type [7];
  int n_row4 = 0, n_col4 = 0, n_switch = 0, n_b2b = 0, n_pause = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      out_cycles++;
      if (first_out < 0) first_out = cycle;
      last_out = cycle;
      if (ocnt == 0) begin
        if (q.size() == 0) begin failures++; $display("unexpected output"); end
        else begin
          cur = q.pop_front();
          if (cur.contiguous) begin
            checks++;
            if (cycle - cur.first != 12) begin
              failures++; $display("latency %0d", cycle - cur.first);
            end
          end
        end
      end
      checks++;
      if (out_mode != cur.cmode) begin failures++; $display("column mode mismatch"); end
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (longint'(out_data[r]) != cur.y[ocnt][r]) begin
          failures++;
          $display("tile %0d col %0d lane %0d got %0d exp %0d", tiles_out, ocnt, r, out_data[r], cur.y[ocnt][r]);
        end
      end
      ocnt = (ocnt + 1) % 8;
      if (ocnt == 0) tiles_out++;
    end
  end

  task automatic send_tile(xform_e ty, int pause_at);
    tile_t  t;
    vec8_t  x, v, w;
    longint mid [8][8];
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 8; c++) x[c] = longint'($urandom_range(0, 511)) - 256;
      if ($urandom_range(0, 15) == 0)
        for (int c = 0; c < 8; c++) x[c] = (c % 2 == 0) ? 255 : -256;
      v = xform(row_mode(ty), x, 12);
      for (int c = 0; c < 8; c++) mid[r][c] = v[c];
      @(posedge clk);
      #1;
      if (r == pause_at) begin
        in_valid = 1'b0;
        n_pause++;
        repeat ($urandom_range(1, 4)) begin @(posedge clk); #1; end
      end
      if (r == 0) t.first = cycle;
      in_valid = 1'b1;
      in_type  = ty;
      for (int c = 0; c < 8; c++) in_data[c] = 9'(x[c]);
    end
    t.contiguous = (pause_at < 0);
    for (int c = 0; c < 8; c++) begin
      for (int r = 0; r < 8; r++) w[r] = mid[r][c];
      v = xform(col_mode(ty), w, 16);
      for (int r = 0; r < 8; r++) t.y[c][r] = v[r];
    end
    t.cmode = col_mode(ty);
    q.push_back(t);
    n_type[int'(ty)]++;
    if (is_four_point(row_mode(ty))) n_row4++;
    if (is_four_point(col_mode(ty))) n_col4++;
  endtask

  initial begin
    xform_e ty, prev;
    int     ntiles;
    in_valid = 1'b0;
    in_type  = T_MPEG_8X8;
    for (int i = 0; i < 8; i++) in_data[i] = '0;
    for (int i = 0; i < 7; i++) n_type[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    ntiles = 140;
    prev   = T_MPEG_8X8;
    for (int n = 0; n < ntiles; n++) begin
      ty = (n < 7) ? xform_e'(n) : xform_e'($urandom_range(0, 6));
      if (n > 0 && ty != prev) n_switch++;
      if (n % 10 == 9) begin
        @(posedge clk);
        #1 in_valid = 1'b0;
        repeat ($urandom_range(0, 5)) @(posedge clk);
        send_tile(ty, -1);
      end else begin
        if (n > 0) n_b2b++;
        send_tile(ty, (n % 10 == 5) ? int'($urandom_range(1, 7)) : -1);
      end
      prev = ty;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (20) @(posedge clk);

    checks++;
    if (tiles_out != ntiles) begin failures++; $display("tiles out %0d of %0d", tiles_out, ntiles); end
    checks++;
    if (out_cycles != 8 * ntiles) begin failures++; $display("output cycles %0d", out_cycles); end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (n_type[i] == 0) begin failures++; $display("transform type %0d never ran", i); end
    end
    checks += 5;
    if (n_row4 == 0)   begin failures++; $display("no four-point row pass"); end
    if (n_col4 == 0)   begin failures++; $display("no four-point column pass"); end
    if (n_switch == 0) begin failures++; $display("no mode switch"); end
    if (n_b2b == 0)    begin failures++; $display("no back-to-back tiles"); end
    if (n_pause == 0)  begin failures++; $display("no input pause"); end
    $display("types: %0d %0d %0d %0d %0d %0d %0d  row4=%0d col4=%0d switches=%0d b2b=%0d pauses=%0d",
             n_type[0], n_type[1], n_type[2], n_type[3], n_type[4], n_type[5], n_type[6],
             n_row4, n_col4, n_switch, n_b2b, n_pause);
    $display("%0d coefficients in %0d output cycles", 64 * tiles_out, out_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
