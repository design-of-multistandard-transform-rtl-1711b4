// tmem_tb: self-checking test of the transpose memory.
// Streams random 8x8 tiles of 12-bit words, sometimes back to back and
// sometimes with idle cycles inside or between tiles. Every tile must come
// out transposed (output vector k = column k of the tile written row-wise,
// which the alternating orientation turns into rows and back), on eight
// consecutive cycles starting one cycle after the tile's last write, with
// the mode given on that last write. Both orientations are exercised.
module tmem_tb;
  import mst_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid;
  mode_e              in_mode;
  logic signed [11:0] in_data [8];
  logic               out_valid;
  mode_e              out_mode;
  logic signed [11:0] out_data [8];

  int checks = 0, failures = 0, cycle = 0;
  int tiles_in = 0, tiles_out = 0, back_to_back = 0, gaps = 0;

  tmem #(.W(12)) dut (.clk, .rst_n, .in_valid, .in_mode, .in_data,
                      .out_valid, .out_mode, .out_data);

  typedef struct {
    logic signed [11:0] d [8][8];
    mode_e              mode;
    int                 done;   // cycle of the last write
  } tile_t;
  tile_t q [$];
  tile_t cur;
  int    ocnt = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (ocnt == 0) begin
        if (q.size() == 0) begin failures++; $display("unexpected output"); end
        else begin
          cur = q.pop_front();
          checks++;
          if (cycle - cur.done != 1) begin failures++; $display("start delay %0d", cycle - cur.done); end
        end
      end
      checks++;
      if (out_mode != cur.mode) begin failures++; $display("mode mismatch"); end
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (out_data[r] != cur.d[r][ocnt]) begin
          failures++; $display("tile %0d col %0d row %0d got %0d exp %0d", tiles_out, ocnt, r, out_data[r], cur.d[r][ocnt]);
        end
      end
      ocnt = (ocnt + 1) % 8;
      if (ocnt == 0) tiles_out++;
    end else if (rst_n && ocnt != 0) begin
      failures++; $display("output paused inside a tile");
      ocnt = 0;
    end
  end

  initial begin
    tile_t t;
    in_valid = 1'b0;
    in_mode  = M_MPEG8;
    for (int i = 0; i < 8; i++) in_data[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      t.mode = mode_e'($urandom_range(0, 4));
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) t.d[r][c] = 12'($urandom);
      if (n % 3 == 2) begin
        gaps++;
        repeat ($urandom_range(1, 12)) begin @(posedge clk); #1 in_valid = 1'b0; end
      end else if (n > 0) back_to_back++;
      for (int r = 0; r < 8; r++) begin
        @(posedge clk);
        #1;
        if (n % 5 == 4 && r == 3) begin   // idle cycle inside a tile
          in_valid = 1'b0;
          @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        in_mode  = (r == 7) ? t.mode : mode_e'($urandom_range(0, 4));
        in_data  = t.d[r];
      end
      t.done = cycle;
      q.push_back(t);
      tiles_in++;
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (12) @(posedge clk);
    checks += 3;
    if (tiles_out != tiles_in) begin failures++; $display("tiles in %0d out %0d", tiles_in, tiles_out); end
    if (back_to_back == 0) failures++;
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
