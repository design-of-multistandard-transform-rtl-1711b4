// tmem: transpose memory between the row core and the column core.
//
// Sixty-four registers of W bits hold one 8x8 tile. A tile arrives as eight
// vectors of eight words on consecutive valid cycles and leaves transposed,
// as eight vectors on eight consecutive cycles starting the cycle after its
// last vector was written. Full throughput needs only the one tile of
// storage: the access orientation flips every tile. If a tile is written
// row by row (vector k into row k), it is read column by column; meanwhile
// the next tile is written column by column, each column into the one just
// read (a register read and overwritten in the same cycle returns the old
// value), and that tile is then read row by row, and so on.
//
// Interface: in_valid/in_data write the next vector of the current tile;
// in_mode is the column-pass mode of the tile and is latched with its last
// vector. out_valid/out_data/out_mode present the transposed tile. The input
// may pause between vectors; the output never pauses. Register count and
// width follow the described TMEM; the orientation-flipping schedule is this
// design's choice. Reset is asynchronous, active low; the stored words are
// cleared.
module tmem
  import mst_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  mode_e                in_mode,
  input  logic signed [W-1:0]  in_data [8],
  output logic                 out_valid,
  output mode_e                out_mode,
  output logic signed [W-1:0]  out_data [8]
);

  logic signed [W-1:0] mem [8][8];   // mem[row][col]
  logic [2:0] wcnt, rcnt;
  logic       wo;                    // write orientation: 0 rows, 1 columns
  logic       ro;                    // read orientation of the stored tile
  logic       rd_active;
  mode_e      rd_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          mem[r][c] <= '0;
      wcnt      <= '0;
      rcnt      <= '0;
      wo        <= 1'b0;
      ro        <= 1'b1;
      rd_active <= 1'b0;
      rd_mode   <= M_MPEG8;
    end else begin
      if (in_valid) begin
        for (int i = 0; i < 8; i++) begin
          if (wo == 1'b0) mem[wcnt][i] <= in_data[i];
          else            mem[i][wcnt] <= in_data[i];
        end
        wcnt <= wcnt + 3'd1;
      end
      // Read schedule: eight cycles starting after a tile's last write.
      if (rd_active) begin
        rcnt <= rcnt + 3'd1;
        if (rcnt == 3'd7) rd_active <= 1'b0;
      end
      if (in_valid && wcnt == 3'd7) begin
        rd_active <= 1'b1;
        rcnt      <= '0;
        ro        <= ~wo;
        wo        <= ~wo;
        rd_mode   <= in_mode;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++)
      out_data[i] = (ro == 1'b1) ? mem[i][rcnt] : mem[rcnt][i];
  end

  assign out_valid = rd_active;
  assign out_mode  = rd_mode;

  // A new tile may only overwrite words of the previous tile already read.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && rd_active) |-> (wcnt <= rcnt));

endmodule
