// Row buffers of a raster pixel stream.
//
// Two one-row memories hold the two image rows above the row now
// streaming in, so a 3x3 neighbourhood is available without storing the
// whole frame. Each accepted pixel (en=1) at column col reads the pixels
// of the two rows above it at that column and writes itself and the pixel
// above it down one row. Reads are combinational from the memories; the
// writes happen at the clock edge, so in one cycle a column is read and
// rotated.
//
// Ports: en, col, din in; up2 (two rows above), up1 (one row above) out,
// valid in the same cycle as en. Memory contents are not reset: the first
// two rows of a frame see stale data, which the window logic discards.
module row_buffer #(
  parameter int unsigned LINE_W = 256,
  parameter int unsigned DATA_W = 8
) (
  input  logic                      clk,
  input  logic                      en,
  input  logic [$clog2(LINE_W)-1:0] col,
  input  logic [DATA_W-1:0]         din,
  output logic [DATA_W-1:0]         up1,
  output logic [DATA_W-1:0]         up2
);
  logic [DATA_W-1:0] row1 [LINE_W];   // row y-1
  logic [DATA_W-1:0] row2 [LINE_W];   // row y-2

  assign up1 = row1[col];
  assign up2 = row2[col];

  always_ff @(posedge clk) begin
    if (en) begin
      row2[col] <= row1[col];
      row1[col] <= din;
    end
  end
endmodule
