// 3x3 sliding window over a W x H raster pixel stream.
//
// Column and row counters follow the stream; they wrap at the end of each
// row and frame, so frames follow one another without any framing signal.
// On every accepted pixel (en=1) the window shifts one column left and
// takes the new right column from the row buffers and the incoming pixel.
// After that clock edge the window's bottom-right pixel is the one just
// accepted and its centre is pixel (cx, cy) = (x-1, y-1).
//
// win_valid pulses for one cycle after an accepted pixel whose window
// lies wholly inside the frame (centres 1..W-2, 1..H-2); win, cx, cy hold
// until the next accepted pixel. last_pix is high while the accepted
// pixel is the frame's final one.
module window3x3
  import fer_pkg::*;
#(
  parameter int unsigned W = 256,
  parameter int unsigned H = 256
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  pix_t                 din,
  output win3_t                win,
  output logic [$clog2(W)-1:0] cx,
  output logic [$clog2(H)-1:0] cy,
  output logic                 win_valid,
  output logic                 last_pix
);
  logic [$clog2(W)-1:0] x;
  logic [$clog2(H)-1:0] y;
  pix_t up1, up2;

  row_buffer #(.LINE_W(W), .DATA_W(PIX_W)) u_rows (
    .clk, .en, .col(x), .din, .up1, .up2
  );

  assign last_pix = (x == $bits(x)'(W-1)) && (y == $bits(y)'(H-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
      win_valid <= 1'b0;
      cx <= '0;
      cy <= '0;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) win[r][c] <= '0;
    end else begin
      win_valid <= en && (x >= 2) && (y >= 2);
      if (en) begin
        for (int r = 0; r < 3; r++) begin
          win[r][0] <= win[r][1];
          win[r][1] <= win[r][2];
        end
        win[0][2] <= up2;
        win[1][2] <= up1;
        win[2][2] <= din;
        cx <= x - 1'b1;
        cy <= y - 1'b1;
        if (x == $bits(x)'(W-1)) begin
          x <= '0;
          y <= (y == $bits(y)'(H-1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
