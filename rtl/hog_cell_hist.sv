// HOG cell histograms: per-cell sums of gradient magnitude by orientation.
//
// For every new 3x3 window (win_valid pulse from window3x3) hog_gradient
// gives the centre pixel's magnitude and bin; they are registered with
// the pixel's cell index, and in the next cycle the cell's bin is read,
// incremented by the magnitude and written back (one update per cycle,
// so back-to-back updates of the same bin need no forwarding).
//
// The face is split into CELL x CELL cells as the design sets (16x16);
// with N = 100 that gives NC = 6 cells per side covering pixels 0..95,
// and the remaining 4 rows and columns are not used. Border pixels, whose
// neighbourhood leaves the face, add nothing. Entries are 17 bits wide
// (at most 256 pixels x 360).
//
// Address of cell (cy, cx), bin b is (cy*NC + cx)*NBINS + b. rd_addr /
// rd_data read the histogram combinationally; clr writes zero at
// clr_addr and takes priority over an update.
module hog_cell_hist
  import fer_pkg::*;
#(
  parameter int unsigned N  = FACE_N,
  parameter int unsigned NC = N / CELL,
  parameter int unsigned HW = 17,
  parameter int unsigned AW = $clog2(NC*NC*NBINS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 win_valid,
  input  win3_t                win,
  input  logic [$clog2(N)-1:0] cx,
  input  logic [$clog2(N)-1:0] cy,
  input  logic                 clr,
  input  logic [AW-1:0]        clr_addr,
  input  logic [AW-1:0]        rd_addr,
  output logic [HW-1:0]        rd_data,
  output logic                 busy
);
  localparam int unsigned DEPTH = NC * NC * NBINS;

  logic [HW-1:0] hist [DEPTH];
  logic [8:0]    mag, mag_q;
  logic [3:0]    bin;
  logic [AW-1:0] addr, addr_q;
  logic          upd_q;
  logic          in_cells;

  hog_gradient u_grad (.win, .mag, .bin);

  assign in_cells = (int'(cx) < NC*CELL) && (int'(cy) < NC*CELL);
  assign addr = AW'((int'(cy) / CELL * NC + int'(cx) / CELL) * NBINS + int'(bin));
  assign rd_data = hist[rd_addr];
  assign busy = upd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_q <= 1'b0; mag_q <= '0; addr_q <= '0;
    end else begin
      upd_q  <= win_valid && in_cells;
      mag_q  <= mag;
      addr_q <= addr;
    end
  end

  always_ff @(posedge clk) begin
    if (clr) hist[clr_addr] <= '0;
    else if (upd_q) hist[addr_q] <= hist[addr_q] + HW'(mag_q);
  end
endmodule
