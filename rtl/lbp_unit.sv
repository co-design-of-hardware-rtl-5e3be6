// Local Binary Pattern code and histogram of a face.
//
// For every new 3x3 window (win_valid pulse from window3x3) the centre
// pixel's 8-bit code is formed by comparing each of its 8 neighbours with
// it: a neighbour at least as bright as the centre gives a 1. Neighbour
// i (clockwise from the top-left corner) weighs 2^i. The code is mapped
// to one of 59 histogram bins (the 58 uniform patterns and one bin for
// all others, fer_pkg::lbp_bin), registered, and in the next cycle that
// bin is read, incremented and written back.
//
// The comparison and the weighting follow the LBP definition used by the
// design; ties (neighbour equal to the centre) count as 1, and the
// uniform-pattern histogram is this implementation's choice of how the
// codes become features. Only interior pixels have codes, at most
// (N-2)^2 = 9604 per face, so bins are 14 bits wide.
//
// rd_addr / rd_data read the histogram combinationally; clr writes zero
// at clr_addr and takes priority over an update. code shows the code of
// the current window.
module lbp_unit
  import fer_pkg::*;
#(
  parameter int unsigned HW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          win_valid,
  input  win3_t         win,
  output logic [7:0]    code,
  input  logic          clr,
  input  logic [5:0]    clr_addr,
  input  logic [5:0]    rd_addr,
  output logic [HW-1:0] rd_data,
  output logic          busy
);
  logic [HW-1:0] hist [LBP_BINS];
  logic [5:0]    bin_q;
  logic          upd_q;

  assign code    = lbp_code(win);
  assign rd_data = (int'(rd_addr) < LBP_BINS) ? hist[rd_addr] : '0;
  assign busy    = upd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd_q <= 1'b0; bin_q <= '0;
    end else begin
      upd_q <= win_valid;
      bin_q <= lbp_bin(code);
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      if (int'(clr_addr) < LBP_BINS) hist[clr_addr] <= '0;
    end else if (upd_q) begin
      hist[bin_q] <= hist[bin_q] + 1'b1;
    end
  end
endmodule
