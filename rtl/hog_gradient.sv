// Gradient magnitude and unsigned orientation bin of one pixel, for HOG.
//
// Central differences on the 3x3 neighbourhood give
//     gx = right - left,  gy = below - above,
// the magnitude floor(sqrt(gx^2 + gy^2)) and the orientation
// theta = atan2(gy, gx) folded into 0..180 degrees, as the design uses
// unsigned orientations over 0..180. theta falls in one of NBINS = 9
// bins of 20 degrees, bin k covering [20k, 20k+20). No arctangent is
// computed: after folding (negating gx and gy when gy < 0, or gy == 0 and
// gx < 0) theta >= beta exactly when gy*cos(beta) - gx*sin(beta) >= 0,
// so the bin is the number of the eight inner boundaries 20..160 degrees
// that this test passes, with cos and sin rounded to 16 fraction bits
// (fer_pkg). Central differences and hard binning are this
// implementation's choices. Purely combinational.
module hog_gradient
  import fer_pkg::*;
(
  input  win3_t      win,
  output logic [8:0] mag,
  output logic [3:0] bin
);
  logic signed [9:0]  gx, gy, fx, fy;
  logic signed [31:0] xprod;
  logic [17:0]        sq;

  always_comb begin
    gx = 10'(signed'({2'b00, win[1][2]})) - 10'(signed'({2'b00, win[1][0]}));
    gy = 10'(signed'({2'b00, win[2][1]})) - 10'(signed'({2'b00, win[0][1]}));
    sq = 18'(18'(gx) * 18'(gx)) + 18'(18'(gy) * 18'(gy));
    mag = isqrt18(sq);
    if (gy < 0 || (gy == 0 && gx < 0)) begin
      fx = -gx;
      fy = -gy;
    end else begin
      fx = gx;
      fy = gy;
    end
    bin = '0;
    for (int k = 0; k < 8; k++) begin
      xprod = 32'(fy) * COS_Q16[k] - 32'(fx) * SIN_Q16[k];
      if (xprod >= 0) bin = bin + 1'b1;
    end
  end
endmodule
