// Preprocessing accelerator: Gaussian filter, face crop and resize, and
// intensity normalisation of one streamed grey-level image.
//
// The input is a W x H 8-bit image in raster order, streamed from memory;
// the output is the N x N normalised face in raster order, streamed back,
// with m_last on its final pixel. The face box (roi_*) comes from face
// detection in software and must be stable for the frame. Inside, the
// three stages are chained by valid/ready streams:
//   gaussian_filter   3x3 smoothing on two row buffers, (W-2)x(H-2) out
//   crop_resize       box selection and nearest-neighbour down-scaling
//   intensity_normalize  min-max stretch over the stored N x N face
// The order crop/filter/resize and the use of row buffers instead of a
// frame store follow the design; the kernel, the sampling rule and the
// normalisation rule are this implementation's choices (see each stage).
// Throughput is one input pixel per cycle while the face is being
// collected; the normalised face then drains at one pixel per cycle.
module preproc_accel
  import fer_pkg::*;
#(
  parameter int unsigned W = IN_W,
  parameter int unsigned H = IN_H,
  parameter int unsigned N = FACE_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(W)-1:0] roi_x,
  input  logic [$clog2(H)-1:0] roi_y,
  input  logic [$clog2(W):0]   roi_w,
  input  logic [$clog2(H):0]   roi_h,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  pix_t                 s_data,
  output logic                 m_valid,
  input  logic                 m_ready,
  output pix_t                 m_data,
  output logic                 m_last
);
  logic                 g_valid, g_ready, g_last;
  pix_t                 g_data;
  logic [$clog2(W)-1:0] g_x;
  logic [$clog2(H)-1:0] g_y;
  logic                 c_valid, c_ready, c_last;
  pix_t                 c_data;
  logic [$clog2(N)-1:0] c_x, c_y;

  gaussian_filter #(.W(W), .H(H)) u_gauss (
    .clk, .rst_n, .s_valid, .s_ready, .s_data,
    .m_valid(g_valid), .m_ready(g_ready), .m_data(g_data),
    .m_x(g_x), .m_y(g_y), .m_last(g_last)
  );

  crop_resize #(.W(W), .H(H), .N(N)) u_crop (
    .clk, .rst_n, .roi_x, .roi_y, .roi_w, .roi_h,
    .s_valid(g_valid), .s_ready(g_ready), .s_data(g_data),
    .s_x(g_x), .s_y(g_y), .s_last(g_last),
    .m_valid(c_valid), .m_ready(c_ready), .m_data(c_data),
    .m_x(c_x), .m_y(c_y), .m_last(c_last)
  );

  intensity_normalize #(.N(N)) u_norm (
    .clk, .rst_n,
    .s_valid(c_valid), .s_ready(c_ready), .s_data(c_data),
    .m_valid, .m_ready, .m_data, .m_last
  );
endmodule
