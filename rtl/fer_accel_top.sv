// Programmable-logic part of the facial-expression recognition co-design.
//
// Two hardware accelerators sit side by side, each with its own pair of
// streams to and from memory, as in the design, where every accelerator
// reads its input from DDR memory and writes its result back through DMA
// and the processor chains them:
//   preproc_accel   W x H grey image in -> N x N normalised face out
//                   (Gaussian filter, crop to the face box, resize,
//                   intensity normalisation)
//   feature_accel   N x N face in -> 959-word HOG + LBP feature vector out
// Face detection, feature selection and the neural-network classifier run
// in software on the processor, which also writes the face box (roi_*).
// All streams are valid/ready with a last flag on the final beat; both
// accelerators take one pixel per clock while collecting their input.
module fer_accel_top
  import fer_pkg::*;
#(
  parameter int unsigned W = IN_W,
  parameter int unsigned H = IN_H,
  parameter int unsigned N = FACE_N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // face box from software face detection
  input  logic [$clog2(W)-1:0] roi_x,
  input  logic [$clog2(H)-1:0] roi_y,
  input  logic [$clog2(W):0]   roi_w,
  input  logic [$clog2(H):0]   roi_h,
  // preprocessing: image in, face out
  input  logic                 pre_s_valid,
  output logic                 pre_s_ready,
  input  pix_t                 pre_s_data,
  output logic                 pre_m_valid,
  input  logic                 pre_m_ready,
  output pix_t                 pre_m_data,
  output logic                 pre_m_last,
  // feature description: face in, feature vector out
  input  logic                 feat_s_valid,
  output logic                 feat_s_ready,
  input  pix_t                 feat_s_data,
  output logic                 feat_m_valid,
  input  logic                 feat_m_ready,
  output feat_t                feat_m_data,
  output logic                 feat_m_last
);
  preproc_accel #(.W(W), .H(H), .N(N)) u_pre (
    .clk, .rst_n, .roi_x, .roi_y, .roi_w, .roi_h,
    .s_valid(pre_s_valid), .s_ready(pre_s_ready), .s_data(pre_s_data),
    .m_valid(pre_m_valid), .m_ready(pre_m_ready), .m_data(pre_m_data),
    .m_last(pre_m_last)
  );

  feature_accel #(.N(N)) u_feat (
    .clk, .rst_n,
    .s_valid(feat_s_valid), .s_ready(feat_s_ready), .s_data(feat_s_data),
    .m_valid(feat_m_valid), .m_ready(feat_m_ready), .m_data(feat_m_data),
    .m_last(feat_m_last)
  );
endmodule
