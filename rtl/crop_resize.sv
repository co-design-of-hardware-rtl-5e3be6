// Face crop and nearest-neighbour resize to N x N, on a pixel stream.
//
// The face bounding box (roi_x, roi_y, roi_w, roi_h), found in software by
// face detection, selects the region of interest. Output pixel (i, j) of
// the N x N face is source pixel
//     (roi_x + floor(j*roi_w/N), roi_y + floor(i*roi_h/N)).
// Because the box is at least N pixels on a side the selected columns and
// rows strictly increase, so the pixels are picked out of the raster
// stream as they pass, with no buffer. floor(k*roi_w/N) is tracked
// incrementally as a quotient and a remainder below N, so no divider is
// needed. A box smaller than N on a side is treated as N wide (no
// up-scaling). The box must stay within the stream's coordinates
// (1..W-2 after the Gaussian filter). It is sampled with the frame's
// first pixel (coordinates 1,1) and held for the rest of the frame, so
// software may write the next box as soon as a frame has been sent.
//
// The design resizes 256x256 images to 100x100 faces; nearest-neighbour
// sampling is this implementation's choice. The input carries the frame
// coordinates of each pixel (s_x, s_y) and s_last on the frame's final
// pixel; the output carries the face coordinates (m_x, m_y) and m_last on
// the face's final pixel. Valid/ready handshakes; one pixel per cycle.
module crop_resize
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
  input  logic [$clog2(W)-1:0] s_x,
  input  logic [$clog2(H)-1:0] s_y,
  input  logic                 s_last,
  output logic                 m_valid,
  input  logic                 m_ready,
  output pix_t                 m_data,
  output logic [$clog2(N)-1:0] m_x,
  output logic [$clog2(N)-1:0] m_y,
  output logic                 m_last
);
  localparam int unsigned CW = $clog2(W) + 2;   // coordinate arithmetic
  localparam int unsigned NW = $clog2(N) + 1;
  localparam int unsigned MAXSTEP = (W + N - 1) / N + 1;

  typedef struct packed {
    logic [CW-1:0] q;     // floor(k*size/N)
    logic [CW-1:0] r;     // k*size mod N
    logic [NW-1:0] k;     // output index
  } track_t;

  typedef struct packed {
    logic [CW-1:0] x, y, w, h;
  } box_t;

  track_t col_t, row_t, col_next, row_next;
  box_t   box_q, box;
  logic [CW-1:0] src_x, src_y;
  logic row_sel, col_sel, en, row_end, first;

  // the box in force: taken from the inputs on the frame's first pixel
  assign first = (s_x == $bits(s_x)'(1)) && (s_y == $bits(s_y)'(1));
  always_comb begin
    if (first) begin
      box.x = CW'(roi_x);
      box.y = CW'(roi_y);
      box.w = (CW'(roi_w) < CW'(N)) ? CW'(N) : CW'(roi_w);
      box.h = (CW'(roi_h) < CW'(N)) ? CW'(N) : CW'(roi_h);
    end else begin
      box = box_q;
    end
  end

  function automatic track_t advance(track_t t, logic [CW-1:0] size);
    track_t o;
    o.k = t.k + 1'b1;
    o.q = t.q;
    o.r = t.r + size;
    for (int i = 0; i < MAXSTEP; i++) begin
      if (o.r >= CW'(N)) begin
        o.r = o.r - CW'(N);
        o.q = o.q + 1'b1;
      end
    end
    return o;
  endfunction

  assign col_next = advance(col_t, box.w);
  assign row_next = advance(row_t, box.h);
  assign src_x    = box.x + col_t.q;
  assign src_y    = box.y + row_t.q;
  assign row_sel  = (CW'(s_y) == src_y) && (row_t.k < NW'(N));
  assign col_sel  = (CW'(s_x) == src_x) && (col_t.k < NW'(N));
  assign row_end  = (s_x == $bits(s_x)'(W-2));
  assign s_ready  = !m_valid || m_ready;
  assign en       = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_t   <= '0;
      row_t   <= '0;
      box_q   <= '0;
      m_valid <= 1'b0;
      m_data  <= '0;
      m_x     <= '0;
      m_y     <= '0;
      m_last  <= 1'b0;
    end else begin
      if (m_ready) m_valid <= 1'b0;
      if (en) begin
        box_q <= box;
        if (row_sel && col_sel) begin
          m_valid <= 1'b1;
          m_data  <= s_data;
          m_x     <= $bits(m_x)'(col_t.k);
          m_y     <= $bits(m_y)'(row_t.k);
          m_last  <= (col_t.k == NW'(N-1)) && (row_t.k == NW'(N-1));
          col_t   <= col_next;
        end
        if (row_end) begin
          col_t <= '0;
          if (row_sel) row_t <= row_next;
        end
        if (s_last) row_t <= '0;
      end
    end
  end

  // the box must lie inside the filtered area, 1..W-2 by 1..H-2
  a_box: assert property (@(posedge clk) disable iff (!rst_n)
    en && first |-> box.x >= 1 && box.x + box.w <= CW'(W-1) &&
                    box.y >= 1 && box.y + box.h <= CW'(H-1));

  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  a_hold: assert property (p_hold);
endmodule
