// 3x3 Gaussian smoothing of a W x H grey-level pixel stream.
//
// The kernel is the binomial approximation of a Gaussian,
//     [1 2 1; 2 4 2; 1 2 1] / 16,
// rounded to nearest. The design calls for a Gaussian filter against noise
// and lighting effects without giving its kernel; this 3x3 kernel and the
// rounding are this implementation's choice. The neighbourhood comes from
// two row buffers (window3x3), so the frame is never stored.
//
// Only pixels whose 3x3 window lies inside the frame are produced, i.e.
// (W-2) x (H-2) outputs per frame, each tagged with its frame coordinates
// m_x, m_y (1..W-2, 1..H-2); m_last marks the frame's final output.
// Streams use valid/ready: a beat moves when valid and ready are both
// high. The window registers act as the output register, so one pixel is
// accepted per cycle while the output is taken every cycle; an output
// appears one cycle after the pixel that completes its window.
module gaussian_filter
  import fer_pkg::*;
#(
  parameter int unsigned W = IN_W,
  parameter int unsigned H = IN_H
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  pix_t                 s_data,
  output logic                 m_valid,
  input  logic                 m_ready,
  output pix_t                 m_data,
  output logic [$clog2(W)-1:0] m_x,
  output logic [$clog2(H)-1:0] m_y,
  output logic                 m_last
);
  win3_t win;
  logic  win_valid, last_pix;
  logic  en;
  logic [11:0] acc;

  assign s_ready = !m_valid || m_ready;
  assign en      = s_valid && s_ready;

  window3x3 #(.W(W), .H(H)) u_win (
    .clk, .rst_n, .en, .din(s_data), .win, .cx(m_x), .cy(m_y),
    .win_valid, .last_pix
  );

  // win_valid pulses once per new interior window; held keeps an output
  // that was offered but not yet taken.
  logic held;
  assign m_valid = win_valid || held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) held <= 1'b0;
    else        held <= m_valid && !m_ready;
  end

  always_comb begin
    acc = 12'(win[0][0]) + 12'(win[0][2]) + 12'(win[2][0]) + 12'(win[2][2])
        + (12'(win[0][1]) << 1) + (12'(win[1][0]) << 1)
        + (12'(win[1][2]) << 1) + (12'(win[2][1]) << 1)
        + (12'(win[1][1]) << 2) + 12'd8;
    m_data = pix_t'(acc >> 4);
  end

  assign m_last = (m_x == $bits(m_x)'(W-2)) && (m_y == $bits(m_y)'(H-2));

  // An offered output must stay put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_x) && $stable(m_y);
  endproperty
  a_hold: assert property (p_hold);
endmodule
