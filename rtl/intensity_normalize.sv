// Min-max intensity normalisation of an N x N face image.
//
// The design applies a normalisation against illumination effects after
// cropping and resizing without saying which; this block uses a full-range
// contrast stretch,
//     out = round((p - min) * 255 / (max - min)),
// computed as ((p - min) * recip + 2^15) >> 16 with
// recip = floor(255 * 2^16 / (max - min)). A flat image (max == min)
// comes out all zero.
//
// The minimum and maximum are known only after the last pixel, so the
// face (N*N bytes, a few block RAMs) is stored while they are tracked
// (FILL, one pixel per cycle), recip is found by a sequential divider in
// 24 cycles (DIVIDE), and the stored face is read out scaled (DRAIN, one
// pixel per cycle, m_last on the final one). Input is refused outside
// FILL. Valid/ready handshakes on both sides.
module intensity_normalize
  import fer_pkg::*;
#(
  parameter int unsigned N = FACE_N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_valid,
  output logic s_ready,
  input  pix_t s_data,
  output logic m_valid,
  input  logic m_ready,
  output pix_t m_data,
  output logic m_last
);
  localparam int unsigned NPIX = N * N;
  localparam int unsigned AW   = $clog2(NPIX);

  typedef enum logic [1:0] {FILL, DIVIDE, DRAIN} state_t;
  state_t state;

  pix_t          mem [NPIX];
  logic [AW-1:0] wr_idx, rd_idx;
  pix_t          pmin, pmax, range_q;
  logic          div_start, div_busy, div_done;
  logic [23:0]   recip;
  logic          rd_en, rd_done;
  logic [32:0]   scaled;
  pix_t          rd_pix;

  assign s_ready = (state == FILL);
  assign range_q = pmax - pmin;

  seq_divider #(.NUM_W(24), .DEN_W(8)) u_div (
    .clk, .rst_n, .start(div_start),
    .dividend(24'd255 << 16),
    .divisor((range_q == '0) ? 8'd1 : range_q),
    .busy(div_busy), .done(div_done), .quotient(recip)
  );

  assign rd_pix = mem[rd_idx];
  assign scaled = 33'(rd_pix - pmin) * 33'(recip) + 33'd32768;
  assign rd_en  = (state == DRAIN) && !rd_done && (!m_valid || m_ready);

  always_ff @(posedge clk) begin
    if (s_valid && s_ready) mem[wr_idx] <= s_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= FILL; wr_idx <= '0; rd_idx <= '0; rd_done <= 1'b0;
      pmin <= '1; pmax <= '0; div_start <= 1'b0;
      m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (m_ready) m_valid <= 1'b0;
      unique case (state)
        FILL: if (s_valid) begin
          if (s_data < pmin) pmin <= s_data;
          if (s_data > pmax) pmax <= s_data;
          if (wr_idx == AW'(NPIX-1)) begin
            wr_idx    <= '0;
            state     <= DIVIDE;
            div_start <= 1'b1;
          end else begin
            wr_idx <= wr_idx + 1'b1;
          end
        end
        DIVIDE: if (div_done) begin
          state   <= DRAIN;
          rd_idx  <= '0;
          rd_done <= 1'b0;
        end
        DRAIN: begin
          if (rd_en) begin
            m_valid <= 1'b1;
            m_data  <= (scaled[32:16] > 17'd255) ? 8'd255 : scaled[23:16];
            m_last  <= (rd_idx == AW'(NPIX-1));
            if (rd_idx == AW'(NPIX-1)) rd_done <= 1'b1;
            else rd_idx <= rd_idx + 1'b1;
          end
          // the face is finished once its final pixel has been taken
          if (rd_done && (!m_valid || m_ready)) begin
            state <= FILL;
            pmin  <= '1;
            pmax  <= '0;
          end
        end
        default: state <= FILL;
      endcase
    end
  end

  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last);
  endproperty
  a_hold: assert property (p_hold);
endmodule
