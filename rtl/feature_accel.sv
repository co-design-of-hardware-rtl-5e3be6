// Feature-description accelerator: HOG and LBP features of one face.
//
// The input is the N x N normalised face streamed in raster order. Both
// descriptors work on the same 3x3 window (window3x3, two row buffers):
//   hog_cell_hist   gradient magnitude / orientation per pixel, summed
//                   into 9-bin histograms of 16x16 cells
//   lbp_unit        8-neighbour LBP code per pixel, 59-bin histogram
// After the face, hog_block_norm turns the cell histograms into the
// 900-value HOG vector, and the LBP histogram follows it, so the output
// is one combined feature vector of 900 + 59 = 959 16-bit words:
//   words   0..899  HOG, unsigned fractions with 16 fraction bits
//   words 900..958  LBP bin counts
// m_last marks word 958. Software then selects features from this vector.
//
// States: CLEAR zeroes both histograms (one address per cycle, also after
// reset), ACCUM takes one pixel per cycle, FLUSH waits for the last
// histogram updates, HOG streams the normalised HOG vector, LBP streams
// the LBP counts. Input is accepted only in ACCUM. Combining the two
// descriptors into one vector follows the design; the word layout is
// this implementation's.
module feature_accel
  import fer_pkg::*;
#(
  parameter int unsigned N = FACE_N
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s_valid,
  output logic  s_ready,
  input  pix_t  s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output feat_t m_data,
  output logic  m_last
);
  localparam int unsigned NC    = N / CELL;
  localparam int unsigned HDEP  = NC * NC * NBINS;
  localparam int unsigned HAW   = $clog2(HDEP);
  localparam int unsigned CLR_N = (HDEP > LBP_BINS) ? HDEP : LBP_BINS;

  typedef enum logic [2:0] {CLEAR, ACCUM, FLUSH, HOG, LBP} state_t;
  state_t state;

  win3_t                win;
  logic [$clog2(N)-1:0] cx, cy;
  logic                 win_valid, last_pix, en;
  logic [$clog2(CLR_N)-1:0] cnt;
  logic                 clr;
  logic [HAW-1:0]       h_rd_addr;
  logic [16:0]          h_rd_data;
  logic [13:0]          l_rd_data;
  logic                 h_busy, l_busy;
  logic [7:0]           code;
  logic                 n_start, n_valid, n_last, n_done;
  feat_t                n_data;
  logic [1:0]           flush_cnt;

  assign s_ready = (state == ACCUM);
  assign en      = s_valid && s_ready;
  assign clr     = (state == CLEAR);

  window3x3 #(.W(N), .H(N)) u_win (
    .clk, .rst_n, .en, .din(s_data), .win, .cx, .cy, .win_valid, .last_pix
  );

  hog_cell_hist #(.N(N), .NC(NC)) u_hog (
    .clk, .rst_n, .win_valid, .win, .cx, .cy,
    .clr, .clr_addr(HAW'(cnt)), .rd_addr(h_rd_addr), .rd_data(h_rd_data),
    .busy(h_busy)
  );

  lbp_unit u_lbp (
    .clk, .rst_n, .win_valid, .win, .code,
    .clr, .clr_addr(6'(cnt)), .rd_addr(6'(cnt)), .rd_data(l_rd_data),
    .busy(l_busy)
  );

  hog_block_norm #(.NC(NC)) u_norm (
    .clk, .rst_n, .start(n_start), .rd_addr(h_rd_addr), .rd_data(h_rd_data),
    .m_valid(n_valid), .m_ready(m_ready && state == HOG), .m_data(n_data),
    .m_last(n_last), .done(n_done)
  );

  always_comb begin
    unique case (state)
      HOG: begin
        m_valid = n_valid;
        m_data  = n_data;
        m_last  = 1'b0;
      end
      LBP: begin
        m_valid = 1'b1;
        m_data  = feat_t'(l_rd_data);
        m_last  = (int'(cnt) == LBP_BINS-1);
      end
      default: begin
        m_valid = 1'b0;
        m_data  = '0;
        m_last  = 1'b0;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CLEAR; cnt <= '0; n_start <= 1'b0; flush_cnt <= '0;
    end else begin
      n_start <= 1'b0;
      unique case (state)
        CLEAR: begin
          if (int'(cnt) == CLR_N-1) begin
            cnt <= '0;
            state <= ACCUM;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ACCUM: if (en && last_pix) begin
          flush_cnt <= '0;
          state <= FLUSH;
        end
        FLUSH: begin
          // window register, pipeline register, histogram write
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 2'd2) begin
            n_start <= 1'b1;
            state <= HOG;
          end
        end
        HOG: if (n_done) begin
          cnt <= '0;
          state <= LBP;
        end
        LBP: if (m_ready) begin
          if (int'(cnt) == LBP_BINS-1) begin
            cnt <= '0;
            state <= CLEAR;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= CLEAR;
      endcase
    end
  end

  // no histogram update may be pending when the readout starts
  a_quiet: assert property (@(posedge clk) disable iff (!rst_n)
                            n_start |-> !h_busy && !l_busy);
endmodule
