// HOG block normalisation: turns the cell histograms into the HOG vector.
//
// Cells are grouped into 2x2-cell blocks that overlap by one cell; with
// NC = 6 cells per side there are 5x5 blocks of 4 x 9 = 36 values, which
// is the 900-long HOG vector the design uses for a 100x100 face with
// 16x16 cells. Blocks go in raster order; inside a block the cells go
// (top-left, top-right, bottom-left, bottom-right), each with its 9 bins.
//
// Each block is L2-normalised: with s = sum of the squares of its 36
// values and r = floor(sqrt(s)), each value v becomes
//     floor(v * 2^16 / (r + 1)),
// an unsigned fraction with 16 fraction bits, always below 1.0 because
// v <= r. The "+1" keeps an empty block at zero without a special case.
// L2 block normalisation is this implementation's choice; the design
// does not spell out the HOG normalisation.
//
// Per block: 36 cycles to sum squares (SUM), 20 for the square root
// (SQRT), then 34 per value for a sequential division (DIV) and one
// handshake per value on the output stream. A start pulse begins a pass;
// done pulses after the 900th value has been taken (m_last marks it).
// The histogram is read through rd_addr / rd_data (combinational).
module hog_block_norm
  import fer_pkg::*;
#(
  parameter int unsigned NC = FACE_N / CELL,
  parameter int unsigned HW = 17,
  parameter int unsigned AW = $clog2(NC*NC*NBINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [AW-1:0] rd_addr,
  input  logic [HW-1:0] rd_data,
  output logic          m_valid,
  input  logic          m_ready,
  output feat_t         m_data,
  output logic          m_last,
  output logic          done
);
  localparam int unsigned NB    = NC - 1;          // blocks per side
  localparam int unsigned BVALS = 4 * NBINS;       // values per block
  localparam int unsigned RAD_W = 2*HW + 6;
  localparam int unsigned ROOT_W = HW + 3;

  typedef enum logic [2:0] {IDLE, SUM, SQRT, DIV_START, DIV_WAIT, EMIT} state_t;
  state_t state;

  logic [$clog2(NB)-1:0]    bx, by;
  logic [$clog2(BVALS)-1:0] j;
  logic [1:0]               cq;
  logic [3:0]               b;
  logic [RAD_W-1:0]         acc;
  logic                     sq_start, sq_done, sq_busy;
  logic [ROOT_W-1:0]        root;
  logic                     dv_start, dv_done, dv_busy;
  logic [HW+15:0]           quot;
  logic                     last_blk;

  assign cq = 2'(j / NBINS);
  assign b    = 4'(j % NBINS);
  assign rd_addr = AW'(((int'(by) + int'(cq[1])) * NC + int'(bx) + int'(cq[0])) * NBINS
                       + int'(b));
  assign last_blk = (bx == $bits(bx)'(NB-1)) && (by == $bits(by)'(NB-1));

  seq_isqrt #(.RAD_W(RAD_W), .ROOT_W(ROOT_W)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .radicand(acc),
    .busy(sq_busy), .done(sq_done), .root
  );

  seq_divider #(.NUM_W(HW+16), .DEN_W(ROOT_W+1)) u_div (
    .clk, .rst_n, .start(dv_start), .dividend({rd_data, 16'd0}),
    .divisor({1'b0, root} + 1'b1),
    .busy(dv_busy), .done(dv_done), .quotient(quot)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; bx <= '0; by <= '0; j <= '0; acc <= '0;
      sq_start <= 1'b0; dv_start <= 1'b0; done <= 1'b0;
      m_valid <= 1'b0; m_data <= '0; m_last <= 1'b0;
    end else begin
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          bx <= '0; by <= '0; j <= '0; acc <= '0;
          state <= SUM;
        end
        SUM: begin
          acc <= acc + RAD_W'(rd_data) * RAD_W'(rd_data);
          if (j == $bits(j)'(BVALS-1)) begin
            j <= '0;
            state <= SQRT;
            sq_start <= 1'b1;
          end else begin
            j <= j + 1'b1;
          end
        end
        SQRT: if (sq_done) state <= DIV_START;
        DIV_START: begin
          dv_start <= 1'b1;
          state <= DIV_WAIT;
        end
        DIV_WAIT: if (dv_done) begin
          m_valid <= 1'b1;
          m_data  <= feat_t'(quot);
          m_last  <= last_blk && (j == $bits(j)'(BVALS-1));
          state   <= EMIT;
        end
        EMIT: if (m_ready) begin
          m_valid <= 1'b0;
          if (j != $bits(j)'(BVALS-1)) begin
            j <= j + 1'b1;
            state <= DIV_START;
          end else begin
            j <= '0;
            acc <= '0;
            if (last_blk) begin
              done <= 1'b1;
              state <= IDLE;
            end else begin
              if (bx == $bits(bx)'(NB-1)) begin
                bx <= '0;
                by <= by + 1'b1;
              end else begin
                bx <= bx + 1'b1;
              end
              state <= SUM;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the quotient is a fraction below one
  a_frac: assert property (@(posedge clk) disable iff (!rst_n)
                           dv_done |-> quot < (HW+16)'(65536));
endmodule
