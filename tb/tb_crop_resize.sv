// Testbench for crop_resize with a 40x40 frame and a 10x10 output.
// The input stream carries the interior coordinates 1..38 a filtered
// frame would have. Three frames use different face boxes (one exactly
// 10 wide, one smaller than 10 and so clamped, one large); the output
// is back-pressured at random. Each output pixel is checked against the
// source pixel picked by floor(j*w/N), floor(i*h/N), and the count and
// m_last per frame are checked. The box inputs are disturbed after each
// frame's first pixel, which the block must ignore.
module tb_crop_resize;
  import fer_pkg::*;
  localparam int W = 40, H = 40, N = 10;
  logic clk = 0, rst_n = 0;
  logic [5:0] roi_x, roi_y;
  logic [6:0] roi_w, roi_h;
  logic s_valid = 0, s_ready, s_last = 0, m_valid, m_ready = 0, m_last;
  pix_t s_data = 0, m_data;
  logic [5:0] s_x = 0, s_y = 0;
  logic [3:0] m_x, m_y;
  int img[H][W];
  int checks = 0, failures = 0, nout = 0, nlast = 0;
  int rx, ry, rw, rh;

  crop_resize #(.W(W), .H(H), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 3) != 0);
    if (m_valid && m_ready) begin
      int i, j, w, h, e;
      i = nout / N; j = nout % N;
      w = (rw < N) ? N : rw; h = (rh < N) ? N : rh;
      e = img[ry + (i*h)/N][rx + (j*w)/N];
      checks++;
      if (int'(m_data) != e || int'(m_x) != j || int'(m_y) != i ||
          m_last != (nout == N*N-1)) begin
        failures++;
        $display("out (%0d,%0d)=%0d last %0d, expected (%0d,%0d)=%0d", m_x, m_y,
                 m_data, m_last, j, i, e);
      end
      if (m_last) nlast++;
      nout++;
    end
  end

  task automatic frame(int x0, int y0, int w, int h);
    rx = x0; ry = y0; rw = w; rh = h;
    roi_x <= 6'(x0); roi_y <= 6'(y0); roi_w <= 7'(w); roi_h <= 7'(h);
    fork
      begin
        // the box is sampled with the frame's first pixel: changing the
        // inputs later in the frame must have no effect
        @(posedge clk iff (s_valid && s_ready && s_x == 1 && s_y == 1));
        roi_x <= 6'(x0 + 1); roi_w <= 7'(w + 1);
      end
    join_none
    foreach (img[y, x]) img[y][x] = $urandom_range(0, 255);
    nout = 0;
    @(negedge clk);
    for (int y = 1; y <= H-2; y++)
      for (int x = 1; x <= W-2; x++) begin
        s_valid = 1; s_data = pix_t'(img[y][x]);
        s_x = 6'(x); s_y = 6'(y); s_last = (x == W-2 && y == H-2);
        while (!s_ready) @(negedge clk);
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin
          s_valid = 0;
          @(negedge clk);
        end
      end
    s_valid = 0;
    repeat (30) @(posedge clk);
    disable fork;
    checks++;
    if (nout != N*N) begin
      failures++;
      $display("box %0d,%0d,%0d,%0d: %0d outputs", x0, y0, w, h, nout);
    end
  endtask

  initial begin
    roi_x = 1; roi_y = 1; roi_w = 10; roi_h = 10;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    frame(5, 7, 10, 10);
    frame(20, 3, 6, 30);
    frame(1, 2, 38, 35);
    checks++;
    if (nlast != 3) begin
      failures++;
      $display("m_last seen %0d times", nlast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
