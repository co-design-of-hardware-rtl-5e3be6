// Testbench for gaussian_filter on a 16x12 random frame.
// Frame 1 runs with the output always ready and checks the rate: one
// pixel accepted per cycle, so the frame enters in W*H cycles. Frame 2
// adds random input gaps and output back-pressure. Every output is
// compared with the 3x3 binomial kernel computed here, with its
// coordinates, and the output count and m_last are checked.
module tb_gaussian_filter;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int W = 16, H = 12;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 1, m_last;
  pix_t s_data = 0, m_data;
  logic [$clog2(W)-1:0] m_x;
  logic [$clog2(H)-1:0] m_y;
  int img[];
  int checks = 0, failures = 0, nout = 0, nlast = 0, cyc = 0;
  bit stress = 0;

  gaussian_filter #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stress) m_ready <= ($urandom_range(0, 2) != 0);
    if (m_valid && m_ready) begin
      int exp_x, exp_y;
      exp_x = 1 + (nout % ((W-2)*(H-2))) % (W-2);
      exp_y = 1 + (nout % ((W-2)*(H-2))) / (W-2);
      checks++;
      if (int'(m_x) != exp_x || int'(m_y) != exp_y ||
          int'(m_data) != ref_gauss_px(W, img, exp_x, exp_y)) begin
        failures++;
        $display("out %0d: (%0d,%0d)=%0d expected (%0d,%0d)=%0d", nout, m_x, m_y,
                 m_data, exp_x, exp_y, ref_gauss_px(W, img, exp_x, exp_y));
      end
      if (m_last) nlast++;
      nout++;
    end
  end

  int t0;

  task automatic send_frame(bit gaps);
    @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < W*H; i++) begin
      s_valid = 1; s_data = pix_t'(img[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
      if (gaps && $urandom_range(0, 3) == 0) begin
        s_valid = 0;
        @(negedge clk);
      end
    end
    s_valid = 0;
  endtask

  initial begin
    img = new[W*H];
    foreach (img[i]) img[i] = $urandom_range(0, 255);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send_frame(0);
    checks++;
    if (cyc - t0 != W*H) begin
      failures++;
      $display("frame took %0d cycles, expected %0d", cyc - t0, W*H);
    end
    repeat (3) @(posedge clk);
    stress = 1;
    send_frame(1);
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 2*(W-2)*(H-2) || nlast != 2) begin
      failures++;
      $display("outputs %0d last %0d", nout, nlast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
