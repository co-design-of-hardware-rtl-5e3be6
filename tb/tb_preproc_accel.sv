// Testbench for preproc_accel with a 40x40 image and a 12x12 face.
// Two images with different face boxes are streamed, with input gaps and
// random output back-pressure; every face pixel is compared with the
// reference (3x3 binomial filter, nearest-neighbour crop and resize,
// min-max stretch) computed here, and m_last and the count are checked.
module tb_preproc_accel;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int W = 40, H = 40, N = 12;
  logic clk = 0, rst_n = 0;
  logic [5:0] roi_x = 1, roi_y = 1;
  logic [6:0] roi_w = 12, roi_h = 12;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0, m_last;
  pix_t s_data = 0, m_data;
  int img[];
  int face[];
  int checks = 0, failures = 0, nout = 0;

  preproc_accel #(.W(W), .H(H), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 3) != 0);
    if (m_valid && m_ready) begin
      checks++;
      if (int'(m_data) != face[nout] || m_last != (nout == N*N-1)) begin
        failures++;
        $display("pixel %0d: %0d expected %0d", nout, m_data, face[nout]);
      end
      nout++;
    end
  end

  task automatic run(int x0, int y0, int w, int h);
    img = new[W*H];
    foreach (img[i]) img[i] = ((i % W) * 4 + $urandom_range(0, 60)) % 200 + 20;
    ref_preproc(W, H, N, img, x0, y0, w, h, face);
    roi_x <= 6'(x0); roi_y <= 6'(y0); roi_w <= 7'(w); roi_h <= 7'(h);
    nout = 0;
    @(negedge clk);
    for (int i = 0; i < W*H; i++) begin
      s_valid = 1; s_data = pix_t'(img[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        s_valid = 0;
        @(negedge clk);
      end
    end
    s_valid = 0;
    while (nout < N*N) @(posedge clk);
    repeat (5) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(6, 4, 25, 30);
    run(1, 1, 38, 38);
    checks++;
    if (nout != N*N) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
