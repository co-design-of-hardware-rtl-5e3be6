// Testbench for window3x3: two random 9x7 frames streamed back to back with
// random gaps; every win_valid pulse is checked against the frame at the
// reported centre, and the number of windows per frame must be (W-2)(H-2).
module tb_window3x3;
  import fer_pkg::*;
  localparam int W = 9, H = 7, FRAMES = 2;
  logic clk = 0, rst_n = 0, en = 0;
  pix_t din = 0;
  win3_t win;
  logic [$clog2(W)-1:0] cx;
  logic [$clog2(H)-1:0] cy;
  logic win_valid, last_pix;
  int img[FRAMES][H][W];
  int frame_of_check = 0;
  int checks = 0, failures = 0, nwin = 0, nlast = 0;

  window3x3 #(.W(W), .H(H)) dut (.clk, .rst_n, .en, .din, .win, .cx, .cy,
                                 .win_valid, .last_pix);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (en && last_pix) nlast++;

  always @(negedge clk) if (rst_n && win_valid) begin
    int f;
    bit bad;
    f = nwin / ((W-2)*(H-2));
    bad = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (int'(win[r][c]) != img[f][int'(cy)+r-1][int'(cx)+c-1]) bad = 1;
    checks++;
    if (bad || cx < 1 || cy < 1 || int'(cx) > W-2 || int'(cy) > H-2) begin
      failures++;
      $display("window at (%0d,%0d) wrong", cx, cy);
    end
    nwin++;
  end

  initial begin
    foreach (img[f, y, x]) img[f][y][x] = $urandom_range(0, 255);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          en = 0;
          if ($urandom_range(0, 2) == 0) @(negedge clk);
          en = 1; din = pix_t'(img[f][y][x]);
        end
    @(negedge clk) en = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (nwin != FRAMES*(W-2)*(H-2)) begin
      failures++;
      $display("windows: %0d", nwin);
    end
    checks++;
    if (nlast != FRAMES) begin
      failures++;
      $display("last_pix seen %0d times", nlast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
