// Testbench for hog_cell_hist with a 40x40 face (2x2 cells of 16x16, so
// pixels 32..38 lie outside every cell). Random windows at random centres
// arrive as win_valid pulses, many back to back on the same cell; the 36
// histogram entries are then read and compared with sums of magnitudes
// computed here, cleared, and read again as zero.
module tb_hog_cell_hist;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int N = 40, NC = 2, DEP = NC*NC*9;
  logic clk = 0, rst_n = 0, win_valid = 0, clr = 0, busy;
  win3_t win;
  logic [5:0] cx = 0, cy = 0;
  logic [5:0] clr_addr = 0, rd_addr = 0;
  logic [16:0] rd_data;
  longint hist[DEP];
  int checks = 0, failures = 0, outside = 0;

  hog_cell_hist #(.N(N), .NC(NC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w[9];
    foreach (hist[i]) hist[i] = 0;
    foreach (win[i, j]) win[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    clr <= 1;
    for (int a = 0; a < DEP; a++) begin
      clr_addr <= 6'(a);
      @(posedge clk);
    end
    clr <= 0;
    for (int n = 0; n < 3000; n++) begin
      int x, y, mag, bin;
      if (n % 50 == 0 || $urandom_range(0, 3) == 0) begin
        x = $urandom_range(1, N-2); y = $urandom_range(1, N-2);
      end
      foreach (w[i]) w[i] = $urandom_range(0, 255);
      foreach (win[i, j]) win[i][j] <= pix_t'(w[i*3+j]);
      cx <= 6'(x); cy <= 6'(y);
      win_valid <= 1;
      ref_grad(w[0], w[1], w[2], w[3], w[4], w[5], w[6], w[7], w[8], mag, bin);
      if (x < NC*16 && y < NC*16) hist[((y/16)*NC + x/16)*9 + bin] += mag;
      else outside++;
      @(posedge clk);
      if ($urandom_range(0, 2) == 0) begin
        win_valid <= 0;
        @(posedge clk);
      end
    end
    win_valid <= 0;
    repeat (3) @(posedge clk);
    for (int a = 0; a < DEP; a++) begin
      rd_addr <= 6'(a);
      @(posedge clk);
      checks++;
      if (longint'(rd_data) != hist[a]) begin
        failures++;
        $display("entry %0d: %0d expected %0d", a, rd_data, hist[a]);
      end
    end
    checks++;
    if (outside == 0) failures++;
    clr <= 1;
    for (int a = 0; a < DEP; a++) begin
      clr_addr <= 6'(a);
      @(posedge clk);
    end
    clr <= 0;
    for (int a = 0; a < DEP; a++) begin
      rd_addr <= 6'(a);
      @(posedge clk);
      checks++;
      if (rd_data != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
