// Testbench for lbp_unit: random windows (and some with equal neighbours,
// all-dark and all-bright rings) are presented as win_valid pulses, some
// back to back. The code is checked for every window; afterwards the 59
// histogram bins are read and compared with counts kept here, then
// cleared and read again as zero.
module tb_lbp_unit;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  logic clk = 0, rst_n = 0, win_valid = 0, clr = 0;
  win3_t win;
  logic [7:0] code;
  logic [5:0] clr_addr = 0, rd_addr = 0;
  logic [13:0] rd_data;
  logic busy;
  int cnt[59];
  int checks = 0, failures = 0;

  lbp_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int img[9];
    int c;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (win[i, j]) win[i][j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    clr <= 1;
    for (int a = 0; a < 64; a++) begin
      clr_addr <= 6'(a);
      @(posedge clk);
    end
    clr <= 0;
    for (int n = 0; n < 3000; n++) begin
      int kind;
      kind = $urandom_range(0, 9);
      foreach (img[i]) begin
        case (kind)
          0: img[i] = 100 + $urandom_range(0, 1);
          1: img[i] = (i == 4) ? 50 : 200;
          2: img[i] = (i == 4) ? 200 : 50;
          default: img[i] = $urandom_range(0, 255);
        endcase
      end
      foreach (win[i, j]) win[i][j] <= pix_t'(img[i*3+j]);
      win_valid <= 1;
      @(posedge clk);
      c = ref_lbp_code(img, 3, 1, 1);
      checks++;
      if (int'(code) != c) begin
        failures++;
        $display("code %0h expected %0h", code, c);
      end
      cnt[ref_lbp_bin(c)]++;
      if ($urandom_range(0, 1) == 0) begin
        win_valid <= 0;
        @(posedge clk);
      end
    end
    win_valid <= 0;
    repeat (3) @(posedge clk);
    for (int a = 0; a < 59; a++) begin
      rd_addr <= 6'(a);
      @(posedge clk);
      checks++;
      if (int'(rd_data) != cnt[a]) begin
        failures++;
        $display("bin %0d: %0d expected %0d", a, rd_data, cnt[a]);
      end
    end
    clr <= 1;
    for (int a = 0; a < 59; a++) begin
      clr_addr <= 6'(a);
      @(posedge clk);
    end
    clr <= 0;
    for (int a = 0; a < 59; a++) begin
      rd_addr <= 6'(a);
      @(posedge clk);
      checks++;
      if (rd_data != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
