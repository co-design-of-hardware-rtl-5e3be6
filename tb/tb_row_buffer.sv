// Testbench for row_buffer: streams random rows through an 8-pixel-wide
// buffer, with idle cycles, and checks that the two outputs show the
// pixels one and two rows above the incoming one.
module tb_row_buffer;
  localparam int W = 8, ROWS = 6;
  logic clk = 0;
  logic en = 0;
  logic [2:0] col = 0;
  logic [7:0] din = 0, up1, up2;
  int img[ROWS][W];
  int checks = 0, failures = 0;

  row_buffer #(.LINE_W(W), .DATA_W(8)) dut (.clk, .en, .col, .din, .up1, .up2);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (img[y, x]) img[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < ROWS; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        en = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
        en = 1; col = 3'(x); din = 8'(img[y][x]);
        #1;
        if (y >= 2) begin
          checks++;
          if (up1 != 8'(img[y-1][x]) || up2 != 8'(img[y-2][x])) begin
            failures++;
            $display("row %0d col %0d: up1=%0d up2=%0d expected %0d %0d",
                     y, x, up1, up2, img[y-1][x], img[y-2][x]);
          end
        end
      end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
