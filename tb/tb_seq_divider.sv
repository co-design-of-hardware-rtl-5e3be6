// Testbench for seq_divider (24-bit dividend, 8-bit divisor, as used for
// the normalisation reciprocal): random and edge-case operands, each
// quotient checked against integer division, done one NUM_W cycles after
// start, and the all-ones result for a zero divisor.
module tb_seq_divider;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [23:0] dividend = 0, quotient;
  logic [7:0] divisor = 1;
  int checks = 0, failures = 0;

  seq_divider #(.NUM_W(24), .DEN_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int unsigned a, int unsigned b);
    int n;
    int unsigned e;
    @(negedge clk);
    dividend = 24'(a); divisor = 8'(b); start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    e = (b == 0) ? 24'hFFFFFF : a / b;
    checks++;
    if (quotient != 24'(e) || n != 24) begin
      failures++;
      $display("%0d / %0d = %0d after %0d cycles, expected %0d", a, b, quotient, n, e);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(255 << 16, 1);
    one(255 << 16, 255);
    one(0, 7);
    one(24'hFFFFFF, 2);
    one(1234, 0);
    for (int i = 0; i < 500; i++) one($urandom_range(0, 24'hFFFFFF), $urandom_range(1, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
