// Testbench for seq_isqrt with the HOG block sizes (40-bit radicand,
// 20-bit root): perfect squares, their neighbours, the extremes and random
// values; each root must satisfy r^2 <= v < (r+1)^2 and arrive ROOT_W
// cycles after start.
module tb_seq_isqrt;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [39:0] radicand = 0;
  logic [19:0] root;
  int checks = 0, failures = 0;

  seq_isqrt #(.RAD_W(40), .ROOT_W(20)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint v);
    int n;
    longint r;
    @(negedge clk);
    radicand = 40'(v); start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    while (!done) begin
      @(negedge clk);
      n++;
    end
    r = longint'(root);
    checks++;
    if (r * r > v || (r + 1) * (r + 1) <= v || n != 20) begin
      failures++;
      $display("sqrt(%0d) = %0d after %0d cycles", v, root, n);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4);
    one((longint'(1) << 40) - 1);
    for (int i = 0; i < 200; i++) begin
      longint s;
      s = longint'($urandom_range(0, 1048575));
      one(s * s); one(s * s - 1); one(s * s + 1);
    end
    for (int i = 0; i < 300; i++) one({$urandom, $urandom} & 40'hFF_FFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
