// Testbench for hog_block_norm with 3x3 cells (2x2 blocks, 144 values).
// The cell histograms are a memory model here filled with random values,
// including an all-zero block and a block with a single non-zero value.
// Every output word is compared with the L2 normalisation computed here,
// m_last and done are checked, and the output is back-pressured at
// random. Two passes run back to back.
module tb_hog_block_norm;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int NC = 3, DEP = NC*NC*9, NOUT = (NC-1)*(NC-1)*36;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] rd_addr;
  logic [16:0] rd_data;
  logic m_valid, m_ready = 0, m_last, done;
  feat_t m_data;
  longint hist[];
  int hog[];
  logic [16:0] mem [DEP];
  int checks = 0, failures = 0, nout = 0, ndone = 0;

  hog_block_norm #(.NC(NC)) dut (.*);

  assign rd_data = (int'(rd_addr) < DEP) ? mem[rd_addr] : '0;

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 2) != 0);
    if (done) ndone++;
    if (m_valid && m_ready) begin
      checks++;
      if (int'(m_data) != hog[nout] || m_last != (nout == NOUT-1)) begin
        failures++;
        $display("word %0d: %0d last %0d expected %0d", nout, m_data, m_last, hog[nout]);
      end
      nout++;
    end
  end

  task automatic pass(int variant);
    hist = new[DEP];
    foreach (hist[i]) begin
      hist[i] = (variant == 0) ? $urandom_range(0, 20000) : $urandom_range(0, 92160);
      mem[i] = 17'(hist[i]);
    end
    if (variant == 1) begin
      // block (0,0) empty; one non-zero value in cell 5
      for (int b = 0; b < 9; b++) begin
        hist[0*9+b] = 0; hist[1*9+b] = 0; hist[3*9+b] = 0; hist[4*9+b] = 0;
        hist[8*9+b] = 0; hist[7*9+b] = 0; hist[5*9+b] = 0;
      end
      hist[5*9+4] = 12345;
      foreach (hist[i]) mem[i] = 17'(hist[i]);
    end
    ref_blocks(NC, hist, hog);
    nout = 0;
    @(posedge clk) start <= 1;
    @(posedge clk) start <= 0;
    while (nout < NOUT) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    pass(0);
    pass(1);
    checks++;
    if (ndone != 2) begin
      failures++;
      $display("done seen %0d times", ndone);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
