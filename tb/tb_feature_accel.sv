// Testbench for feature_accel with a 48x48 face (3x3 cells, 2x2 blocks:
// 144 HOG words, then 59 LBP counts). Three faces are streamed: a smooth
// random face, a face of random noise and a flat face (all HOG zero, all
// LBP codes 255). Every output word is compared with the reference
// feature vector computed here, m_last is checked, input arrives with
// gaps and the output is back-pressured at random. The input phase must
// take one pixel per cycle when offered without gaps.
module tb_feature_accel;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int N = 48;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0, m_last;
  pix_t s_data = 0;
  feat_t m_data;
  int face[];
  int feat[];
  int checks = 0, failures = 0, nout = 0, cyc = 0;

  feature_accel #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 3) != 0);
    if (m_valid && m_ready) begin
      checks++;
      if (int'(m_data) != feat[nout] || m_last != (nout == feat.size()-1)) begin
        failures++;
        $display("word %0d: %0d last %0d expected %0d", nout, m_data, m_last, feat[nout]);
      end
      nout++;
    end
  end

  task automatic run(int kind, bit gaps);
    int t0;
    face = new[N*N];
    foreach (face[i]) begin
      case (kind)
        0: face[i] = ((i % N) * 3 + (i / N) * 2 + $urandom_range(0, 40)) % 256;
        1: face[i] = $urandom_range(0, 255);
        default: face[i] = 90;
      endcase
    end
    ref_features(N, face, feat);
    nout = 0;
    @(negedge clk);
    while (!s_ready) @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < N*N; i++) begin
      s_valid = 1; s_data = pix_t'(face[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
      if (gaps && $urandom_range(0, 3) == 0) begin
        s_valid = 0;
        @(negedge clk);
      end
    end
    s_valid = 0;
    if (!gaps) begin
      checks++;
      if (cyc - t0 != N*N) begin
        failures++;
        $display("input took %0d cycles", cyc - t0);
      end
    end
    while (nout < feat.size()) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(0, 0);
    run(1, 1);
    run(2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
