// Testbench for intensity_normalize on 8x8 faces: a random face with a
// narrow grey range, a full-range face and a flat face. Each output is
// compared with round((p-min)*255/(max-min)) in the block's fixed-point
// form and must also be within 1 of the exact real result; m_last, the
// output count and the fill rate (one pixel per cycle) are checked.
module tb_intensity_normalize;
  import fer_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 0, m_last;
  pix_t s_data = 0, m_data;
  int face[N*N];
  int mn, mx;
  int checks = 0, failures = 0, nout = 0, cyc = 0;

  intensity_normalize #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    m_ready <= ($urandom_range(0, 2) != 0);
    if (m_valid && m_ready) begin
      int range, recip, e;
      real ideal;
      range = (mx == mn) ? 1 : mx - mn;
      recip = (255 << 16) / range;
      e = int'((longint'(face[nout] - mn) * recip + 32768) >>> 16);
      ideal = (mx == mn) ? 0.0 : real'(face[nout] - mn) * 255.0 / real'(mx - mn);
      checks++;
      if (int'(m_data) != e || (real'(m_data) - ideal > 1.0 || ideal - real'(m_data) > 1.0) ||
          m_last != (nout == N*N-1)) begin
        failures++;
        $display("pixel %0d: %0d expected %0d (ideal %f)", nout, m_data, e, ideal);
      end
      nout++;
    end
  end

  task automatic run(int lo, int hi);
    int t0;
    mn = 255; mx = 0;
    foreach (face[i]) begin
      face[i] = $urandom_range(lo, hi);
      if (face[i] < mn) mn = face[i];
      if (face[i] > mx) mx = face[i];
    end
    nout = 0;
    @(negedge clk);
    while (!s_ready) @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < N*N; i++) begin
      s_valid = 1; s_data = pix_t'(face[i]);
      @(negedge clk);
    end
    s_valid = 0;
    checks++;
    if (cyc - t0 != N*N) begin
      failures++;
      $display("fill took %0d cycles", cyc - t0);
    end
    while (nout < N*N) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(60, 140);
    run(0, 255);
    run(77, 77);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
