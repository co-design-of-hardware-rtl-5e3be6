// Testbench for hog_gradient: random and hand-picked 3x3 windows (flat,
// pure horizontal and vertical edges, both signs, extreme values). The
// magnitude must equal floor(sqrt(gx^2+gy^2)) and the bin the boundary
// test with constants derived here; the bin must also agree with
// floor(atan2/20 deg) except within 0.01 degree of a boundary.
module tb_hog_gradient;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  win3_t win;
  logic [8:0] mag;
  logic [3:0] bin;
  int checks = 0, failures = 0;

  hog_gradient dut (.win, .mag, .bin);

  task automatic check_win();
    int em, eb, gx, gy;
    real a;
    #1;
    ref_grad(win[0][0], win[0][1], win[0][2], win[1][0], win[1][1], win[1][2],
             win[2][0], win[2][1], win[2][2], em, eb);
    gx = int'(win[1][2]) - int'(win[1][0]);
    gy = int'(win[2][1]) - int'(win[0][1]);
    a = ref_angle(gx, gy);
    checks++;
    if (int'(mag) != em || int'(bin) != eb) begin
      failures++;
      $display("gx=%0d gy=%0d: mag %0d bin %0d, expected %0d %0d", gx, gy, mag, bin, em, eb);
    end
    if ((gx != 0 || gy != 0) && (a/20.0 - $floor(a/20.0 + 0.5) > 0.0005 || $floor(a/20.0 + 0.5) - a/20.0 > 0.0005)) begin
      checks++;
      if (int'(bin) != int'($floor(a / 20.0))) begin
        failures++;
        $display("gx=%0d gy=%0d angle %f: bin %0d", gx, gy, a, bin);
      end
    end
  endtask

  task automatic set(int l, int r, int t, int b);
    foreach (win[i, j]) win[i][j] = pix_t'($urandom_range(0, 255));
    win[1][0] = pix_t'(l); win[1][2] = pix_t'(r);
    win[0][1] = pix_t'(t); win[2][1] = pix_t'(b);
  endtask

  initial begin
    set(9, 9, 9, 9);        check_win();
    set(0, 255, 7, 7);      check_win();
    set(255, 0, 7, 7);      check_win();
    set(7, 7, 0, 255);      check_win();
    set(7, 7, 255, 0);      check_win();
    set(0, 255, 0, 255);    check_win();
    set(255, 0, 0, 255);    check_win();
    set(0, 255, 255, 0);    check_win();
    for (int n = 0; n < 4000; n++) begin
      foreach (win[i, j]) win[i][j] = pix_t'($urandom_range(0, 255));
      check_win();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
