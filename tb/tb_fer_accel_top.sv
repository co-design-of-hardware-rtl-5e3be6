// End-to-end testbench of fer_accel_top at its default sizes: 256x256
// images, 100x100 faces, 959-word feature vectors.
//
// Two synthetic face images (a bright ellipse with texture on a shaded
// background) go through the preprocessing accelerator; each face it
// returns is compared with the reference computed here and is then fed,
// as the processor would after reading it back from memory, to the
// feature accelerator, whose 959 words are compared with the reference
// feature vector. Image 1 is streamed without gaps, and the input rate
// (one pixel per cycle) is checked; image 2 follows immediately with
// gaps and a different face box, so it stalls while face 1 drains. Both
// outputs are back-pressured at random. The mechanisms exercised are
// counted and each must occur: input gaps, input stalls on both
// accelerators, output back-pressure on both, row/column skipping in the
// resize, a contrast stretch, non-uniform LBP codes, non-zero HOG blocks.
// Each image must also be finished well inside the 27.5 frames/s budget
// at 166.67 MHz (6,060,606 cycles).
module tb_fer_accel_top;
  import fer_pkg::*;
  import fer_ref_pkg::*;
  localparam int W = 256, H = 256, N = 100, NF = 959, FRAMES = 2;
  localparam int BUDGET = 6060606;
  localparam int JOBS = 3;
  localparam int JOB_FACE[JOBS] = '{0, 1, 1};

  logic clk = 0, rst_n = 0;
  logic [7:0] roi_x = 1, roi_y = 1;
  logic [8:0] roi_w = 100, roi_h = 100;
  logic pre_s_valid = 0, pre_s_ready, pre_m_valid, pre_m_ready = 0, pre_m_last;
  pix_t pre_s_data = 0, pre_m_data;
  logic feat_s_valid = 0, feat_s_ready, feat_m_valid, feat_m_ready = 0, feat_m_last;
  pix_t feat_s_data = 0;
  feat_t feat_m_data;

  fer_accel_top dut (.*);

  int box[FRAMES][4] = '{'{70, 100, 120, 150}, '{40, 30, 180, 200}};
  int img[FRAMES][];
  int face_ref[FRAMES][];
  int feat_ref[FRAMES][];
  int face_got[FRAMES][N*N];
  int nface[FRAMES] = '{0, 0};
  int nfeat[JOBS] = '{0, 0, 0};
  int checks = 0, failures = 0, cyc = 0;
  int t_start[FRAMES], t_end[JOBS];
  int pf = 0, ff = 0;          // frame index of the pre / feature outputs
  // mechanism counters
  int n_gap = 0, n_pre_stall = 0, n_feat_stall = 0, n_pre_bp = 0, n_feat_bp = 0;
  int n_skip = 0, n_stretch = 0, n_nonuni = 0, n_hog = 0;

  always #3 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    pre_m_ready  <= ($urandom_range(0, 1) != 0);
    feat_m_ready <= ($urandom_range(0, 4) != 0);
    if (pre_s_valid && !pre_s_ready) n_pre_stall++;
    if (feat_s_valid && !feat_s_ready) n_feat_stall++;
    if (pre_m_valid && !pre_m_ready) n_pre_bp++;
    if (feat_m_valid && !feat_m_ready) n_feat_bp++;
    if (pre_m_valid && pre_m_ready) begin
      int k;
      k = nface[pf];
      checks++;
      if (int'(pre_m_data) != face_ref[pf][k] || pre_m_last != (k == N*N-1)) begin
        failures++;
        if (failures < 10) $display("face %0d pixel %0d: %0d expected %0d", pf, k,
                                    pre_m_data, face_ref[pf][k]);
      end
      face_got[pf][k] = int'(pre_m_data);
      nface[pf]++;
      if (pre_m_last) pf++;
    end
    if (feat_m_valid && feat_m_ready) begin
      int k;
      k = nfeat[ff];
      checks++;
      if (int'(feat_m_data) != feat_ref[JOB_FACE[ff]][k] || feat_m_last != (k == NF-1)) begin
        failures++;
        if (failures < 10) $display("features %0d word %0d: %0d expected %0d", ff, k,
                                    feat_m_data, feat_ref[JOB_FACE[ff]][k]);
      end
      nfeat[ff]++;
      if (feat_m_last) begin
        t_end[ff] = cyc;
        ff++;
      end
    end
  end

  function automatic int synth_px(int f, int x, int y);
    int dx, dy, v;
    dx = x - (box[f][0] + box[f][2]/2);
    dy = y - (box[f][1] + box[f][3]/2);
    v = 40 + (x + y) / 8;
    if (dx*dx*4*box[f][3]*box[f][3] + dy*dy*4*box[f][2]*box[f][2]
        < box[f][2]*box[f][2]*box[f][3]*box[f][3])
      v = 150 + ((x * 7 + y * 3) % 23) - ((x * y) % 17);
    v += $urandom_range(0, 12);
    return (v > 255) ? 255 : v;
  endfunction

  // processor side 1: write the images to the preprocessing accelerator
  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int mn, mx;
      longint hist[];
      img[f] = new[W*H];
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y*W+x] = synth_px(f, x, y);
      ref_preproc(W, H, N, img[f], box[f][0], box[f][1], box[f][2], box[f][3],
                  face_ref[f]);
      ref_features(N, face_ref[f], feat_ref[f]);
      if (box[f][2] > N || box[f][3] > N) n_skip++;
      mn = 255; mx = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          int g;
          g = ref_gauss_px(W, img[f], box[f][0] + (j*box[f][2])/N,
                           box[f][1] + (i*box[f][3])/N);
          if (g < mn) mn = g;
          if (g > mx) mx = g;
        end
      if (mx - mn < 255) n_stretch++;
      for (int y = 1; y < N-1; y++)
        for (int x = 1; x < N-1; x++)
          if (ref_lbp_bin(ref_lbp_code(face_ref[f], N, x, y)) == 58) n_nonuni++;
      for (int i = 0; i < 900; i++) if (feat_ref[f][i] != 0) n_hog++;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      roi_x <= 8'(box[f][0]); roi_y <= 8'(box[f][1]);
      roi_w <= 9'(box[f][2]); roi_h <= 9'(box[f][3]);
      @(negedge clk);
      t_start[f] = cyc;
      for (int i = 0; i < W*H; i++) begin
        pre_s_valid = 1; pre_s_data = pix_t'(img[f][i]);
        while (!pre_s_ready) @(negedge clk);
        @(negedge clk);
        if (f == 1 && $urandom_range(0, 7) == 0) begin
          n_gap++;
          pre_s_valid = 0;
          @(negedge clk);
        end
      end
      pre_s_valid = 0;
      if (f == 0) begin
        checks++;
        if (cyc - t_start[0] != W*H) begin
          failures++;
          $display("image 1 took %0d cycles to enter, expected %0d", cyc - t_start[0], W*H);
        end
      end
      // the next image, with its own face box, follows at once
    end
  end

  // processor side 2: feed each returned face to the feature accelerator;
  // the last face is sent twice in a row, the second time while the
  // first one's features are still being read out
  initial begin
    @(posedge rst_n);
    for (int jb = 0; jb < JOBS; jb++) begin
      while (pf <= JOB_FACE[jb]) @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < N*N; i++) begin
        feat_s_valid = 1; feat_s_data = pix_t'(face_got[JOB_FACE[jb]][i]);
        while (!feat_s_ready) @(negedge clk);
        @(negedge clk);
      end
      feat_s_valid = 0;
    end
    while (ff < JOBS) @(posedge clk);
    repeat (10) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      checks++;
      if (nface[f] != N*N) begin
        failures++;
        $display("image %0d: %0d face pixels", f, nface[f]);
      end
    end
    for (int jb = 0; jb < JOBS; jb++) begin
      checks++;
      if (nfeat[jb] != NF) begin
        failures++;
        $display("job %0d: %0d features", jb, nfeat[jb]);
      end
    end
    for (int f = 0; f < FRAMES; f++) begin
      checks++;
      if (t_end[f] - t_start[f] > BUDGET) begin
        failures++;
        $display("image %0d took %0d cycles", f, t_end[f] - t_start[f]);
      end
      $display("image %0d: %0d cycles from first pixel to last feature", f,
               t_end[f] - t_start[f]);
    end
    $display("gaps %0d, pre stalls %0d, feature stalls %0d, pre back-pressure %0d, feature back-pressure %0d",
             n_gap, n_pre_stall, n_feat_stall, n_pre_bp, n_feat_bp);
    $display("resize skips %0d, stretches %0d, non-uniform LBP %0d, non-zero HOG %0d",
             n_skip, n_stretch, n_nonuni, n_hog);
    if (n_gap == 0)        begin failures++; $display("no input gap");              end
    if (n_pre_stall == 0)  begin failures++; $display("no preprocessing stall");    end
    if (n_feat_stall == 0) begin failures++; $display("no feature input stall");    end
    if (n_pre_bp == 0)     begin failures++; $display("no face back-pressure");     end
    if (n_feat_bp == 0)    begin failures++; $display("no feature back-pressure");  end
    if (n_skip == 0)       begin failures++; $display("no resize skipping");        end
    if (n_stretch == 0)    begin failures++; $display("no contrast stretch");       end
    if (n_nonuni == 0)     begin failures++; $display("no non-uniform LBP code");   end
    if (n_hog == 0)        begin failures++; $display("no non-zero HOG value");     end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
