// Reference models for the feature accelerators' testbenches.
//
// Plain behavioural SystemVerilog, written from the algorithm definitions
// rather than from the RTL: images are flat int arrays in raster order.
// The HOG bin boundaries are derived here with $cos/$sin, and the LBP
// uniform-pattern table is built by enumerating rotated runs of ones.
package fer_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int ref_gauss_px(int W, int img[], int x, int y);
    int k[3][3] = '{'{1, 2, 1}, '{2, 4, 2}, '{1, 2, 1}};
    int s = 0;
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        s += k[dy+1][dx+1] * img[(y+dy)*W + x+dx];
    return (s + 8) / 16;
  endfunction

  // Gaussian, crop and resize, normalise: the face as it leaves the
  // preprocessing accelerator.
  function automatic void ref_preproc(int W, int H, int N, int img[],
                                      int rx, int ry, int rw, int rh,
                                      output int face[]);
    int w = (rw < N) ? N : rw;
    int h = (rh < N) ? N : rh;
    int mn = 255, mx = 0, range, recip;
    int raw[];
    raw = new[N*N];
    face = new[N*N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        raw[i*N+j] = ref_gauss_px(W, img, rx + (j*w)/N, ry + (i*h)/N);
        if (raw[i*N+j] < mn) mn = raw[i*N+j];
        if (raw[i*N+j] > mx) mx = raw[i*N+j];
      end
    range = (mx == mn) ? 1 : mx - mn;
    recip = (255 << 16) / range;
    foreach (raw[i]) begin
      longint v = (longint'(raw[i] - mn) * recip + 32768) >>> 16;
      face[i] = (v > 255) ? 255 : int'(v);
    end
  endfunction

  function automatic int ref_isqrt(longint s);
    longint r = longint'($floor($sqrt(real'(s))));
    while (r * r > s) r--;
    while ((r + 1) * (r + 1) <= s) r++;
    return int'(r);
  endfunction

  // Bin boundary constants, 2^16 * cos/sin of 20..160 degrees, rounded.
  function automatic int ref_cq(int k);
    return int'($floor($cos((k+1) * 20.0 * PI / 180.0) * 65536.0 + 0.5));
  endfunction
  function automatic int ref_sq(int k);
    return int'($floor($sin((k+1) * 20.0 * PI / 180.0) * 65536.0 + 0.5));
  endfunction

  function automatic void ref_grad(int tl, int t, int tr, int l, int c, int r,
                                   int bl, int b, int br,
                                   output int mag, output int bin);
    int gx = r - l, gy = b - t;
    if (gy < 0 || (gy == 0 && gx < 0)) begin gx = -gx; gy = -gy; end
    mag = ref_isqrt(longint'(gx*gx + gy*gy));
    bin = 0;
    for (int k = 0; k < 8; k++)
      if (longint'(gy) * ref_cq(k) - longint'(gx) * ref_sq(k) >= 0) bin++;
  endfunction

  // Orientation in degrees, 0..180, straight from atan2.
  function automatic real ref_angle(int gx, int gy);
    real a = $atan2(real'(gy), real'(gx)) * 180.0 / PI;
    if (a < 0.0) a += 180.0;
    if (a >= 180.0) a -= 180.0;
    return a;
  endfunction

  function automatic int ref_lbp_code(int img[], int W, int x, int y);
    int dx[8] = '{-1, 0, 1, 1, 1, 0, -1, -1};
    int dy[8] = '{-1, -1, -1, 0, 1, 1, 1, 0};
    int c = 0;
    for (int i = 0; i < 8; i++)
      if (img[(y+dy[i])*W + x+dx[i]] >= img[y*W+x]) c |= (1 << i);
    return c;
  endfunction

  function automatic int ref_lbp_bin(int code);
    for (int n = 1; n < 8; n++)
      for (int r = 0; r < 8; r++) begin
        int p = ((1 << n) - 1) << r;
        p = (p | (p >> 8)) & 255;
        if (p == code) return 1 + (n-1)*8 + r;
      end
    if (code == 0) return 0;
    if (code == 255) return 57;
    return 58;
  endfunction

  // Cell histograms of an N x N face (NC x NC cells of 16x16, 9 bins).
  function automatic void ref_cells(int N, int face[], output longint hist[]);
    int NC = N / 16;
    hist = new[NC*NC*9];
    foreach (hist[i]) hist[i] = 0;
    for (int y = 1; y < N-1; y++)
      for (int x = 1; x < N-1; x++)
        if (x < NC*16 && y < NC*16) begin
          int mag, bin;
          ref_grad(face[(y-1)*N+x-1], face[(y-1)*N+x], face[(y-1)*N+x+1],
                   face[y*N+x-1], face[y*N+x], face[y*N+x+1],
                   face[(y+1)*N+x-1], face[(y+1)*N+x], face[(y+1)*N+x+1],
                   mag, bin);
          hist[((y/16)*NC + x/16)*9 + bin] += mag;
        end
  endfunction

  // Block-normalised HOG vector from cell histograms.
  function automatic void ref_blocks(int NC, longint hist[], output int hog[]);
    int NB = NC - 1;
    hog = new[NB*NB*36];
    for (int by = 0; by < NB; by++)
      for (int bx = 0; bx < NB; bx++) begin
        longint v[36];
        longint s = 0;
        int r;
        for (int c = 0; c < 4; c++)
          for (int b = 0; b < 9; b++) begin
            v[c*9+b] = hist[((by + c/2)*NC + bx + c%2)*9 + b];
            s += v[c*9+b] * v[c*9+b];
          end
        r = ref_isqrt(s);
        for (int i = 0; i < 36; i++)
          hog[(by*NB+bx)*36 + i] = int'((v[i] << 16) / (r + 1));
      end
  endfunction

  // The full feature vector: HOG words, then the 59 LBP counts.
  function automatic void ref_features(int N, int face[], output int feat[]);
    longint hist[];
    int hog[];
    int lbp[59];
    int NC = N / 16;
    ref_cells(N, face, hist);
    ref_blocks(NC, hist, hog);
    foreach (lbp[i]) lbp[i] = 0;
    for (int y = 1; y < N-1; y++)
      for (int x = 1; x < N-1; x++)
        lbp[ref_lbp_bin(ref_lbp_code(face, N, x, y))]++;
    feat = new[hog.size() + 59];
    foreach (hog[i]) feat[i] = hog[i];
    for (int i = 0; i < 59; i++) feat[hog.size() + i] = lbp[i];
  endfunction

endpackage
