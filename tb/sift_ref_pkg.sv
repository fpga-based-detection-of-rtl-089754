// sift_ref_pkg: behavioural reference model of the scale-space extrema
// detector, used by the testbenches.
//
// It works on whole streams held in dynamic arrays and follows the
// arithmetic of the method directly: a K-tap 1D convolution is
// (sum c_j x_j + 2^(F-1)) >> F with the integer Gaussian kernel, the 2D
// blur is the horizontal pass followed by the vertical pass over a raster
// stream of line width w, octave o+1 is every second pixel of every second
// row of scale S-2 of octave o, DoG images are differences of adjacent
// scales, and a keypoint is a DoG value strictly above or strictly below
// all 26 neighbours in a 3x3x3 cube. Samples that depend on data from
// before the start of the stream are marked unknown (UNK) and not checked.
package sift_ref_pkg;
  localparam int UNK = -100000;

  typedef int arr_t [];

  function automatic int coef(int K, int S, int scale, int j);
    return sift_pkg::gauss_coef(K, S, scale, j);
  endfunction

  function automatic int rnd(int acc);
    int r;
    r = (acc + (1 << (sift_pkg::COEF_F - 1))) >>> sift_pkg::COEF_F;
    return (r > 255) ? 255 : r;
  endfunction

  // 1D convolution along a stream with tap distance `step`
  function automatic arr_t conv(arr_t x, int K, int S, int scale, int step);
    arr_t y;
    int acc;
    bit ok;
    y = new[x.size()];
    for (int n = 0; n < x.size(); n++) begin
      acc = 0;
      ok  = 1;
      for (int j = 0; j < K; j++) begin
        if (n - j * step < 0 || x[n - j * step] == UNK) ok = 0;
        else acc += x[n - j * step] * coef(K, S, scale, j);
      end
      y[n] = ok ? rnd(acc) : UNK;
    end
    return y;
  endfunction

  // one SCB: horizontal then vertical; output sample n = position n - shift
  function automatic arr_t blur(arr_t x, int K, int S, int scale, int w);
    return conv(conv(x, K, S, scale, 1), K, S, scale, w);
  endfunction

  // drop the first `sh` samples: stream index -> image position
  function automatic arr_t to_pos(arr_t x, int sh);
    arr_t y;
    y = new[(x.size() > sh) ? x.size() - sh : 0];
    for (int p = 0; p < y.size(); p++) y[p] = x[p + sh];
    return y;
  endfunction

  function automatic arr_t subsample(arr_t lpos, int w, int h);
    arr_t y;
    int   m;
    y = new[lpos.size() / 4 + 1];
    m = 0;
    for (int p = 0; p < lpos.size(); p++)
      if (((p % w) % 2 == 0) && (((p / w) % h) % 2 == 0)) begin
        y[m] = lpos[p];
        m++;
      end
    y = new[m](y);
    return y;
  endfunction

  // Gaussian images of all octaves, by image position:
  // gauss[o*S + s] = L(o, s) indexed by position
  function automatic void scale_space(input arr_t img, input int O, input int S,
                                      input int K, input int W, input int H,
                                      output arr_t gauss [], output arr_t dogs []);
    arr_t x, g;
    int   wo, ho, sh;
    gauss = new[O * S];
    dogs  = new[O * (S - 1)];
    x = img;
    for (int o = 0; o < O; o++) begin
      wo = W >> o;
      ho = H >> o;
      sh = (K / 2) * wo + K / 2;
      g  = x;
      for (int s = 0; s < S; s++) begin
        g = blur(g, K, S, s, wo);
        gauss[o * S + s] = to_pos(g, (s + 1) * sh);
      end
      for (int s = 0; s < S - 1; s++) begin
        int n;
        n = gauss[o * S + S - 1].size();
        dogs[o * (S - 1) + s] = new[n];
        for (int p = 0; p < n; p++)
          if (gauss[o * S + s + 1][p] == UNK || gauss[o * S + s][p] == UNK)
            dogs[o * (S - 1) + s][p] = UNK;
          else
            dogs[o * (S - 1) + s][p] = gauss[o * S + s + 1][p] - gauss[o * S + s][p];
      end
      if (o < O - 1) x = subsample(gauss[o * S + S - 2], wo, ho);
    end
  endfunction

  function automatic int at(const ref arr_t a, input int p);
    if (p < 0 || p >= a.size()) return UNK;
    return a[p];
  endfunction

  // Keypoint test of position p, candidate DoG scale c (1..S-3) of one octave.
  // Returns -1 when unknown, else bit0 = minimum, bit1 = maximum.
  // `eq` is set when the centre ties with its most extreme neighbour.
  function automatic int kp_test(const ref arr_t d [], input int base, input int c,
                                 input int p, input int wo, input int ho, output bit tie);
    int x, y, v, nv, lo, hi;
    bit is_min, is_max;
    tie = 0;
    x = p % wo;
    y = (p / wo) % ho;
    v = at(d[base + c], p);
    if (v == UNK) return -1;
    if (x == 0 || x == wo - 1 || y == 0 || y == ho - 1) return 0;
    is_min = 1;
    is_max = 1;
    lo = 1 << 20;
    hi = -(1 << 20);
    for (int ds = -1; ds <= 1; ds++)
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++)
          if (ds != 0 || dy != 0 || dx != 0) begin
            nv = at(d[base + c + ds], p + dy * wo + dx);
            if (nv == UNK) return -1;
            if (!(v < nv)) is_min = 0;
            if (!(v > nv)) is_max = 0;
            if (nv < lo) lo = nv;
            if (nv > hi) hi = nv;
          end
    tie = (v == lo && v <= hi) || (v == hi);
    return {30'd0, is_max, is_min};
  endfunction
endpackage
