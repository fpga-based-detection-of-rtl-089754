// sift_pkg: constants, types and elaboration-time functions shared by the
// scale-space extrema detector.
//
// The defaults are the configuration synthesised in the reference design:
// a 320x240 image, three octaves, six scales per octave and a 7-tap Gaussian
// kernel. Pixels are 8-bit unsigned; Gaussian images keep that width because
// the kernel is normalised to a power of two (2^COEF_F) and the filtered sum
// is shifted back down. DoG values are one bit wider and signed.
//
// Gaussian coefficients are computed here at elaboration time rather than
// stored as a table: scale s of the cascade blurs with the incremental sigma
// that takes sigma0*2^((s-1)/S) to sigma0*2^(s/S); scale 0 blurs with sigma0.
// Each tap is round(2^COEF_F * g_j / sum g), and the centre tap absorbs the
// rounding residue so the integer kernel sums to exactly 2^COEF_F.
//
// The octave interleaving order (Proposition 1 of the method) is also
// computed here: octave 0 owns every odd clock cycle (cycles counted from 1),
// octave o > 0 owns one cycle in every 2*4^o, starting at the first cycle not
// already owned by a lower octave.
package sift_pkg;

  // Defaults (reference configuration)
  localparam int unsigned PIX_W    = 8;     // input pixel / Gaussian image width
  localparam int unsigned DOG_W    = PIX_W + 1;
  localparam int unsigned COEF_F   = 8;     // kernel scaled by 2^COEF_F
  localparam int unsigned XY_W     = 16;    // coordinate width on the outputs
  localparam int unsigned O_DEF    = 3;     // octaves
  localparam int unsigned S_DEF    = 6;     // scales (Gaussian images) per octave
  localparam int unsigned K_DEF    = 7;     // 1D kernel taps
  localparam int unsigned W_DEF    = 320;   // image width  (M)
  localparam int unsigned H_DEF    = 240;   // image height (N)
  localparam int unsigned SIGMA0_X10 = 16;  // base scale sigma0 = 1.6

  // Pipeline latencies in clock cycles
  localparam int unsigned CONV_LAT = 2;              // products, then sum
  localparam int unsigned HF_LAT   = CONV_LAT;       // window mux is combinational
  localparam int unsigned VF_LAT   = 1 + CONV_LAT;   // line-buffer read, then MAC
  localparam int unsigned SCB_LAT  = HF_LAT + VF_LAT;

  typedef logic        [PIX_W-1:0] pix_t;
  typedef logic signed [DOG_W-1:0] dog_t;

  // Incremental blur of cascade stage `scale` out of S scales per octave.
  function automatic real scale_sigma(int scale, int S);
    real prev, cur;
    if (scale == 0) return real'(SIGMA0_X10) / 10.0;
    prev = real'(SIGMA0_X10) / 10.0 * (2.0 ** (real'(scale - 1) / real'(S)));
    cur  = real'(SIGMA0_X10) / 10.0 * (2.0 ** (real'(scale) / real'(S)));
    return $sqrt(cur * cur - prev * prev);
  endfunction

  // Integer coefficient j (0..K-1) of the K-tap kernel of cascade stage `scale`.
  function automatic int gauss_coef(int K, int S, int scale, int j);
    real sigma, sum, w;
    int  isum, cj;
    sigma = scale_sigma(scale, S);
    sum = 0.0;
    for (int i = 0; i < K; i++)
      sum += $exp(-real'((i - K/2) * (i - K/2)) / (2.0 * sigma * sigma));
    isum = 0;
    cj   = 0;
    for (int i = 0; i < K; i++) begin
      w = $exp(-real'((i - K/2) * (i - K/2)) / (2.0 * sigma * sigma));
      isum += $rtoi(w / sum * real'(1 << COEF_F) + 0.5);
      if (i == j) cj = $rtoi(w / sum * real'(1 << COEF_F) + 0.5);
    end
    if (j == K/2) cj += (1 << COEF_F) - isum;
    return cj;
  endfunction

  // Octave o image width/height
  function automatic int oct_dim(int full, int o);
    return full >> o;
  endfunction

  // Stream shift of one separable KxK filter on a line of width w:
  // the output for input sample n is the filtered pixel at n - shift.
  function automatic int filt_shift(int K, int w);
    return (K/2) * w + (K/2);
  endfunction

  // Proposition 1: period (in cycles) of octave o
  function automatic int slot_period(int o);
    return 2 * (4 ** o);
  endfunction

  // Proposition 1: first cycle (counted from 1) of octave o
  function automatic int slot_first(int o);
    int c;
    bit taken;
    if (o == 0) return 1;
    c = 1;
    forever begin
      taken = 1'b0;
      for (int p = 0; p < o; p++)
        if ((c % slot_period(p)) == (slot_first(p) % slot_period(p))) taken = 1'b1;
      if (!taken) return c;
      c++;
    end
  endfunction

endpackage
