// is_extremum: finds the keypoints of one octave in its S-1 DoG images.
//
// Stage 1 (one register stage) reuses partial results across scales:
//   Min1_s = min(D_s, D_s+1), Max1_s = max(D_s, D_s+1)        s = 0..S-3
//   Min2_c = min(Min1_c-1, Min1_c), Max2_c likewise            c = 1..S-3
// so Min2_c / Max2_c are the minimum / maximum over scales c-1, c, c+1.
// The beta flags say that the candidate is the unique extremum of its own
// column: beta_min_c = (Min2_c == D_c) && D_c != D_c-1 && D_c != D_c+1
// (beta_max_c likewise).
// Stage 2 keeps the last two lines of {Min2, Max2, beta} in line memories
// and builds a 3x3 window; the centre is tested by isLocalMin and
// isLocalMax (is_local_ext) for every candidate scale, and the results are
// ORed into one keypoint bit per pixel.
//
// Positions: the DoG stream sample n is image position n - OFF. Candidates
// within one pixel of the image border (where the 3x3 window would wrap
// around a row or frame end) are never flagged.
//
// Interface: in_valid / dog[0..S-2] (samples of one octave at least two
// cycles apart); kp_valid with kp (any scale), kp_min / kp_max (per
// candidate scale c = 1..S-3, bit c-1) and kp_x / kp_y of the window
// centre. Output is valid for every sample once the pipeline has filled;
// latency 4 cycles after the sample that completes the window.
module is_extremum
  import sift_pkg::*;
#(
  parameter int unsigned S   = S_DEF,
  parameter int unsigned W_O = W_DEF,
  parameter int unsigned H_O = H_DEF,
  parameter int unsigned OFF = S_DEF * ((K_DEF / 2) * W_DEF + K_DEF / 2)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  dog_t            dog [S-1],
  output logic            kp_valid,
  output logic            kp,
  output logic [S-4:0]    kp_min,
  output logic [S-4:0]    kp_max,
  output logic [XY_W-1:0] kp_x,
  output logic [XY_W-1:0] kp_y
);
  localparam int unsigned NC = S - 3;               // candidate scales
  localparam int unsigned AW = $clog2(W_O);
  localparam int unsigned SKIP = OFF + W_O + 1;     // samples before the first centre
  localparam int unsigned SW = $clog2(SKIP + 2);

  typedef struct packed {
    logic [NC-1:0][DOG_W-1:0] mn;
    logic [NC-1:0][DOG_W-1:0] mx;
    logic [NC-1:0]            bmin;
    logic [NC-1:0]            bmax;
  } cell_t;

  // ---------------- stage 1: scale min/max and beta ----------------
  dog_t  min1 [S-2];
  dog_t  max1 [S-2];
  cell_t cell_c;

  always_comb begin
    for (int s = 0; s < S - 2; s++) begin
      min1[s] = (dog[s] < dog[s+1]) ? dog[s] : dog[s+1];
      max1[s] = (dog[s] > dog[s+1]) ? dog[s] : dog[s+1];
    end
    for (int c = 1; c <= NC; c++) begin
      cell_c.mn[c-1]   = (min1[c-1] < min1[c]) ? min1[c-1] : min1[c];
      cell_c.mx[c-1]   = (max1[c-1] > max1[c]) ? max1[c-1] : max1[c];
      cell_c.bmin[c-1] = (dog_t'(cell_c.mn[c-1]) == dog[c]) &&
                         (dog[c] != dog[c-1]) && (dog[c] != dog[c+1]);
      cell_c.bmax[c-1] = (dog_t'(cell_c.mx[c-1]) == dog[c]) &&
                         (dog[c] != dog[c-1]) && (dog[c] != dog[c+1]);
    end
  end

  cell_t a_cell;
  logic  a_valid;

  always_ff @(posedge clk) begin
    a_cell <= cell_c;
    if (!rst_n) a_valid <= 1'b0;
    else        a_valid <= in_valid;
  end

  // ---------------- stage 2: line memories and 3x3 window ----------------
  cell_t lb0 [W_O];   // row y-1
  cell_t lb1 [W_O];   // row y-2
  cell_t rd0, rd1, b_cell;
  logic  b_valid, c_valid;
  logic [AW-1:0] ptr;

  always_ff @(posedge clk) begin
    if (a_valid) begin
      rd0    <= lb0[ptr];
      rd1    <= lb1[ptr];
      b_cell <= a_cell;
    end
    if (b_valid) begin
      lb0[ptr] <= b_cell;
      lb1[ptr] <= rd0;
    end
  end

  // window: win[r][c], r = 0 top row, c = 0 oldest column
  cell_t win [3][3];

  always_ff @(posedge clk)
    if (b_valid) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= rd1;
      win[1][2] <= rd0;
      win[2][2] <= b_cell;
    end

  // position of the window centre
  logic [SW-1:0]   skip_cnt;
  logic            primed;
  logic [XY_W-1:0] cx, cy;   // position of the next sample to enter
  logic [XY_W-1:0] wx, wy;   // position of the current window centre

  always_ff @(posedge clk)
    if (!rst_n) begin
      b_valid  <= 1'b0;
      c_valid  <= 1'b0;
      ptr      <= '0;
      skip_cnt <= '0;
      primed   <= 1'b0;
      cx       <= '0;
      cy       <= '0;
      wx       <= '0;
      wy       <= '0;
    end else begin
      b_valid <= a_valid;
      c_valid <= b_valid && primed;
      if (b_valid) begin
        ptr <= (ptr == AW'(W_O - 1)) ? '0 : ptr + 1'b1;
        if (!primed) begin
          skip_cnt <= skip_cnt + 1'b1;
          if (skip_cnt == SW'(SKIP - 1)) primed <= 1'b1;
        end
        if (primed) begin
          wx <= cx;
          wy <= cy;
          if (cx == XY_W'(W_O - 1)) begin
            cx <= '0;
            cy <= (cy == XY_W'(H_O - 1)) ? '0 : cy + 1'b1;
          end else begin
            cx <= cx + 1'b1;
          end
        end
      end
    end

  // ---------------- stage 3: isLocalMin / isLocalMax ----------------
  logic [NC-1:0] hit_min, hit_max;

  for (genvar c = 0; c < NC; c++) begin : g_cand
    dog_t nb_mn [8];
    dog_t nb_mx [8];
    for (genvar i = 0; i < 9; i++) begin : g_nb
      if (i != 4) begin : g_use
        localparam int unsigned IDX = (i < 4) ? i : i - 1;
        assign nb_mn[IDX] = win[i/3][i%3].mn[c];
        assign nb_mx[IDX] = win[i/3][i%3].mx[c];
      end
    end
    is_local_ext #(.IS_MAX(1'b0)) u_min (
      .center(win[1][1].mn[c]), .nb(nb_mn), .beta(win[1][1].bmin[c]), .hit(hit_min[c])
    );
    is_local_ext #(.IS_MAX(1'b1)) u_max (
      .center(win[1][1].mx[c]), .nb(nb_mx), .beta(win[1][1].bmax[c]), .hit(hit_max[c])
    );
  end

  logic in_img;
  assign in_img = (wx != '0) && (wx != XY_W'(W_O - 1)) &&
                  (wy != '0) && (wy != XY_W'(H_O - 1));

  always_ff @(posedge clk) begin
    kp_min <= in_img ? hit_min : '0;
    kp_max <= in_img ? hit_max : '0;
    kp     <= in_img && ((|hit_min) || (|hit_max));
    kp_x   <= wx;
    kp_y   <= wy;
    if (!rst_n) kp_valid <= 1'b0;
    else        kp_valid <= c_valid;
  end
endmodule
