// tb_conv1d: random taps through the 7-tap convolution of scale 0 and of
// scale 5. The expected kernel is rebuilt here from the Gaussian formula
// (sigma0 = 1.6, incremental sigma between adjacent scales, 2^8 scaling,
// centre tap absorbing the rounding residue); the expected result is the
// rounded, shifted dot product. Latency must be two cycles.
module tb_conv1d;
  import sift_pkg::*;
  localparam int K = 7;
  localparam int S = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid;
  logic [1:0] in_tag;
  pix_t       taps [K];
  logic       v0, v5;
  logic [1:0] t0, t5;
  pix_t       p0, p5;

  conv1d #(.K(K), .S(S), .SCALE(0)) dut0 (
    .clk, .rst_n, .in_valid, .in_tag, .taps,
    .out_valid(v0), .out_tag(t0), .out_pix(p0));
  conv1d #(.K(K), .S(S), .SCALE(5)) dut5 (
    .clk, .rst_n, .in_valid, .in_tag, .taps,
    .out_valid(v5), .out_tag(t5), .out_pix(p5));

  int checks = 0, failures = 0;
  int c0 [K];
  int c5 [K];

  function automatic void kernel(real sigma, output int c [K]);
    real w [K];
    real sum;
    int  isum;
    sum = 0.0;
    for (int j = 0; j < K; j++) begin
      w[j] = $exp(-((j - 3) * (j - 3)) / (2.0 * sigma * sigma));
      sum += w[j];
    end
    isum = 0;
    for (int j = 0; j < K; j++) begin
      c[j] = $rtoi(w[j] / sum * 256.0 + 0.5);
      isum += c[j];
    end
    c[3] += 256 - isum;
  endfunction

  typedef struct { int e0, e5; logic [1:0] tag; bit v; } exp_t;
  exp_t pipe [$];

  initial begin
    real s4, s5;
    kernel(1.6, c0);
    s4 = 1.6 * (2.0 ** (4.0 / 6.0));
    s5 = 1.6 * (2.0 ** (5.0 / 6.0));
    kernel($sqrt(s5 * s5 - s4 * s4), c5);
    in_valid = 0;
    in_tag = 0;
    foreach (taps[j]) taps[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      int a0, a5;
      in_valid = ($urandom % 4) != 0;
      in_tag   = 2'($urandom);
      a0 = 128;
      a5 = 128;
      for (int j = 0; j < K; j++) begin
        taps[j] = (n < 20) ? 8'hff : pix_t'($urandom);
        a0 += int'(taps[j]) * c0[j];
        a5 += int'(taps[j]) * c5[j];
      end
      pipe.push_back('{e0: (a0 >> 8) > 255 ? 255 : a0 >> 8, e5: (a5 >> 8) > 255 ? 255 : a5 >> 8,
                       tag: in_tag, v: in_valid});
      @(negedge clk);
      if (pipe.size() == 2) begin
        exp_t e;
        e = pipe.pop_front();
        checks++;
        if (e.v) begin
          if (!(v0 && v5 && t0 == e.tag && p0 == pix_t'(e.e0) && p5 == pix_t'(e.e5))) begin
            failures++;
            if (failures < 10) $display("FAIL: got %0d/%0d expected %0d/%0d", p0, p5, e.e0, e.e5);
          end
        end else if (v0 || v5) begin
          failures++;
          if (failures < 10) $display("FAIL: output valid without input");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
