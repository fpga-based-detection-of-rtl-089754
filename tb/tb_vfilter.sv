// tb_vfilter: drives vfilter with interleaved pixel streams of three octaves
// (random octave per cycle, never the same octave in two consecutive cycles,
// idle cycles included) and compares every output with the reference 7-tap
// vertical convolution (tap distance = line width W>>o) of that octave's own
// stream. The output must keep the octave of its input and arrive exactly
// VF_LAT cycles later.
module tb_vfilter;
  import sift_pkg::*;
  import sift_ref_pkg::*;
  localparam int O = 3;
  localparam int K = 7;
  localparam int S = 6;
  localparam int SC = 3;
  localparam int W = 16;
  localparam int LAT = VF_LAT;
  localparam int NEV = 1200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [O-1:0] in_valid, out_valid;
  pix_t         in_pix [O];
  pix_t         out_pix [O];

  vfilter #(.O(O), .K(K), .S(S), .SCALE(SC), .W(W)) dut (
    .clk, .rst_n, .in_valid, .in_pix, .out_valid, .out_pix
  );

  int checks = 0, failures = 0;
  typedef struct { int o; int n; longint t; } ev_t;
  ev_t  ins [$];
  ev_t  outs [$];
  int   outv [$];
  arr_t str [O];
  int   cnt [O];
  longint cyc = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    for (int o = 0; o < O; o++)
      if (rst_n && out_valid[o]) begin
        outs.push_back('{o: o, n: 0, t: cyc});
        outv.push_back(int'(out_pix[o]));
      end
  end

  initial begin
    int prev;
    arr_t ref_out [O];
    prev = -1;
    for (int o = 0; o < O; o++) begin
      str[o] = new[NEV];
      cnt[o] = 0;
    end
    in_valid = '0;
    foreach (in_pix[o]) in_pix[o] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (ins.size() < NEV) begin
      int o;
      o = $urandom % (O + 1);
      in_valid = '0;
      if (o < O && o != prev && cnt[o] < NEV) begin
        in_valid[o] = 1'b1;
        in_pix[o] = pix_t'($urandom);
        str[o][cnt[o]] = int'(in_pix[o]);
        ins.push_back('{o: o, n: cnt[o], t: cyc});
        cnt[o]++;
        prev = o;
      end else begin
        prev = -1;
      end
      @(negedge clk);
    end
    in_valid = '0;
    repeat (20) @(negedge clk);

    for (int o = 0; o < O; o++) begin
      str[o] = new[cnt[o]](str[o]);
      ref_out[o] = conv(str[o], K, S, SC, W >> o);
    end
    checks++;
    if (outs.size() != ins.size()) begin
      failures++;
      $display("FAIL: %0d outputs for %0d inputs", outs.size(), ins.size());
    end
    for (int i = 0; i < ins.size() && i < outs.size(); i++) begin
      int e;
      e = ref_out[ins[i].o][ins[i].n];
      checks++;
      if (outs[i].o != ins[i].o || outs[i].t - ins[i].t != LAT ||
          (e != UNK && outv[i] != e)) begin
        failures++;
        if (failures < 10)
          $display("FAIL: event %0d octave %0d/%0d latency %0d value %0d expected %0d", i,
                   outs[i].o, ins[i].o, outs[i].t - ins[i].t, outv[i], e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
