// tb_approx_pool_accel_full: the accelerator with every parameter at its
// default, taken through one complete pooled layer of VGG16 size: a
// 224x224 image zero-padded to 226x226, M = 8 channels (two groups of
// T_M = 4), producing four filters of 112x112 pooled outputs in five ifmap
// read rounds. A second layer at CIFAR-10 size (32x32 padded to 34x34,
// same channels and filters) follows with random stalls on every stream.
// Two layers without pooling come last: 226x226 with one channel group and
// two filters (the shape of the first VGG16 layer), and 114x114 with two
// groups, whose 112x112 outputs use every word of Bank 1. The ifmap is a smooth random image within the coding range
// (0..255.0) with a zero border; filters are random in (-1.25, 1.25). The
// reference is the same as in tb_approx_pool_accel: every output value,
// tag and position is compared, the output count must match, and the layer
// time must be (N+1) x W x H cycles plus a few. The share of pooled outputs
// whose predicted window is the true max-pooling window is reported.
module tb_approx_pool_accel_full;
  import accel_pkg::*;
  import tb_pkg::*;

  localparam int MG = 2, MS = 226, MN = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, cfg_pool, cfg_relu, busy, done;
  logic [7:0] cfg_w, cfg_h, cfg_groups;
  logic [9:0] cfg_nfilt, out_filter;
  logic in_valid, in_ready, flt_valid, flt_ready, out_valid, out_ready;
  pix_t in_pix [T_M];
  wgt_t flt_wgt [T_M][K][K];
  wcode_t flt_code [T_M][K][K];
  pix_t out_data;
  logic [7:0] out_y, out_x;

  approx_pool_accel dut (.*);

  // ---------------- layer data ----------------
  pix_t   ifm [MG][MS][MS][T_M];
  wgt_t   wt  [MN][MG][T_M][K][K];
  wcode_t wc  [MN][MG][T_M][K][K];
  int W, H, G, N;
  logic P, stall;

  // ---------------- mechanism counters ----------------
  int n_pred, n_b0acc, n_b1acc, n_bypass_out, n_out_stall, n_bubble, n_flt_wait;
  int n_relu, n_sel0, n_sel1, n_both, n_hit, n_pooled;
  always @(posedge clk) if (rst_n) begin
    if (dut.win_valid) n_pred++;
    if (dut.b0_we) n_b0acc++;
    if (dut.u_bank1.we) n_b1acc++;
    if (out_valid && !out_ready) n_out_stall++;
    if (in_ready && !in_valid) n_bubble++;
    if (dut.clear && !dut.next_full) n_flt_wait++;
    if (dut.win_valid && dut.pred_sel == 1'b0) n_sel0++;
    if (dut.win_valid && dut.pred_sel == 1'b1) n_sel1++;
    if (dut.u_pred.busy && dut.vb) n_both++;
  end

  // ---------------- reference ----------------
  function automatic longint apconv(int n, int y0, int x0);
    longint s = 0;
    for (int g = 0; g < G; g++)
      for (int m = 0; m < T_M; m++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            s += ref_fcode(64'(ifm[g][y0+ky][x0+kx][m]), 64'(1) << FMAP_RANGE_LOG2, D_FMAPS)
                 * ref_pval(wc[n][g][m][ky][kx]);
    return s;
  endfunction

  function automatic logic signed [31:0] exact(int n, int y0, int x0);
    logic signed [31:0] acc = 0;
    for (int g = 0; g < G; g++) begin
      longint s = 0;
      for (int m = 0; m < T_M; m++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            s += longint'({32'b0, ifm[g][y0+ky][x0+kx][m]}) * longint'(wt[n][g][m][ky][kx]);
      acc = acc + 32'(s >>> FRAC_W);
    end
    return acc;
  endfunction

  pix_t expv [int];
  int   nout;

  function automatic int key(int n, int y, int x);
    return (n * 256 + y) * 256 + x;
  endfunction

  function automatic pix_t relu(logic signed [31:0] v);
    if (v < 0) begin
      n_relu++;
      return '0;
    end
    return pix_t'(v);
  endfunction

  task automatic build_reference();
    expv.delete();
    for (int n = 0; n < N; n++) begin
      if (P) begin
        for (int py = 0; py < (H - K + 1) / KP; py++)
          for (int px = 0; px < (W - K + 1) / KP; px++) begin
            int best_i = 0, true_i = 0;
            longint best = 0;
            logic signed [31:0] tmax, e;
            for (int i = 0; i < KP * KP; i++) begin
              longint a = apconv(n, py * KP + i / KP, px * KP + i % KP);
              e = exact(n, py * KP + i / KP, px * KP + i % KP);
              if (i == 0 || a > best) begin best = a; best_i = i; end
              if (i == 0 || e > tmax) begin tmax = e; true_i = i; end
            end
            if (best_i == true_i) n_hit++;
            n_pooled++;
            expv[key(n, py, px)] = relu(exact(n, py * KP + best_i / KP, px * KP + best_i % KP));
          end
      end else begin
        for (int y = 0; y < H - K + 1; y++)
          for (int x = 0; x < W - K + 1; x++)
            expv[key(n, y, x)] = relu(exact(n, y, x));
      end
    end
  endtask

  // ---------------- stream drivers ----------------
  task automatic drive_ifmaps();
    int rounds = P ? N + 1 : N;
    for (int r = 0; r < rounds; r++)
      for (int g = 0; g < G; g++)
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            while (stall && $urandom_range(0, 5) == 0) begin
              in_valid = 1'b0;
              @(negedge clk);
            end
            in_valid = 1'b1;
            for (int m = 0; m < T_M; m++) in_pix[m] = ifm[g][y][x][m];
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            @(negedge clk);
            in_valid = 1'b0;
          end
  endtask

  task automatic drive_filters();
    int rounds = P ? N + 1 : N;
    for (int r = 0; r < rounds; r++)
      for (int g = 0; g < G; g++) begin
        int nm = P ? r - 1 : r;   // filter of the MAC stage
        int np = r;               // filter of the Predict stage
        while (stall && $urandom_range(0, 1) == 0) begin
          flt_valid = 1'b0;
          repeat ($urandom_range(1, 8)) @(negedge clk);
        end
        flt_valid = 1'b1;
        foreach (flt_wgt[m, y, x]) begin
          flt_wgt[m][y][x]  = (nm >= 0) ? wt[nm][g][m][y][x] : wgt_t'($urandom());
          flt_code[m][y][x] = (P && np < N) ? wc[np][g][m][y][x] : wcode_t'($urandom());
        end
        @(posedge clk);
        while (!flt_ready) @(posedge clk);
        @(negedge clk);
        flt_valid = 1'b0;
      end
  endtask

  // output monitor
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int k;
    k = key(int'(out_filter), int'(out_y), int'(out_x));
    nout++;
    if (!P) n_bypass_out++;
    checks++;
    if (!expv.exists(k) || expv[k] !== out_data) begin
      failures++;
      $display("FAIL out n=%0d y=%0d x=%0d got=%h exp=%h", out_filter, out_y, out_x, out_data,
               expv.exists(k) ? expv[k] : 32'hdead_beef);
    end
    if (expv.exists(k)) expv.delete(k);
  end
  always @(negedge clk) out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run_layer(int w, int h, int g, int n, logic p, logic st);
    int t0, t1, rounds;
    int exp_out;
    W = w; H = h; G = g; N = n; P = p; stall = st;
    foreach (ifm[gg, y, x, m]) begin
      if (y == 0 || x == 0 || y == h - 1 || x == w - 1) ifm[gg][y][x][m] = '0;
      else ifm[gg][y][x][m] = pix_t'((((y * 7 + x * 3 + m * 50) % 200) << 16)
                                     + $urandom_range(0, 40 << 16));
    end
    foreach (wt[nn, gg, m, y, x]) begin
      wt[nn][gg][m][y][x] = rand_wgt();
      wc[nn][gg][m][y][x] = ref_wcode(int'(wt[nn][gg][m][y][x]));
    end
    build_reference();
    exp_out = expv.num();
    nout = 0;
    @(negedge clk);
    cfg_w = 8'(w); cfg_h = 8'(h); cfg_groups = 8'(g); cfg_nfilt = 10'(n);
    cfg_pool = p; cfg_relu = 1'b1;
    start = 1'b1;
    t0 = int'($time / 10);
    @(negedge clk);
    start = 1'b0;
    fork
      drive_ifmaps();
      drive_filters();
    join
    while (!done) @(negedge clk);
    t1 = int'($time / 10);
    repeat (3) @(negedge clk);
    checks++;
    if (nout != exp_out || expv.num() != 0) begin
      failures++;
      $display("FAIL layer %0dx%0d: %0d outputs of %0d, %0d missing", w, h, nout, exp_out, expv.num());
    end
    rounds = p ? n + 1 : n;
    $display("layer %0dx%0d G=%0d N=%0d pool=%0d: %0d cycles, %0d pixel cycles",
             w, h, g, n, p, t1 - t0, rounds * g * w * h);
    if (!st) begin
      checks++;
      if (t1 - t0 > rounds * g * (w * h + 8)) begin
        failures++;
        $display("FAIL layer time %0d > %0d", t1 - t0, rounds * g * (w * h + 8));
      end
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 1'b0; in_valid = 1'b0; flt_valid = 1'b0; out_ready = 1'b1;
    cfg_w = '0; cfg_h = '0; cfg_groups = '0; cfg_nfilt = '0; cfg_pool = 1'b0; cfg_relu = 1'b1;
    foreach (in_pix[m]) in_pix[m] = '0;
    foreach (flt_wgt[m, y, x]) begin flt_wgt[m][y][x] = '0; flt_code[m][y][x] = '0; end
    {n_pred, n_b0acc, n_b1acc, n_bypass_out, n_out_stall, n_bubble, n_flt_wait} = '0;
    {n_relu, n_sel0, n_sel1, n_both, n_hit, n_pooled} = '0;
    P = 1'b0; stall = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(226, 226, 2, 4, 1'b1, 1'b0);
    // a VGG16 layer at CIFAR-10 / SVHN size: 32x32 padded to 34x34
    run_layer(34, 34, 2, 4, 1'b1, 1'b1);
    // layers without pooling: the first VGG16 layer (one group, 224x224
    // outputs) and a two-group layer whose 112x112 outputs fill Bank 1
    run_layer(226, 226, 1, 2, 1'b0, 1'b0);
    run_layer(114, 114, 2, 2, 1'b0, 1'b0);
    need("winner predictions", n_pred);
    need("Bank 0 accumulations", n_b0acc);
    need("Bank 1 accumulations", n_b1acc);
    need("bypass outputs", n_bypass_out);
    need("output stalls", n_out_stall);
    need("input bubbles", n_bubble);
    need("ReLU clamps", n_relu);
    $display("predicted window = true max-pool window in %0d of %0d pooled outputs", n_hit, n_pooled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
