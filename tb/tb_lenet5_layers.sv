// tb_lenet5_layers: the two convolution + 2x2 max-pooling layers of LeNet-5
// on an MNIST-sized input, with the accelerator built for 5x5 filters and
// T_M = 2, and with D_fmaps = 4 ifmap sub-ranges, the coarsest coding
// point (parameters overridden; everything else at its defaults).
// conv1 takes a synthetic 28x28 image zero-padded to 32x32 (1 channel) to
// 6 filters of 14x14; its outputs, as produced by the hardware, are captured
// and streamed as the 6-channel input of conv2 (3 groups), which gives 16
// filters of 5x5. The layer sizes are those of the standard LeNet-5. Every
// output value, tag and position is compared with the reference model, the
// output counts must match, conv1's layer time is checked, and conv2 runs
// with random stalls.
module tb_lenet5_layers;
  import accel_pkg::*;
  import tb_pkg::*;

  localparam int TM = 2, KK = 5, DF = 4;
  localparam int MG = 3, MS = 32, MN = 16;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, cfg_pool, cfg_relu, busy, done;
  logic [7:0] cfg_w, cfg_h, cfg_groups;
  logic [9:0] cfg_nfilt, out_filter;
  logic in_valid, in_ready, flt_valid, flt_ready, out_valid, out_ready;
  pix_t in_pix [TM];
  wgt_t flt_wgt [TM][KK][KK];
  wcode_t flt_code [TM][KK][KK];
  pix_t out_data;
  logic [7:0] out_y, out_x;

  approx_pool_accel #(.T_M(TM), .K(KK), .D_FMAPS(DF)) dut (.*);

  // ---------------- layer data ----------------
  pix_t   ifm [MG][MS][MS][TM];
  wgt_t   wt  [MN][MG][TM][KK][KK];
  wcode_t wc  [MN][MG][TM][KK][KK];
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
      for (int m = 0; m < TM; m++)
        for (int ky = 0; ky < KK; ky++)
          for (int kx = 0; kx < KK; kx++)
            s += ref_fcode(64'(ifm[g][y0+ky][x0+kx][m]), 64'(1) << FMAP_RANGE_LOG2, DF)
                 * ref_pval(wc[n][g][m][ky][kx]);
    return s;
  endfunction

  function automatic logic signed [31:0] exact(int n, int y0, int x0);
    logic signed [31:0] acc = 0;
    for (int g = 0; g < G; g++) begin
      longint s = 0;
      for (int m = 0; m < TM; m++)
        for (int ky = 0; ky < KK; ky++)
          for (int kx = 0; kx < KK; kx++)
            s += longint'({32'b0, ifm[g][y0+ky][x0+kx][m]}) * longint'(wt[n][g][m][ky][kx]);
      acc = acc + 32'(s >>> FRAC_W);
    end
    return acc;
  endfunction

  pix_t expv [int];
  pix_t nxt [MG][MS][MS][TM];
  logic capture = 1'b0, chained = 1'b0;
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
        for (int py = 0; py < (H - KK + 1) / KP; py++)
          for (int px = 0; px < (W - KK + 1) / KP; px++) begin
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
        for (int y = 0; y < H - KK + 1; y++)
          for (int x = 0; x < W - KK + 1; x++)
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
            for (int m = 0; m < TM; m++) in_pix[m] = ifm[g][y][x][m];
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
    if (capture) nxt[int'(out_filter) / TM][int'(out_y)][int'(out_x)][int'(out_filter) % TM] = out_data;
  end
  always @(negedge clk) out_ready = stall ? ($urandom_range(0, 3) != 0) : 1'b1;

  task automatic run_layer(int w, int h, int g, int n, logic p, logic st);
    int t0, t1, rounds;
    int exp_out;
    W = w; H = h; G = g; N = n; P = p; stall = st;
    foreach (ifm[gg, y, x, m]) begin
      if (chained) ifm[gg][y][x][m] = (gg * TM + m < 6) ? nxt[gg][y][x][m] : '0;
      else if (y < 2 || x < 2 || y >= h - 2 || x >= w - 2) ifm[gg][y][x][m] = '0;
      else if (gg == 0 && m == 0) ifm[gg][y][x][m] = pix_t'(((x * 9 + y * 5) % 256) << 16);
      else ifm[gg][y][x][m] = '0;
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
    // conv1: 28x28 digit padded to 32x32, 1 channel (one group), 6 filters
    capture = 1'b1;
    foreach (nxt[gg, y, x, m]) nxt[gg][y][x][m] = '0;
    run_layer(32, 32, 1, 6, 1'b1, 1'b0);
    capture = 1'b0;
    // conv2: the 14x14x6 pooled output of conv1, 3 groups, 16 filters
    chained = 1'b1;
    run_layer(14, 14, 3, 16, 1'b1, 1'b1);
    $display("predicted window = true max-pool window in %0d of %0d pooled outputs", n_hit, n_pooled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
