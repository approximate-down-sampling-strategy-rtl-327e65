// tb_controller: runs the controller against a model of the datapath (filter
// beats arriving with random delays, a pipeline that stays busy for a few
// cycles after each pixel, random input bubbles and output stalls) for a
// pooled layer, a bypass layer and an unstalled pooled layer.
// Checks: N+1 rounds (pooled) or N rounds (bypass) of cfg_groups groups of
// W x H pixels each; per group the Predict/MAC enables, the MAC filter
// number, the index-buffer halves and the first/last flags; no take while
// the pipeline is busy; one done pulse; and, without stalls, a layer time of
// rounds x groups x (W x H + a few cycles).
module tb_controller;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, cfg_pool, busy, done, adv, in_valid, in_ready, next_full, take, clear;
  logic pipe_busy, pool, first_grp, last_grp, pred_en, mac_en, pred_sel, mac_sel;
  logic [7:0] cfg_w, width, cfg_h;
  logic [7:0] cfg_groups;
  logic [9:0] cfg_nfilt, mac_filter;

  controller dut (.*);

  // datapath model
  logic [3:0] busy_sr;
  int beat_delay;
  logic stalls_on;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_sr <= '0; next_full <= 1'b0; beat_delay <= 3;
    end else begin
      busy_sr <= {busy_sr[2:0], in_valid && in_ready};
      if (take) begin
        next_full <= 1'b0;
        beat_delay <= stalls_on ? $urandom_range(0, 6) : 0;
      end else if (!next_full) begin
        if (beat_delay == 0) next_full <= 1'b1;
        else beat_delay <= beat_delay - 1;
      end
    end
  end
  assign pipe_busy = |busy_sr;

  always @(negedge clk) begin
    in_valid = stalls_on ? ($urandom_range(0, 3) != 0) : 1'b1;
    adv      = stalls_on ? ($urandom_range(0, 4) != 0) : 1'b1;
  end

  // monitor
  int pix_in_grp, grp_seen, round_seen, ndone, cyc;
  int exp_groups, exp_rounds, W, H, N;
  logic exp_pool, in_grp;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (take) begin
      checks++;
      if (pipe_busy) begin failures++; $display("FAIL take while busy"); end
      pix_in_grp = 0;
      in_grp = 1'b1;
    end
    if (in_valid && in_ready) begin
      if (pix_in_grp == 0) begin
        // flags of this group
        int r, g, e_filt;
        logic e_pred, e_mac;
        r = round_seen;
        g = grp_seen;
        e_pred = exp_pool && (r < N);
        e_mac = exp_pool ? (r > 0) : 1'b1;
        e_filt = exp_pool ? r - 1 : r;
        checks++;
        if (pred_en != e_pred || mac_en != e_mac || (e_mac && int'(mac_filter) != e_filt) ||
            first_grp != (g == 0) || last_grp != (g == exp_groups - 1) ||
            pred_sel != r[0] || mac_sel == r[0] || pool != exp_pool) begin
          failures++;
          $display("FAIL flags round %0d group %0d", r, g);
        end
      end
      pix_in_grp++;
      if (pix_in_grp == W * H) begin
        grp_seen++;
        if (grp_seen == exp_groups) begin grp_seen = 0; round_seen++; end
      end
      if (pix_in_grp > W * H) begin failures++; $display("FAIL too many pixels"); end
    end
    if (in_ready && !adv) begin failures++; $display("FAIL ready while stalled"); end
    if (done) ndone++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_layer(int w, int h, int g, int n, logic p, logic stall);
    int t0;
    W = w; H = h; N = n; exp_groups = g; exp_pool = p; stalls_on = stall;
    exp_rounds = p ? n + 1 : n;
    grp_seen = 0; round_seen = 0; ndone = 0;
    @(negedge clk);
    cfg_w = 8'(w); cfg_h = 8'(h); cfg_groups = 8'(g); cfg_nfilt = 10'(n); cfg_pool = p;
    start = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    checks++;
    if (round_seen != exp_rounds || grp_seen != 0 || ndone != 1 || busy) begin
      failures++;
      $display("FAIL layer rounds=%0d exp=%0d done=%0d", round_seen, exp_rounds, ndone);
    end
    if (!stall) begin
      checks++;
      if (cyc - t0 > exp_rounds * g * (w * h + 8)) begin
        failures++;
        $display("FAIL layer took %0d cycles", cyc - t0);
      end
      $display("layer %0dx%0d G=%0d N=%0d: %0d cycles, %0d of them pixels",
               w, h, g, n, cyc - t0, exp_rounds * g * w * h);
    end
  endtask

  initial begin
    start = 1'b0; cfg_pool = 1'b1; cfg_w = '0; cfg_h = '0; cfg_groups = '0; cfg_nfilt = '0;
    cyc = 0; stalls_on = 1'b1; in_grp = 1'b0; pix_in_grp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_layer(6, 5, 3, 4, 1'b1, 1'b1);
    run_layer(7, 4, 2, 3, 1'b0, 1'b1);
    run_layer(10, 10, 4, 5, 1'b1, 1'b0);
    run_layer(5, 5, 1, 1, 1'b1, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
