// tb_predict: drives the Predict stage with random patches and coded filters
// over several channel groups, with random bubbles and random stalls
// (adv = 0), and models Bank 0 as a synchronous-read array. Each Bank 0
// write (groups before the last) must carry the reference running sums of
// the KP x KP approximate convolutions, and each winner (last group) must
// carry the reference argmax and the patch address, in consumption order.
// The references are built from ref_fcode / ref_wcode in tb_pkg.
module tb_predict;
  import accel_pkg::*;
  import tb_pkg::*;

  localparam int unsigned R = K + KP - 1;
  localparam int unsigned NWIN = KP * KP;
  localparam int unsigned AW = 6;
  localparam int unsigned NPATCH = 40;
  localparam int unsigned NGRP = 3;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic adv, in_valid, in_first, in_last;
  logic [AW-1:0] in_addr;
  pix_t region [R][R][T_M];
  wcode_t wcode [T_M][K][K];
  logic b0_re, b0_we, win_valid, busy;
  logic [AW-1:0] b0_raddr, b0_waddr, win_addr;
  logic [NWIN*PRED_W-1:0] b0_rdata, b0_wdata;
  logic [1:0] win_idx;

  predict #(.ADDR_W(AW)) dut (.*);

  // Bank 0 model
  logic [NWIN*PRED_W-1:0] b0 [1 << AW];
  always_ff @(posedge clk) begin
    if (b0_we) b0[b0_waddr] <= b0_wdata;
    if (b0_re) b0_rdata <= b0[b0_raddr];
  end

  // reference
  longint ref_sum [NPATCH][NWIN];
  typedef struct { logic [AW-1:0] addr; logic [NWIN*PRED_W-1:0] data; } wr_t;
  typedef struct { logic [AW-1:0] addr; int idx; } win_t;
  wr_t  wr_q[$];
  win_t win_q[$];
  int   nwins = 0, nstalls = 0;

  function automatic void consume(int g, int p);
    wr_t w;
    win_t v;
    longint best;
    for (int r = 0; r < KP; r++)
      for (int c = 0; c < KP; c++) begin
        longint s = 0;
        for (int m = 0; m < T_M; m++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              s += ref_fcode(64'(region[r+ky][c+kx][m]), 64'(1) << FMAP_RANGE_LOG2, D_FMAPS)
                   * ref_pval(wcode[m][ky][kx]);
        ref_sum[p][r*KP+c] = (g == 0) ? s : ref_sum[p][r*KP+c] + s;
      end
    if (g != NGRP - 1) begin
      w.addr = AW'(p);
      for (int i = 0; i < NWIN; i++) w.data[i*PRED_W +: PRED_W] = PRED_W'(ref_sum[p][i]);
      wr_q.push_back(w);
    end else begin
      v.addr = AW'(p);
      v.idx = 0;
      best = ref_sum[p][0];
      for (int i = 1; i < NWIN; i++)
        if (ref_sum[p][i] > best) begin best = ref_sum[p][i]; v.idx = i; end
      win_q.push_back(v);
    end
  endfunction

  // checker
  always @(posedge clk) if (rst_n) begin
    if (!adv && busy) nstalls++;
    if (b0_we) begin
      checks++;
      if (wr_q.size() == 0 || wr_q[0].addr != b0_waddr || wr_q[0].data != b0_wdata) begin
        failures++;
        $display("FAIL bank0 write addr=%0d data=%h", b0_waddr, b0_wdata);
      end
      if (wr_q.size() != 0) void'(wr_q.pop_front());
    end
    if (win_valid) begin
      checks++;
      nwins++;
      if (win_q.size() == 0 || win_q[0].addr != win_addr || win_q[0].idx != int'(win_idx)) begin
        failures++;
        $display("FAIL winner addr=%0d idx=%0d", win_addr, win_idx);
      end
      if (win_q.size() != 0) void'(win_q.pop_front());
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adv = 1'b1; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < NGRP; g++) begin
      foreach (wcode[m, y, x]) wcode[m][y][x] = ref_wcode(int'(rand_wgt()));
      for (int p = 0; p < NPATCH; p++) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_first = (g == 0);
        in_last  = (g == NGRP - 1);
        in_addr  = AW'(p);
        foreach (region[y, x, m]) region[y][x][m] = rand_pix();
        // random stalls while the patch waits
        adv = ($urandom_range(0, 3) != 0);
        while (!adv) begin
          @(negedge clk);
          adv = ($urandom_range(0, 2) != 0);
        end
        consume(g, p);
        @(negedge clk);
        in_valid = 1'b0;
        adv = ($urandom_range(0, 3) != 0);
        if ($urandom_range(0, 1) == 0) begin
          @(negedge clk);
          adv = 1'b1;
        end
      end
      // drain
      @(negedge clk);
      adv = 1'b1;
      repeat (3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (nwins != NPATCH || wr_q.size() != 0 || win_q.size() != 0) begin
      failures++;
      $display("FAIL count wins=%0d pending wr=%0d win=%0d", nwins, wr_q.size(), win_q.size());
    end
    checks++;
    if (nstalls == 0) begin
      failures++;
      $display("FAIL no stall exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
