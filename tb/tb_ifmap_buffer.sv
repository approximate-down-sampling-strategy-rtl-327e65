// tb_ifmap_buffer: streams random ifmaps of a few sizes through the line
// buffer with random input bubbles and random stalls (adv = 0). Every pooling
// event must present exactly the (K+KP-1)^2 patch of its pooled position,
// every conv event the K x K window of its conv position in its bottom-right
// corner, with raster-order addresses; the event counts must equal the
// pooled and conv output counts of the ifmap size.
module tb_ifmap_buffer;
  import accel_pkg::*;
  import tb_pkg::*;

  localparam int unsigned R = K + KP - 1;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic adv, clear, in_fire;
  logic [7:0] cfg_w;
  pix_t in_pix [T_M];
  pix_t region [R][R][T_M];
  logic ev_pool, ev_conv;
  logic [13:0] pool_addr;
  logic [15:0] conv_addr;
  logic [7:0] pool_y, pool_x, conv_y, conv_x;

  ifmap_buffer dut (.*);

  pix_t img [16][16][T_M];
  int W, H, npool, nconv, nstall;

  always @(posedge clk) if (rst_n) begin
    if (!adv) nstall++;
    if (adv && ev_pool) begin
      int ok;
      ok = 1;
      npool++;
      foreach (region[y, x, m])
        if (region[y][x][m] !== img[int'(pool_y) * KP + y][int'(pool_x) * KP + x][m]) ok = 0;
      if (int'(pool_addr) != int'(pool_y) * ((W - K + 1) / KP) + int'(pool_x)) ok = 0;
      if (int'(pool_y) >= (H - K + 1) / KP || int'(pool_x) >= (W - K + 1) / KP) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL pool event y=%0d x=%0d addr=%0d", pool_y, pool_x, pool_addr);
      end
    end
    if (adv && ev_conv) begin
      int ok;
      ok = 1;
      nconv++;
      for (int y = 0; y < K; y++)
        for (int x = 0; x < K; x++)
          for (int m = 0; m < T_M; m++)
            if (region[R-K+y][R-K+x][m] !== img[int'(conv_y) + y][int'(conv_x) + x][m]) ok = 0;
      if (int'(conv_addr) != int'(conv_y) * (W - K + 1) + int'(conv_x)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL conv event y=%0d x=%0d addr=%0d", conv_y, conv_x, conv_addr);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h);
    W = w; H = h; npool = 0; nconv = 0;
    foreach (img[y, x, m]) img[y][x][m] = rand_pix();
    @(negedge clk);
    cfg_w = 8'(w); clear = 1'b1; adv = 1'b1; in_fire = 1'b0;
    @(negedge clk);
    clear = 1'b0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        while ($urandom_range(0, 4) == 0) begin   // bubble or stall
          adv = ($urandom_range(0, 1) == 0);
          in_fire = 1'b0;
          @(negedge clk);
        end
        adv = 1'b1;
        in_fire = 1'b1;
        for (int m = 0; m < T_M; m++) in_pix[m] = img[y][x][m];
        @(negedge clk);
        in_fire = 1'b0;
      end
    adv = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (npool != ((w - K + 1) / KP) * ((h - K + 1) / KP) || nconv != (w - K + 1) * (h - K + 1)) begin
      failures++;
      $display("FAIL counts %0dx%0d pool=%0d conv=%0d", w, h, npool, nconv);
    end
  endtask

  initial begin
    adv = 1'b1; clear = 1'b0; in_fire = 1'b0; cfg_w = 8'd8; nstall = 0;
    foreach (in_pix[m]) in_pix[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8, 8);
    run(9, 7);
    run(16, 16);
    run(4, 4);
    run(5, 11);
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
