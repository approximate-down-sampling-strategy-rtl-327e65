// ifmap_buffer: line buffer between the ifmap stream and both stages.
//
// The ifmap of one channel group arrives in raster order, one pixel (all T_M
// channels) per accepted cycle (in_fire). R-1 = K+KP-2 line memories keep
// the previous rows and an R x R register window shifts left by one column
// per pixel, so after each pixel the window holds the R x R region whose
// bottom-right corner is that pixel. Convolution is "valid" (any zero
// padding is part of the streamed ifmap).
//
// One cycle after each pixel the outputs tell what the region is good for:
//   ev_pool  the region is the full patch of pooled output (pool_y, pool_x);
//            it happens when the pixel is the last of a KP x KP pooling
//            patch (stride KP) and pool_addr counts these events.
//   ev_conv  the bottom-right K x K of the region is complete; conv_addr
//            counts these events (the bypass path uses them).
// All state moves only when adv = 1; clear (used only between channel
// groups, when no pixel is in flight) restarts the counters for a new
// channel group (cfg_w is the ifmap width, cfg_h the height).
module ifmap_buffer
  import accel_pkg::DATA_W, accel_pkg::pix_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K,
  parameter int unsigned KP = accel_pkg::KP,
  parameter int unsigned MAX_W = accel_pkg::MAX_W_IN,
  parameter int unsigned MAX_H = accel_pkg::MAX_H_IN,
  parameter int unsigned PADDR_W = 14,
  parameter int unsigned CADDR_W = 16,
  localparam int unsigned R = K + KP - 1,
  localparam int unsigned XW = $clog2(MAX_W + 1),
  localparam int unsigned YW = $clog2(MAX_H + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               adv,
  input  logic               clear,
  input  logic [XW-1:0]      cfg_w,
  input  logic               in_fire,
  input  pix_t               in_pix [T_M],
  output pix_t               region [R][R][T_M],
  output logic               ev_pool,
  output logic               ev_conv,
  output logic [PADDR_W-1:0] pool_addr,
  output logic [YW-1:0]      pool_y,
  output logic [XW-1:0]      pool_x,
  output logic [CADDR_W-1:0] conv_addr,
  output logic [YW-1:0]      conv_y,
  output logic [XW-1:0]      conv_x
);
  // one line-buffer word per column: the R-1 previous rows, oldest first
  typedef logic [R-2:0][T_M-1:0][DATA_W-1:0] col_t;
  col_t lines [MAX_W];
  col_t col_old, col_new;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [PADDR_W-1:0] pool_cnt;
  logic [CADDR_W-1:0] conv_cnt;

  // pooling patch phase of the current pixel
  logic pool_pix, conv_pix;
  always_comb begin
    conv_pix = (int'(x) >= K - 1) && (int'(y) >= K - 1);
    pool_pix = (int'(x) >= R - 1) && (int'(y) >= R - 1) &&
               ((int'(x) - (R - 1)) % KP == 0) && ((int'(y) - (R - 1)) % KP == 0);
  end

  always_comb begin
    col_old = lines[x];
    for (int j = 0; j < R - 2; j++) col_new[j] = col_old[j+1];
    for (int m = 0; m < T_M; m++) col_new[R-2][m] = in_pix[m];
  end

  always_ff @(posedge clk) begin
    if (adv && in_fire) begin
      lines[x] <= col_new;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < R - 1; c++) region[r][c] <= region[r][c+1];
      for (int r = 0; r < R - 1; r++)
        for (int m = 0; m < T_M; m++) region[r][R-1][m] <= col_old[r][m];
      region[R-1][R-1] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; pool_cnt <= '0; conv_cnt <= '0;
      ev_pool <= 1'b0; ev_conv <= 1'b0;
      pool_addr <= '0; pool_y <= '0; pool_x <= '0;
      conv_addr <= '0; conv_y <= '0; conv_x <= '0;
    end else if (clear) begin
      x <= '0; y <= '0; pool_cnt <= '0; conv_cnt <= '0;
    end else if (adv) begin
      ev_pool <= in_fire && pool_pix;
      ev_conv <= in_fire && conv_pix;
      if (in_fire) begin
        if (x == cfg_w - 1) begin
          x <= '0;
          y <= y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
        if (pool_pix) begin
          pool_cnt  <= pool_cnt + 1'b1;
          pool_addr <= pool_cnt;
          pool_y    <= YW'((int'(y) - (R - 1)) / KP);
          pool_x    <= XW'((int'(x) - (R - 1)) / KP);
        end
        if (conv_pix) begin
          conv_cnt  <= conv_cnt + 1'b1;
          conv_addr <= conv_cnt;
          conv_y    <= YW'(int'(y) - (K - 1));
          conv_x    <= XW'(int'(x) - (K - 1));
        end
      end
    end
  end
endmodule
