// approx_pool_accel: convolution layer accelerator with approximate max
// pooling.
//
// A convolution followed by a KP x KP max pooling normally computes KP*KP
// exact convolutions and keeps one. This design first predicts which one
// would win from cheap approximate convolutions (ifmaps coded to a few
// levels, filters coded to signed powers of two, products by shifting) and
// then computes only that window exactly. It is a folded design with two
// concurrent stages sharing one ifmap stream: in read round r the Predict
// stage ranks the windows for filter r while the MAC stage computes filter
// r-1 at the windows predicted in round r-1, so a layer of N filters reads
// its ifmaps N+1 times. Each round goes through the M/T_M channel groups
// (T_M channels per pixel and cycle); Bank 0 keeps the provisional
// approximate sums of the Predict stage, Bank 1 the provisional exact sums
// of the winners. With cfg_pool = 0 the prediction is bypassed and every
// conv output is computed exactly, from the same ifmap buffer.
//
// Interfaces (all synchronous to clk, active-low asynchronous rst_n):
//   start + cfg_*   layer size, sampled when idle; done pulses at the end.
//                   cfg_w/cfg_h: ifmap size including any zero padding;
//                   cfg_groups = M/T_M; cfg_nfilt = N; cfg_relu clamps the
//                   outputs at zero.
//   in_*            ifmap stream, valid/ready, one T_M-channel pixel per beat,
//                   raster order, channel group by channel group, the whole
//                   ifmap volume once per round.
//   flt_*           one beat per (round, group), valid/ready: original
//                   coefficients of the filter the MAC stage works on and
//                   coded coefficients of the filter the Predict stage works
//                   on in that round (fields of the stage that is idle in the
//                   first or last round are ignored).
//   out_*           ofmap values, valid/ready, tagged with filter and
//                   position (pooled position, or conv position in bypass).
// Pipeline: ifmap buffer -> stage A (Predict codes/trees, index read) ->
// stage B (Predict compare / MAC multiply, Bank 1 read) -> stage C
// (accumulate) -> output register. The whole pipeline holds while an output
// waits (adv = 0). Between groups the controller lets the pipeline drain, a
// few cycles per group. The ReLU, the output tags and the ping-pong index
// buffer are choices of this design.
module approx_pool_accel
  import accel_pkg::DATA_W, accel_pkg::pix_t, accel_pkg::wgt_t, accel_pkg::wcode_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K,
  parameter int unsigned KP = accel_pkg::KP,
  parameter int unsigned D_FMAPS = accel_pkg::D_FMAPS,
  parameter int unsigned FMAP_RANGE_LOG2 = accel_pkg::FMAP_RANGE_LOG2,
  parameter int unsigned PRED_W = accel_pkg::PRED_W,
  parameter int unsigned MAX_W = accel_pkg::MAX_W_IN,
  parameter int unsigned MAX_H = accel_pkg::MAX_H_IN,
  parameter int unsigned MAX_GROUPS = accel_pkg::MAX_GROUPS,
  parameter int unsigned MAX_FILTERS = accel_pkg::MAX_FILTERS,
  localparam int unsigned XW = $clog2(MAX_W + 1),
  localparam int unsigned YW = $clog2(MAX_H + 1),
  localparam int unsigned GW = $clog2(MAX_GROUPS + 1),
  localparam int unsigned NW = $clog2(MAX_FILTERS + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] cfg_w,
  input  logic [YW-1:0] cfg_h,
  input  logic [GW-1:0] cfg_groups,
  input  logic [NW-1:0] cfg_nfilt,
  input  logic          cfg_pool,
  input  logic          cfg_relu,
  output logic          busy,
  output logic          done,
  input  logic          in_valid,
  output logic          in_ready,
  input  pix_t          in_pix [T_M],
  input  logic          flt_valid,
  output logic          flt_ready,
  input  wgt_t          flt_wgt [T_M][K][K],
  input  wcode_t        flt_code [T_M][K][K],
  output logic          out_valid,
  input  logic          out_ready,
  output pix_t          out_data,
  output logic [NW-1:0] out_filter,
  output logic [YW-1:0] out_y,
  output logic [XW-1:0] out_x
);
  localparam int unsigned R = K + KP - 1;
  localparam int unsigned NWIN = KP * KP;
  localparam int unsigned IDX_W = (NWIN > 1) ? $clog2(NWIN) : 1;
  localparam int unsigned POOL_DEPTH = ((MAX_W - K + 1) / KP) * ((MAX_H - K + 1) / KP);
  localparam int unsigned PADDR_W = $clog2(POOL_DEPTH);
  localparam int unsigned CADDR_W = $clog2((MAX_W - K + 1) * (MAX_H - K + 1));

  logic adv;
  assign adv = !out_valid || out_ready;

  // ---------------- control ----------------
  logic take, clear, next_full, pipe_busy, pool, first_grp, last_grp;
  logic pred_en, mac_en, pred_sel, mac_sel;
  logic [NW-1:0] mac_filter;
  logic [XW-1:0] width;
  logic in_fire;

  controller #(
    .MAX_W(MAX_W), .MAX_H(MAX_H), .MAX_GROUPS(MAX_GROUPS), .MAX_FILTERS(MAX_FILTERS)
  ) u_ctrl (
    .clk, .rst_n, .start, .cfg_w, .cfg_h, .cfg_groups, .cfg_nfilt, .cfg_pool,
    .busy, .done, .adv, .in_valid, .in_ready, .next_full, .take, .clear,
    .pipe_busy, .pool, .width, .first_grp, .last_grp, .pred_en, .mac_en,
    .mac_filter, .pred_sel, .mac_sel
  );

  assign in_fire = in_valid && in_ready;

  // ---------------- filter buffer ----------------
  wgt_t   cur_wgt [T_M][K][K];
  wcode_t cur_code [T_M][K][K];

  filter_buffer #(.T_M(T_M), .K(K)) u_fbuf (
    .clk, .rst_n, .ld_valid(flt_valid), .ld_ready(flt_ready), .ld_wgt(flt_wgt),
    .ld_code(flt_code), .take, .next_full, .cur_wgt, .cur_code
  );

  // ---------------- ifmap buffer (stage A) ----------------
  pix_t region [R][R][T_M];
  logic ev_pool, ev_conv;
  logic [PADDR_W-1:0] pool_addr;
  logic [CADDR_W-1:0] conv_addr;
  logic [YW-1:0] pool_y, conv_y;
  logic [XW-1:0] pool_x, conv_x;

  ifmap_buffer #(
    .T_M(T_M), .K(K), .KP(KP), .MAX_W(MAX_W), .MAX_H(MAX_H),
    .PADDR_W(PADDR_W), .CADDR_W(CADDR_W)
  ) u_ibuf (
    .clk, .rst_n, .adv, .clear, .cfg_w(width), .in_fire, .in_pix, .region,
    .ev_pool, .ev_conv, .pool_addr, .pool_y, .pool_x, .conv_addr, .conv_y, .conv_x
  );

  // ---------------- Predict stage with Bank 0 ----------------
  logic b0_re, b0_we;
  logic [PADDR_W-1:0] b0_raddr, b0_waddr;
  logic [NWIN*PRED_W-1:0] b0_rdata, b0_wdata;
  logic win_valid, pred_busy;
  logic [IDX_W-1:0] win_idx;
  logic [PADDR_W-1:0] win_addr;

  predict #(
    .T_M(T_M), .K(K), .KP(KP), .D_FMAPS(D_FMAPS), .FMAP_RANGE_LOG2(FMAP_RANGE_LOG2),
    .PRED_W(PRED_W), .ADDR_W(PADDR_W)
  ) u_pred (
    .clk, .rst_n, .adv, .in_valid(ev_pool && pred_en), .in_first(first_grp),
    .in_last(last_grp), .in_addr(pool_addr), .region, .wcode(cur_code),
    .b0_re, .b0_raddr, .b0_rdata, .b0_we, .b0_waddr, .b0_wdata,
    .win_valid, .win_idx, .win_addr, .busy(pred_busy)
  );

  bank0 #(.WORD_W(NWIN * PRED_W), .DEPTH(POOL_DEPTH)) u_bank0 (
    .clk, .re(b0_re), .raddr(b0_raddr), .rdata(b0_rdata),
    .we(b0_we), .waddr(b0_waddr), .wdata(b0_wdata)
  );

  // ---------------- winner indexes ----------------
  logic [IDX_W-1:0] idx_rdata;
  logic va;
  assign va = mac_en && (pool ? ev_pool : ev_conv);

  index_buffer #(.IDX_W(IDX_W), .DEPTH(POOL_DEPTH)) u_idx (
    .clk, .we(win_valid), .wsel(pred_sel), .waddr(win_addr), .wdata(win_idx),
    .re(adv && va && pool), .rsel(mac_sel), .raddr(pool_addr), .rdata(idx_rdata)
  );

  // ---------------- MAC stage ----------------
  // stage B: window selection and products
  logic vb;
  pix_t region_b [R][R][T_M];
  logic [PADDR_W-1:0] addr_b;
  logic [YW-1:0] y_b;
  logic [XW-1:0] x_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb <= 1'b0; addr_b <= '0; y_b <= '0; x_b <= '0;
    end else if (adv) begin
      vb <= va;
      if (va) begin
        addr_b <= pool ? pool_addr : PADDR_W'(conv_addr);
        y_b    <= pool ? pool_y : conv_y;
        x_b    <= pool ? pool_x : conv_x;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv && va) region_b <= region;
  end

  pix_t win [K][K][T_M];
  window_select #(.T_M(T_M), .K(K), .KP(KP)) u_wsel (
    .region(region_b), .idx(pool ? idx_rdata : IDX_W'(NWIN - 1)), .win
  );

  logic vc;
  logic signed [DATA_W-1:0] gsum;
  mac_array #(.T_M(T_M), .K(K)) u_mac (
    .clk, .rst_n, .en(adv), .in_valid(vb), .win, .wgt(cur_wgt),
    .sum_valid(vc), .sum(gsum)
  );

  // Bank 1: read in stage B, data in stage C
  logic [PADDR_W-1:0] addr_c;
  logic [YW-1:0] y_c;
  logic [XW-1:0] x_c;
  logic [DATA_W-1:0] b1_rdata;
  logic signed [DATA_W-1:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_c <= '0; y_c <= '0; x_c <= '0;
    end else if (adv && vb) begin
      addr_c <= addr_b; y_c <= y_b; x_c <= x_b;
    end
  end

  bank1 #(.WORD_W(DATA_W), .DEPTH(POOL_DEPTH)) u_bank1 (
    .clk, .re(adv && vb && !first_grp), .raddr(addr_b), .rdata(b1_rdata),
    .we(adv && vc && !last_grp), .waddr(addr_c), .wdata(acc)
  );

  assign acc = first_grp ? gsum : gsum + $signed(b1_rdata);

  // ---------------- output register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_data <= '0; out_filter <= '0; out_y <= '0; out_x <= '0;
    end else if (adv) begin
      out_valid <= vc && last_grp;
      if (vc && last_grp) begin
        out_data   <= (cfg_relu && acc < 0) ? '0 : pix_t'(acc);
        out_filter <= mac_filter;
        out_y      <= y_c;
        out_x      <= x_c;
      end
    end
  end

  assign pipe_busy = ev_pool || ev_conv || pred_busy || vb || vc;

  // bypass layers with several groups accumulate per conv output in Bank 1
  a_bypass_fits: assert property (@(posedge clk) disable iff (!rst_n)
      (ev_conv && !pool && !last_grp) |-> (int'(conv_addr) < POOL_DEPTH))
    else $error("approx_pool_accel: bypass layer larger than Bank 1");
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("approx_pool_accel: output changed while stalled");
endmodule
