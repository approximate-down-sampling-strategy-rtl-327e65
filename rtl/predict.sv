// predict: the Predict stage. For one pooling patch it computes the
// approximate convolution apConv of each of the KP x KP candidate windows
// over T_M channels, adds the provisional sums of earlier channel groups held
// in Bank 0 and, in the last channel group, returns which window wins.
//
// How it works: the (K+KP-1)^2 x T_M ifmap region of the patch goes through
// one ifmap_encoder per pixel (the KP x KP windows overlap, so each pixel is
// coded once and shared). Each code is multiplied by the coded filter
// coefficient +/-2^c with a left shift and a conditional negation; an adder
// tree per window sums the K*K*T_M terms.
//
// Timing (two stages, both held while adv = 0):
//   stage A  in_valid: codes, shifts and trees; Bank 0 read issued at in_addr
//            (skipped in the first channel group, whose provisional sum is 0).
//            b0_raddr is in_addr passed straight through.
//   stage B  the registered apConv values plus the Bank 0 word. If this is
//            not the last group the sums are written back to Bank 0,
//            otherwise win_valid pulses with win_idx = r_m*KP + c_m for
//            address win_addr. Ties go to the first window in raster order.
// busy is high while a patch is in flight.
module predict
  import accel_pkg::DATA_W, accel_pkg::EXP_W, accel_pkg::pix_t, accel_pkg::wcode_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K,
  parameter int unsigned KP = accel_pkg::KP,
  parameter int unsigned D_FMAPS = accel_pkg::D_FMAPS,
  parameter int unsigned FMAP_RANGE_LOG2 = accel_pkg::FMAP_RANGE_LOG2,
  parameter int unsigned PRED_W = accel_pkg::PRED_W,
  parameter int unsigned ADDR_W = 14,
  localparam int unsigned R = K + KP - 1,
  localparam int unsigned NW = KP * KP,
  localparam int unsigned IDX_W = (NW > 1) ? $clog2(NW) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   adv,
  // patch from the ifmap buffer
  input  logic                   in_valid,
  input  logic                   in_first,   // first channel group
  input  logic                   in_last,    // last channel group
  input  logic [ADDR_W-1:0]      in_addr,    // patch address
  input  pix_t                   region [R][R][T_M],
  input  wcode_t                 wcode [T_M][K][K],
  // Bank 0 port
  output logic                   b0_re,
  output logic [ADDR_W-1:0]      b0_raddr,
  input  logic [NW*PRED_W-1:0]   b0_rdata,
  output logic                   b0_we,
  output logic [ADDR_W-1:0]      b0_waddr,
  output logic [NW*PRED_W-1:0]   b0_wdata,
  // winner
  output logic                   win_valid,
  output logic [IDX_W-1:0]       win_idx,
  output logic [ADDR_W-1:0]      win_addr,
  output logic                   busy
);
  localparam int unsigned CODE_W = $clog2(D_FMAPS + 1);
  localparam int unsigned TERM_W = CODE_W + (1 << EXP_W) - 1 + 1;  // signed

  // ---------------- stage A ----------------
  logic [CODE_W-1:0] code [R][R][T_M];

  for (genvar y = 0; y < R; y++) begin : g_y
    for (genvar x = 0; x < R; x++) begin : g_x
      for (genvar m = 0; m < T_M; m++) begin : g_m
        ifmap_encoder #(
          .DATA_W(DATA_W), .D_FMAPS(D_FMAPS), .FMAP_RANGE_LOG2(FMAP_RANGE_LOG2)
        ) u_enc (.act(region[y][x][m]), .code(code[y][x][m]));
      end
    end
  end

  function automatic logic signed [TERM_W-1:0] shift_term(
      input logic [CODE_W-1:0] c, input wcode_t w);
    logic signed [TERM_W-1:0] mag;
    mag = TERM_W'(c) <<< w.exp;
    if (!w.nz)      return '0;
    else if (w.neg) return -mag;
    else            return mag;
  endfunction

  logic signed [PRED_W-1:0] ap [NW];

  always_comb begin
    for (int r = 0; r < KP; r++) begin
      for (int c = 0; c < KP; c++) begin
        ap[r*KP+c] = '0;
        for (int m = 0; m < T_M; m++)
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              ap[r*KP+c] = ap[r*KP+c] + PRED_W'(shift_term(code[r+ky][c+kx][m], wcode[m][ky][kx]));
      end
    end
  end

  assign b0_re    = adv && in_valid && !in_first;
  assign b0_raddr = in_addr;

  // ---------------- stage B ----------------
  logic                     vb, first_b, last_b;
  logic [ADDR_W-1:0]        addr_b;
  logic signed [PRED_W-1:0] ap_b [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vb      <= 1'b0;
      first_b <= 1'b0;
      last_b  <= 1'b0;
      addr_b  <= '0;
      for (int i = 0; i < NW; i++) ap_b[i] <= '0;
    end else if (adv) begin
      vb <= in_valid;
      if (in_valid) begin
        first_b <= in_first;
        last_b  <= in_last;
        addr_b  <= in_addr;
        ap_b    <= ap;
      end
    end
  end

  logic signed [PRED_W-1:0] tot [NW];
  always_comb begin
    for (int i = 0; i < NW; i++) begin
      tot[i] = ap_b[i];
      if (!first_b) tot[i] = tot[i] + $signed(b0_rdata[i*PRED_W +: PRED_W]);
      b0_wdata[i*PRED_W +: PRED_W] = tot[i];
    end
  end

  assign b0_we    = adv && vb && !last_b;
  assign b0_waddr = addr_b;

  // argmax over the KP x KP predictions, first maximum wins
  always_comb begin
    logic signed [PRED_W-1:0] best;
    best    = tot[0];
    win_idx = '0;
    for (int i = 1; i < NW; i++) begin
      if (tot[i] > best) begin
        best    = tot[i];
        win_idx = IDX_W'(i);
      end
    end
  end

  assign win_valid = adv && vb && last_b;
  assign win_addr  = addr_b;
  assign busy      = vb;
endmodule
