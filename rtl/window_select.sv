// window_select: picks one K x K window (all T_M channels) out of the
// (K+KP-1)^2 patch region. Window idx = r*KP + c starts at region row r,
// column c. The MAC stage uses it with the predicted winner index, or with
// the bottom-right window (KP-1, KP-1) in bypass mode, where that window is
// the one ending at the newest pixel. Combinational.
module window_select
  import accel_pkg::pix_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K,
  parameter int unsigned KP = accel_pkg::KP,
  localparam int unsigned R = K + KP - 1,
  localparam int unsigned IDX_W = (KP * KP > 1) ? $clog2(KP * KP) : 1
) (
  input  pix_t             region [R][R][T_M],
  input  logic [IDX_W-1:0] idx,
  output pix_t             win [K][K][T_M]
);
  int unsigned r0, c0;
  always_comb begin
    r0 = int'(idx) / KP;
    c0 = int'(idx) % KP;
    for (int y = 0; y < K; y++)
      for (int x = 0; x < K; x++)
        for (int m = 0; m < T_M; m++)
          win[y][x][m] = region[r0 + y][c0 + x][m];
  end
endmodule
