// mac_array: exact multiply-accumulate of one K x K window over T_M channels.
//
// T_M*K*K multipliers form the products of the unsigned ifmap values and the
// signed filter coefficients (both DATA_W-bit fixed point with FRAC_W
// fractional bits); an adder tree sums them at full precision, and the sum is
// rescaled by FRAC_W bits (arithmetic shift, i.e. rounding toward minus
// infinity) and wrapped to DATA_W bits. The result is registered: sum_valid
// and sum follow in_valid by one cycle, and the register holds while
// en = 0.
module mac_array
  import accel_pkg::DATA_W, accel_pkg::pix_t, accel_pkg::wgt_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K,
  parameter int unsigned FRAC_W = accel_pkg::FRAC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  pix_t                     win [K][K][T_M],
  input  wgt_t                     wgt [T_M][K][K],
  output logic                     sum_valid,
  output logic signed [DATA_W-1:0] sum
);
  localparam int unsigned PROD_W = 2 * DATA_W + 1;
  localparam int unsigned ACC_W = PROD_W + $clog2(T_M * K * K + 1);

  logic signed [ACC_W-1:0] tree;
  always_comb begin
    tree = '0;
    for (int m = 0; m < T_M; m++)
      for (int y = 0; y < K; y++)
        for (int x = 0; x < K; x++)
          tree = tree + ACC_W'($signed({1'b0, win[y][x][m]}) * wgt[m][y][x]);
  end

  logic signed [ACC_W-1:0] scaled;
  assign scaled = tree >>> FRAC_W;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_valid <= 1'b0;
      sum       <= '0;
    end else if (en) begin
      sum_valid <= in_valid;
      if (in_valid) sum <= scaled[DATA_W-1:0];
    end
  end
endmodule
