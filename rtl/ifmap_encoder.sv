// ifmap_encoder: approximate coder for one unsigned ifmap value.
//
// The numeric range R_fmaps = 2^FMAP_RANGE_LOG2 is split into D_FMAPS equal
// sub-ranges. A zero value gets code 0; any other value gets the index of its
// sub-range plus one, so codes run 0..D_FMAPS. Because both R_fmaps and
// D_FMAPS are powers of two the sub-range index is simply the most
// significant bits of the range, and the circuit is a zero detector, an
// overflow detector and an incrementer. Values at or above R_fmaps saturate
// to D_FMAPS (a choice of this design). Purely combinational.
module ifmap_encoder #(
  parameter int unsigned DATA_W = accel_pkg::DATA_W,
  parameter int unsigned D_FMAPS = accel_pkg::D_FMAPS,
  parameter int unsigned FMAP_RANGE_LOG2 = accel_pkg::FMAP_RANGE_LOG2,
  localparam int unsigned CODE_W = $clog2(D_FMAPS + 1)
) (
  input  logic [DATA_W-1:0] act,
  output logic [CODE_W-1:0] code
);
  localparam int unsigned SEG_LOG2 = FMAP_RANGE_LOG2 - $clog2(D_FMAPS);

  logic over;
  logic [$clog2(D_FMAPS)-1:0] seg;

  generate
    if (FMAP_RANGE_LOG2 < DATA_W) begin : g_over
      assign over = |act[DATA_W-1:FMAP_RANGE_LOG2];
    end else begin : g_no_over
      assign over = 1'b0;
    end
  endgenerate

  assign seg = act[FMAP_RANGE_LOG2-1:SEG_LOG2];

  always_comb begin
    if (act == '0)   code = '0;
    else if (over)   code = CODE_W'(D_FMAPS);
    else             code = CODE_W'(seg) + CODE_W'(1);
  end
endmodule
