// accel_pkg: constants and types shared by the convolution + approximate
// max-pooling accelerator.
//
// Numbers that come from the reference design: 32-bit fixed-point data,
// T_M = 4 channels in parallel, 3x3 filters, 2x2 pooling with stride 2,
// D_filter = 8 filter sub-ranges over R_filter = 2, D_fmaps = 64 ifmap
// sub-ranges (the VGG16 "New64" configuration) and 224x224 input images.
// Choices made here: the Q16.16 format, R_fmaps = 256.0, the 24-bit word of
// the prediction sums, zero padding supplied with the ifmap (so the largest
// ifmap seen by the hardware is 226x226), and the coded-filter layout.
package accel_pkg;

  // ---------------- data format ----------------
  localparam int unsigned DATA_W = 32;  // fixed-point word (ifmaps, filters, ofmaps)
  localparam int unsigned FRAC_W = 16;  // fractional bits (Q16.16)

  // ---------------- layer geometry ----------------
  localparam int unsigned T_M = 4;      // ifmap channels processed in parallel
  localparam int unsigned K = 3;        // filter size k
  localparam int unsigned KP = 2;       // pooling window k_P (stride S_P = k_P)
  localparam int unsigned MAX_W_IN = 226;  // 224 + 2 padding columns
  localparam int unsigned MAX_H_IN = 226;
  localparam int unsigned MAX_GROUPS = 128;  // M / T_M for M = 512
  localparam int unsigned MAX_FILTERS = 512; // N

  // ---------------- approximate coding ----------------
  localparam int unsigned D_FMAPS = 64;          // ifmap sub-ranges
  localparam int unsigned FMAP_RANGE_LOG2 = 24;  // R_fmaps = 2^24 LSB = 256.0
  localparam int unsigned D_FILTER = 8;          // filter sub-ranges (both signs)
  localparam int unsigned FILT_RANGE_LOG2 = 17;  // R_filter = 2^17 LSB = 2.0
  localparam int unsigned EXP_W = $clog2(D_FILTER / 2);  // width of c in 2^c
  localparam int unsigned PRED_W = 24;           // Bank 0 / apConv word

  typedef logic [DATA_W-1:0] pix_t;          // unsigned ifmap / ofmap value
  typedef logic signed [DATA_W-1:0] wgt_t;   // signed filter coefficient

  // Coded filter coefficient P_filter = nz ? (neg ? -1 : +1) * 2^exp : 0
  typedef struct packed {
    logic             nz;
    logic             neg;
    logic [EXP_W-1:0] exp;
  } wcode_t;

endpackage
