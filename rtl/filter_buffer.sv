// filter_buffer: holds the filter slices of the current channel group.
//
// Each load beat carries, in parallel, the original coefficients used by the
// MAC array (T_M x K x K, filter n) and the coded coefficients used by the
// Predict module (T_M x K x K, filter n+1) for one channel group. The buffer
// has two entries: "next", filled through a valid/ready port whenever it is
// empty, and "cur", which drives the stages. A pulse on take (only when
// next_full) moves next into cur, so the beat of the following group can be
// loaded while the current one is in use and loading stays off the critical
// timeline.
module filter_buffer
  import accel_pkg::wgt_t, accel_pkg::wcode_t;
#(
  parameter int unsigned T_M = accel_pkg::T_M,
  parameter int unsigned K = accel_pkg::K
) (
  input  logic   clk,
  input  logic   rst_n,
  // load port (from external memory)
  input  logic   ld_valid,
  output logic   ld_ready,
  input  wgt_t   ld_wgt [T_M][K][K],
  input  wcode_t ld_code [T_M][K][K],
  // control
  input  logic   take,
  output logic   next_full,
  // current slice
  output wgt_t   cur_wgt [T_M][K][K],
  output wcode_t cur_code [T_M][K][K]
);
  wgt_t   nxt_wgt [T_M][K][K];
  wcode_t nxt_code [T_M][K][K];

  assign ld_ready = !next_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_full <= 1'b0;
    end else begin
      if (take) next_full <= 1'b0;
      if (ld_valid && ld_ready) next_full <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (ld_valid && ld_ready) begin
      nxt_wgt  <= ld_wgt;
      nxt_code <= ld_code;
    end
    if (take) begin
      cur_wgt  <= nxt_wgt;
      cur_code <= nxt_code;
    end
  end

  a_take_full: assert property (@(posedge clk) disable iff (!rst_n) take |-> next_full)
    else $error("filter_buffer: take without a loaded slice");
endmodule
