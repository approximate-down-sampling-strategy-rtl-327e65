// bank0: provisional-sum memory of the Predict stage.
//
// One word per pooling patch, holding the KP x KP approximate-convolution
// partial sums (KP*KP fields of PRED_W bits), so the memory stores as many
// reduced-width sums as there are conv outputs, W_in x H_in in the
// reference design. The default depth covers a 224x224 conv output pooled
// to 112x112. Simple dual-port RAM: one synchronous read port (data valid
// the cycle after re, held until the next read) and one write port. No
// reset: a word is only read after it has been written in the same layer.
module bank0 #(
  parameter int unsigned WORD_W = accel_pkg::KP * accel_pkg::KP * accel_pkg::PRED_W,
  parameter int unsigned DEPTH = 112 * 112,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WORD_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WORD_W-1:0] wdata
);
  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
