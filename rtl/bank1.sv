// bank1: accumulation buffer of the MAC stage.
//
// Holds, for every pooling patch, the running exact convolution of the
// predicted winner window over the channel groups processed so far (one
// DATA_W word per pooled output rather than KP*KP words per patch as a
// conventional accumulation buffer would need). In bypass mode (no pooling)
// it is addressed by conv output instead, which limits multi-group bypass
// layers to DEPTH outputs. Simple dual-port RAM: synchronous read (data the
// cycle after re, held until the next read) and one write port, no reset.
module bank1 #(
  parameter int unsigned WORD_W = accel_pkg::DATA_W,
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
