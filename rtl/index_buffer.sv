// index_buffer: ping-pong store of the predicted winner indexes (r_m, c_m).
//
// The Predict stage writes the winners of filter n+1 into one half while the
// MAC stage reads the winners of filter n from the other half; the halves
// swap every ifmap read round (the caller chooses the half with wsel/rsel).
// Synchronous read, data held until the next read. No reset.
module index_buffer #(
  parameter int unsigned IDX_W = 2,
  parameter int unsigned DEPTH = 112 * 112,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic              wsel,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [IDX_W-1:0]  wdata,
  input  logic              re,
  input  logic              rsel,
  input  logic [ADDR_W-1:0] raddr,
  output logic [IDX_W-1:0]  rdata
);
  logic [IDX_W-1:0] mem [2][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wsel][waddr] <= wdata;
    if (re) rdata <= mem[rsel][raddr];
  end
endmodule
