// controller: sequencing of one convolution layer.
//
// With pooling on, a layer of N filters takes N+1 ifmap read rounds: in
// round r the Predict stage works on filter r (r < N) while the MAC stage
// computes filter r-1 (r > 0) at the windows predicted in round r-1, so the
// ifmaps are read only once more than in a conventional scheme. With pooling
// off (bypass) there are N rounds and the Predict stage is idle. Each round
// streams the M/T_M channel groups (cfg_groups), each as W_in x H_in pixels
// (cfg_w x cfg_h), one pixel per cycle while the stream and the output allow.
//
// Per group: LOAD waits for the group's filter beat in filter_buffer and
// takes it (one cycle when it is already there), STREAM accepts the pixels,
// DRAIN waits until pipe_busy drops so that the filters and the group flags
// never change under a patch still in flight. The index-buffer half that the
// Predict stage writes is round[0]; the MAC stage reads the other one.
// start is sampled in IDLE only; done pulses for one cycle at the end.
module controller
#(
  parameter int unsigned MAX_W = accel_pkg::MAX_W_IN,
  parameter int unsigned MAX_H = accel_pkg::MAX_H_IN,
  parameter int unsigned MAX_GROUPS = accel_pkg::MAX_GROUPS,
  parameter int unsigned MAX_FILTERS = accel_pkg::MAX_FILTERS,
  localparam int unsigned XW = $clog2(MAX_W + 1),
  localparam int unsigned YW = $clog2(MAX_H + 1),
  localparam int unsigned GW = $clog2(MAX_GROUPS + 1),
  localparam int unsigned NW = $clog2(MAX_FILTERS + 2),
  localparam int unsigned PW = XW + YW
) (
  input  logic          clk,
  input  logic          rst_n,
  // layer configuration, sampled on start
  input  logic          start,
  input  logic [XW-1:0] cfg_w,
  input  logic [YW-1:0] cfg_h,
  input  logic [GW-1:0] cfg_groups,
  input  logic [NW-1:0] cfg_nfilt,
  input  logic          cfg_pool,
  // status
  output logic          busy,
  output logic          done,
  // datapath handshakes
  input  logic          adv,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          next_full,
  output logic          take,
  output logic          clear,
  input  logic          pipe_busy,
  // group / round flags for the stages
  output logic          pool,
  output logic [XW-1:0] width,
  output logic          first_grp,
  output logic          last_grp,
  output logic          pred_en,
  output logic          mac_en,
  output logic [NW-1:0] mac_filter,
  output logic          pred_sel,
  output logic          mac_sel
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STREAM, S_DRAIN, S_DONE} state_t;
  state_t state;

  logic [GW-1:0] groups, grp;
  logic [NW-1:0] nfilt, round, last_round;
  logic [PW-1:0] npix, pix;

  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);
  assign in_ready  = (state == S_STREAM) && adv;
  assign take      = (state == S_LOAD) && next_full;
  assign clear     = (state == S_LOAD);
  assign first_grp = (grp == '0);
  assign last_grp  = (grp == groups - 1'b1);
  assign pred_en   = pool && (round < nfilt);
  assign mac_en    = pool ? (round != '0) : 1'b1;
  assign mac_filter = pool ? round - 1'b1 : round;
  assign pred_sel  = round[0];
  assign mac_sel   = ~round[0];
  assign last_round = pool ? nfilt : nfilt - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pool <= 1'b0; width <= '0; groups <= '0; nfilt <= '0;
      grp <= '0; round <= '0; npix <= '0; pix <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pool   <= cfg_pool;
          width  <= cfg_w;
          groups <= cfg_groups;
          nfilt  <= cfg_nfilt;
          npix   <= PW'(cfg_w) * PW'(cfg_h);
          grp    <= '0;
          round  <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: if (next_full) begin
          pix   <= '0;
          state <= S_STREAM;
        end
        S_STREAM: if (in_valid && in_ready) begin
          pix <= pix + 1'b1;
          if (pix == npix - 1'b1) state <= S_DRAIN;
        end
        S_DRAIN: if (!pipe_busy) begin
          if (!last_grp) begin
            grp   <= grp + 1'b1;
            state <= S_LOAD;
          end else if (round != last_round) begin
            grp   <= '0;
            round <= round + 1'b1;
            state <= S_LOAD;
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_cfg: assert property (@(posedge clk) disable iff (!rst_n)
      (state == S_IDLE && start) |-> (cfg_groups != '0 && cfg_nfilt != '0 &&
                                     cfg_w != '0 && cfg_h != '0))
    else $error("controller: empty layer configuration");
endmodule
