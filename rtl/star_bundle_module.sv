// star_bundle_module: interface between one STAR bundle and the circuitry
// it serves (a core module, a PEM, a router or a memory controller).
//
// A bundle has N_DATA data channels plus a spare data channel, and two
// control and status channels, one for task messages and one for transfer
// request messages, plus a spare for those. Each class is a
// star_channel_group, so a failed data channel can only be replaced by the
// data spare and a failed control channel only by the control spare. Task
// and transfer-request packages use their own channels and ports, never a
// data channel, which keeps data apart from task control.
//
// Fiber-side ports are arrays over the bundle's N_DATA+4 channels in this
// order: data 0..N_DATA-1, data spare, task, transfer request, control
// spare. The channel counts (16 data + spare, task + transfer request +
// spare) follow the protocol's example bundle.
module star_bundle_module
  import star_pkg::*;
#(
  parameter int unsigned N_DATA        = 16,
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned REPAIR_CYCLES = 8,
  parameter int unsigned N_TRAIN       = 7,
  localparam int unsigned N_CH         = N_DATA + 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // data channels
  input  logic                data_tx_valid_i [N_DATA],
  input  star_pkg_t           data_tx_pkg_i   [N_DATA],
  output logic                data_tx_ready_o [N_DATA],
  output logic                data_rx_valid_o [N_DATA],
  output star_pkg_t           data_rx_pkg_o   [N_DATA],
  // task channel
  input  logic                task_tx_valid_i,
  input  star_pkg_t           task_tx_pkg_i,
  output logic                task_tx_ready_o,
  output logic                task_rx_valid_o,
  output star_pkg_t           task_rx_pkg_o,
  // transfer request channel
  input  logic                xfer_tx_valid_i,
  input  star_pkg_t           xfer_tx_pkg_i,
  output logic                xfer_tx_ready_o,
  output logic                xfer_rx_valid_o,
  output star_pkg_t           xfer_rx_pkg_o,
  // fibers and status, per channel
  output lane_word_t          tx_lane_o    [N_CH][N_FIBERS],
  output logic [N_FIBERS-1:0] tx_lane_en_o [N_CH],
  output lane_rate_e          tx_rate_o    [N_CH],
  input  lane_word_t          rx_lane_i    [N_CH][N_FIBERS],
  input  logic [N_FIBERS-1:0] rx_lane_en_i [N_CH],
  output lane_rate_e          rx_rate_o    [N_CH],
  output star_status_t        status_o     [N_CH],
  input  star_status_t        status_i     [N_CH],
  // state and events, per channel
  output fiber_cfg_e          rx_cfg_o     [N_CH],
  output logic                er_o         [N_CH],
  output logic                corr_o       [N_CH],
  output logic                resend_o     [N_CH],
  output logic                retrained_o  [N_CH],
  output logic [1:0]          spare_tx_used_o,   // [0] data, [1] control
  output logic [1:0]          spare_rx_used_o
);
  localparam int unsigned ND = N_DATA + 1;   // data channels incl. spare

  logic      ctl_tx_valid [2];
  star_pkg_t ctl_tx_pkg   [2];
  logic      ctl_tx_ready [2];
  logic      ctl_rx_valid [2];
  star_pkg_t ctl_rx_pkg   [2];

  lane_word_t          d_tx_lane [ND][N_FIBERS], c_tx_lane [3][N_FIBERS];
  lane_word_t          d_rx_lane [ND][N_FIBERS], c_rx_lane [3][N_FIBERS];
  logic [N_FIBERS-1:0] d_tx_en [ND], c_tx_en [3], d_rx_en [ND], c_rx_en [3];
  lane_rate_e          d_tx_rate [ND], c_tx_rate [3], d_rx_rate [ND], c_rx_rate [3];
  star_status_t        d_st_o [ND], c_st_o [3], d_st_i [ND], c_st_i [3];
  fiber_cfg_e          d_cfg [ND], c_cfg [3];
  logic                d_er [ND], c_er [3], d_corr [ND], c_corr [3];
  logic                d_rs [ND], c_rs [3], d_rt [ND], c_rt [3];

  star_channel_group #(.N(N_DATA), .DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_data (
    .clk, .rst_n,
    .tx_valid_i(data_tx_valid_i), .tx_pkg_i(data_tx_pkg_i), .tx_ready_o(data_tx_ready_o),
    .rx_valid_o(data_rx_valid_o), .rx_pkg_o(data_rx_pkg_o),
    .tx_lane_o(d_tx_lane), .tx_lane_en_o(d_tx_en), .tx_rate_o(d_tx_rate),
    .rx_lane_i(d_rx_lane), .rx_lane_en_i(d_rx_en), .rx_rate_o(d_rx_rate),
    .status_o(d_st_o), .status_i(d_st_i),
    .rx_cfg_o(d_cfg), .er_o(d_er), .corr_o(d_corr), .resend_o(d_rs), .retrained_o(d_rt),
    .spare_tx_used_o(spare_tx_used_o[0]), .spare_rx_used_o(spare_rx_used_o[0])
  );

  star_channel_group #(.N(2), .DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_ctrl (
    .clk, .rst_n,
    .tx_valid_i(ctl_tx_valid), .tx_pkg_i(ctl_tx_pkg), .tx_ready_o(ctl_tx_ready),
    .rx_valid_o(ctl_rx_valid), .rx_pkg_o(ctl_rx_pkg),
    .tx_lane_o(c_tx_lane), .tx_lane_en_o(c_tx_en), .tx_rate_o(c_tx_rate),
    .rx_lane_i(c_rx_lane), .rx_lane_en_i(c_rx_en), .rx_rate_o(c_rx_rate),
    .status_o(c_st_o), .status_i(c_st_i),
    .rx_cfg_o(c_cfg), .er_o(c_er), .corr_o(c_corr), .resend_o(c_rs), .retrained_o(c_rt),
    .spare_tx_used_o(spare_tx_used_o[1]), .spare_rx_used_o(spare_rx_used_o[1])
  );

  assign ctl_tx_valid[0] = task_tx_valid_i;
  assign ctl_tx_pkg[0]   = task_tx_pkg_i;
  assign task_tx_ready_o = ctl_tx_ready[0];
  assign task_rx_valid_o = ctl_rx_valid[0];
  assign task_rx_pkg_o   = ctl_rx_pkg[0];
  assign ctl_tx_valid[1] = xfer_tx_valid_i;
  assign ctl_tx_pkg[1]   = xfer_tx_pkg_i;
  assign xfer_tx_ready_o = ctl_tx_ready[1];
  assign xfer_rx_valid_o = ctl_rx_valid[1];
  assign xfer_rx_pkg_o   = ctl_rx_pkg[1];

  // Map the two groups onto the bundle's channel order.
  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      if (c < ND) begin
        tx_lane_o[c]    = d_tx_lane[c];
        tx_lane_en_o[c] = d_tx_en[c];
        tx_rate_o[c]    = d_tx_rate[c];
        rx_rate_o[c]    = d_rx_rate[c];
        status_o[c]     = d_st_o[c];
        rx_cfg_o[c]     = d_cfg[c];
        er_o[c]         = d_er[c];
        corr_o[c]       = d_corr[c];
        resend_o[c]     = d_rs[c];
        retrained_o[c]  = d_rt[c];
      end else begin
        tx_lane_o[c]    = c_tx_lane[c-ND];
        tx_lane_en_o[c] = c_tx_en[c-ND];
        tx_rate_o[c]    = c_tx_rate[c-ND];
        rx_rate_o[c]    = c_rx_rate[c-ND];
        status_o[c]     = c_st_o[c-ND];
        rx_cfg_o[c]     = c_cfg[c-ND];
        er_o[c]         = c_er[c-ND];
        corr_o[c]       = c_corr[c-ND];
        resend_o[c]     = c_rs[c-ND];
        retrained_o[c]  = c_rt[c-ND];
      end
    end
    for (int c = 0; c < ND; c++) begin
      d_rx_lane[c] = rx_lane_i[c];
      d_rx_en[c]   = rx_lane_en_i[c];
      d_st_i[c]    = status_i[c];
    end
    for (int c = 0; c < 3; c++) begin
      c_rx_lane[c] = rx_lane_i[ND+c];
      c_rx_en[c]   = rx_lane_en_i[ND+c];
      c_st_i[c]    = status_i[ND+c];
    end
  end
endmodule
