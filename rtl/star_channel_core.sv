// star_channel_core: one STAR channel core, the interface between a core
// (or router) and one bidirectional STAR channel of four optical fibers in
// each direction.
//
// Transmit direction: star_omp (resend queue + EDC encoder) produces one
// 200-bit message per clock, star_striper spreads it over the fibers of the
// transmit configuration. Receive direction: star_merger rebuilds the
// message from the fibers of the receive configuration, star_imp checks it
// in the EDC pipe and delivers the package, star_resilience_ctrl picks a new
// fiber configuration on every uncorrectable error. The status the receiver
// produces (acknowledge count, nack, configuration) travels to the far-end
// transmitter over the control and status channels; here it is a plain
// port pair, status_o to the far end and status_i from it.
//
// A receive message counts as present when every fiber of the receive
// configuration is lit (rx_lane_en_i). tx_lane_en_o is the transmit
// configuration's fiber mask while a message is being sent, else zero.
// Latency: package in to fibers 1 clock; fibers to package out 2 clocks.
module star_channel_core
  import star_pkg::*;
#(
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned REPAIR_CYCLES = 8,
  parameter int unsigned N_TRAIN       = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  // core side, transmit
  input  logic                tx_valid_i,
  input  star_pkg_t           tx_pkg_i,
  output logic                tx_ready_o,
  // core side, receive
  output logic                rx_valid_o,
  output star_pkg_t           rx_pkg_o,
  // fibers, transmit direction
  output lane_word_t          tx_lane_o    [N_FIBERS],
  output logic [N_FIBERS-1:0] tx_lane_en_o,
  output lane_rate_e          tx_rate_o,
  // fibers, receive direction
  input  lane_word_t          rx_lane_i    [N_FIBERS],
  input  logic [N_FIBERS-1:0] rx_lane_en_i,
  output lane_rate_e          rx_rate_o,
  // status to / from the far end
  output star_status_t        status_o,
  input  star_status_t        status_i,
  // hand-over to the spare channel after the transmit direction failed
  output logic                fwd_valid_o,
  output star_pkg_t           fwd_pkg_o,
  input  logic                fwd_ready_i,
  // state and events
  output logic                tx_failed_o,
  output logic                rx_failed_o,
  output fiber_cfg_e          rx_cfg_o,
  output logic                er_o,
  output logic                corr_o,
  output logic                resend_o,
  output logic                retrained_o
);
  logic                tx_msg_valid;
  star_msg_t           tx_msg, rx_msg;
  fiber_cfg_e          tx_cfg, rx_cfg;
  logic [N_FIBERS-1:0] tx_mask, rx_mask;
  logic                rx_present;

  star_omp #(.DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_omp (
    .clk, .rst_n,
    .gen_valid_i(tx_valid_i), .gen_pkg_i(tx_pkg_i), .gen_ready_o(tx_ready_o),
    .status_i(status_i),
    .msg_valid_o(tx_msg_valid), .msg_o(tx_msg), .cfg_o(tx_cfg),
    .fwd_valid_o, .fwd_pkg_o, .fwd_ready_i,
    .resend_o, .failed_o(tx_failed_o)
  );

  star_striper u_stripe (
    .msg_i(tx_msg), .cfg_i(tx_cfg),
    .lane_o(tx_lane_o), .lane_en_o(tx_mask), .lane_rate_o(tx_rate_o)
  );
  assign tx_lane_en_o = tx_msg_valid ? tx_mask : '0;

  star_merger u_merge (.lane_i(rx_lane_i), .cfg_i(rx_cfg), .msg_o(rx_msg));

  assign rx_mask    = cfg_mask(rx_cfg);
  assign rx_present = (rx_mask != '0) && ((rx_lane_en_i & rx_mask) == rx_mask);

  star_imp u_imp (
    .clk, .rst_n,
    .msg_valid_i(rx_present), .msg_i(rx_msg), .cfg_i(rx_cfg),
    .pkg_valid_o(rx_valid_o), .pkg_o(rx_pkg_o),
    .er_o, .status_o, .corr_o, .retrained_o
  );

  star_resilience_ctrl u_res (
    .clk, .rst_n, .err_i(er_o),
    .cfg_o(rx_cfg), .rate_o(rx_rate_o), .failed_o(rx_failed_o), .steps_o()
  );

  assign rx_cfg_o = rx_cfg;
endmodule
