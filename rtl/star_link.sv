// star_link: a STAR link, two STAR bundle modules (end A and end B) joined
// by one STAR bundle.
//
// Each bundle module serves N_DATA data channels and the task and transfer
// request channels of its end, plus the two spare channels. Every channel
// carries one 200-bit STAR message per clock in each direction over four
// optical fibers per direction. The optical transceivers and fibers are not
// part of this RTL: the lane words each end transmits are outputs
// (a_tx_*, b_tx_*) and the lane words each end receives are inputs
// (a_rx_*, b_rx_*); an outside model connects them (a2b: a_tx -> b_rx,
// b2a: b_tx -> a_rx), with whatever delay and bit errors it models.
//
// The status each receiver returns to the far-end transmitter (cumulative
// acknowledge, nack, fiber configuration) would travel on the control and
// status channels; here it crosses inside this module through one register
// stage per direction. Every received data package is also decoded by
// star_payload_unpack, whose format code and object field are brought out.
//
// Channel order on the per-channel arrays: data 0..N_DATA-1, data spare,
// task, transfer request, control spare.
//
// Lint reports rst_n as used both synchronously and asynchronously. The
// synchronous use is only the `disable iff` of the resend queue's
// assertions; every flop resets asynchronously.
module star_link
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
  // ---- end A, core side
  input  logic                a_data_tx_valid_i [N_DATA],
  input  star_pkg_t           a_data_tx_pkg_i   [N_DATA],
  output logic                a_data_tx_ready_o [N_DATA],
  output logic                a_data_rx_valid_o [N_DATA],
  output star_pkg_t           a_data_rx_pkg_o   [N_DATA],
  output logic [1:0]          a_data_rx_fmt_o   [N_DATA],
  output logic [3:0]          a_data_rx_obj_o   [N_DATA],
  input  logic                a_task_tx_valid_i,
  input  star_pkg_t           a_task_tx_pkg_i,
  output logic                a_task_tx_ready_o,
  output logic                a_task_rx_valid_o,
  output star_pkg_t           a_task_rx_pkg_o,
  input  logic                a_xfer_tx_valid_i,
  input  star_pkg_t           a_xfer_tx_pkg_i,
  output logic                a_xfer_tx_ready_o,
  output logic                a_xfer_rx_valid_o,
  output star_pkg_t           a_xfer_rx_pkg_o,
  // ---- end B, core side
  input  logic                b_data_tx_valid_i [N_DATA],
  input  star_pkg_t           b_data_tx_pkg_i   [N_DATA],
  output logic                b_data_tx_ready_o [N_DATA],
  output logic                b_data_rx_valid_o [N_DATA],
  output star_pkg_t           b_data_rx_pkg_o   [N_DATA],
  output logic [1:0]          b_data_rx_fmt_o   [N_DATA],
  output logic [3:0]          b_data_rx_obj_o   [N_DATA],
  input  logic                b_task_tx_valid_i,
  input  star_pkg_t           b_task_tx_pkg_i,
  output logic                b_task_tx_ready_o,
  output logic                b_task_rx_valid_o,
  output star_pkg_t           b_task_rx_pkg_o,
  input  logic                b_xfer_tx_valid_i,
  input  star_pkg_t           b_xfer_tx_pkg_i,
  output logic                b_xfer_tx_ready_o,
  output logic                b_xfer_rx_valid_o,
  output star_pkg_t           b_xfer_rx_pkg_o,
  // ---- fibers (to and from the optical transceivers)
  output lane_word_t          a_tx_lane_o    [N_CH][N_FIBERS],
  output logic [N_FIBERS-1:0] a_tx_lane_en_o [N_CH],
  output lane_rate_e          a_tx_rate_o    [N_CH],
  input  lane_word_t          a_rx_lane_i    [N_CH][N_FIBERS],
  input  logic [N_FIBERS-1:0] a_rx_lane_en_i [N_CH],
  output lane_rate_e          a_rx_rate_o    [N_CH],
  output lane_word_t          b_tx_lane_o    [N_CH][N_FIBERS],
  output logic [N_FIBERS-1:0] b_tx_lane_en_o [N_CH],
  output lane_rate_e          b_tx_rate_o    [N_CH],
  input  lane_word_t          b_rx_lane_i    [N_CH][N_FIBERS],
  input  logic [N_FIBERS-1:0] b_rx_lane_en_i [N_CH],
  output lane_rate_e          b_rx_rate_o    [N_CH],
  // ---- state and events per channel (a_*: receiver at A, b_*: at B)
  output fiber_cfg_e          a_rx_cfg_o     [N_CH],
  output logic                a_er_o         [N_CH],
  output logic                a_corr_o       [N_CH],
  output logic                a_resend_o     [N_CH],
  output logic                a_retrained_o  [N_CH],
  output logic [1:0]          a_spare_tx_used_o,
  output logic [1:0]          a_spare_rx_used_o,
  output fiber_cfg_e          b_rx_cfg_o     [N_CH],
  output logic                b_er_o         [N_CH],
  output logic                b_corr_o       [N_CH],
  output logic                b_resend_o     [N_CH],
  output logic                b_retrained_o  [N_CH],
  output logic [1:0]          b_spare_tx_used_o,
  output logic [1:0]          b_spare_rx_used_o
);
  star_status_t a_st_o [N_CH], b_st_o [N_CH];
  star_status_t a_st_i [N_CH], b_st_i [N_CH];

  star_bundle_module #(.N_DATA(N_DATA), .DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_a (
    .clk, .rst_n,
    .data_tx_valid_i(a_data_tx_valid_i), .data_tx_pkg_i(a_data_tx_pkg_i), .data_tx_ready_o(a_data_tx_ready_o),
    .data_rx_valid_o(a_data_rx_valid_o), .data_rx_pkg_o(a_data_rx_pkg_o),
    .task_tx_valid_i(a_task_tx_valid_i), .task_tx_pkg_i(a_task_tx_pkg_i), .task_tx_ready_o(a_task_tx_ready_o),
    .task_rx_valid_o(a_task_rx_valid_o), .task_rx_pkg_o(a_task_rx_pkg_o),
    .xfer_tx_valid_i(a_xfer_tx_valid_i), .xfer_tx_pkg_i(a_xfer_tx_pkg_i), .xfer_tx_ready_o(a_xfer_tx_ready_o),
    .xfer_rx_valid_o(a_xfer_rx_valid_o), .xfer_rx_pkg_o(a_xfer_rx_pkg_o),
    .tx_lane_o(a_tx_lane_o), .tx_lane_en_o(a_tx_lane_en_o), .tx_rate_o(a_tx_rate_o),
    .rx_lane_i(a_rx_lane_i), .rx_lane_en_i(a_rx_lane_en_i), .rx_rate_o(a_rx_rate_o),
    .status_o(a_st_o), .status_i(a_st_i),
    .rx_cfg_o(a_rx_cfg_o), .er_o(a_er_o), .corr_o(a_corr_o), .resend_o(a_resend_o),
    .retrained_o(a_retrained_o),
    .spare_tx_used_o(a_spare_tx_used_o), .spare_rx_used_o(a_spare_rx_used_o)
  );

  star_bundle_module #(.N_DATA(N_DATA), .DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_b (
    .clk, .rst_n,
    .data_tx_valid_i(b_data_tx_valid_i), .data_tx_pkg_i(b_data_tx_pkg_i), .data_tx_ready_o(b_data_tx_ready_o),
    .data_rx_valid_o(b_data_rx_valid_o), .data_rx_pkg_o(b_data_rx_pkg_o),
    .task_tx_valid_i(b_task_tx_valid_i), .task_tx_pkg_i(b_task_tx_pkg_i), .task_tx_ready_o(b_task_tx_ready_o),
    .task_rx_valid_o(b_task_rx_valid_o), .task_rx_pkg_o(b_task_rx_pkg_o),
    .xfer_tx_valid_i(b_xfer_tx_valid_i), .xfer_tx_pkg_i(b_xfer_tx_pkg_i), .xfer_tx_ready_o(b_xfer_tx_ready_o),
    .xfer_rx_valid_o(b_xfer_rx_valid_o), .xfer_rx_pkg_o(b_xfer_rx_pkg_o),
    .tx_lane_o(b_tx_lane_o), .tx_lane_en_o(b_tx_lane_en_o), .tx_rate_o(b_tx_rate_o),
    .rx_lane_i(b_rx_lane_i), .rx_lane_en_i(b_rx_lane_en_i), .rx_rate_o(b_rx_rate_o),
    .status_o(b_st_o), .status_i(b_st_i),
    .rx_cfg_o(b_rx_cfg_o), .er_o(b_er_o), .corr_o(b_corr_o), .resend_o(b_resend_o),
    .retrained_o(b_retrained_o),
    .spare_tx_used_o(b_spare_tx_used_o), .spare_rx_used_o(b_spare_rx_used_o)
  );

  // Return path of the receiver status (control and status channels).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        a_st_i[c] <= '{ack_seq: '0, nack: 1'b0, cfg: CFG_P01};
        b_st_i[c] <= '{ack_seq: '0, nack: 1'b0, cfg: CFG_P01};
      end
    end else begin
      for (int c = 0; c < N_CH; c++) begin
        a_st_i[c] <= b_st_o[c];
        b_st_i[c] <= a_st_o[c];
      end
    end
  end

  for (genvar i = 0; i < N_DATA; i++) begin : g_unpack
    star_payload_unpack u_ua (
      .pkg_i(a_data_rx_pkg_o[i]), .fmt_o(a_data_rx_fmt_o[i]),
      .num0_o(), .guard0_o(), .num1_o(), .guard1_o(), .index_o(), .obj_o(a_data_rx_obj_o[i])
    );
    star_payload_unpack u_ub (
      .pkg_i(b_data_rx_pkg_o[i]), .fmt_o(b_data_rx_fmt_o[i]),
      .num0_o(), .guard0_o(), .num1_o(), .guard1_o(), .index_o(), .obj_o(b_data_rx_obj_o[i])
    );
  end
endmodule
