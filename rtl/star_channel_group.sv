// star_channel_group: N STAR channel cores plus one spare channel core.
//
// A STAR bundle provides a spare channel for each class of channel. When
// the transmit direction of channel i fails (its receiver has exhausted all
// fiber configurations), the spare core's transmitter takes over channel i:
// the failed core's OMP hands its unconfirmed backlog and all later packages
// to the spare through its fwd_* port, so the core-side interface of
// channel i does not change and no package is lost. When the receive
// direction of channel i fails, packages the spare core receives are
// delivered as channel i's. Each direction is replaced separately, and the
// spare is given to the first channel that fails in that direction (the
// lowest index if several fail in the same clock); both ends make the same
// choice because both see the same failure.
//
// Fiber ports: index N is the spare channel's fibers. An unassigned spare
// sends null messages, so its fibers stay trained. The spare channel and its
// use for unrecoverable faults follow the protocol; the hand-over through
// the failed core and the assignment rule are this design's choices.
module star_channel_group
  import star_pkg::*;
#(
  parameter int unsigned N             = 16,
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned REPAIR_CYCLES = 8,
  parameter int unsigned N_TRAIN       = 7
) (
  input  logic                clk,
  input  logic                rst_n,
  // core side, per channel
  input  logic                tx_valid_i   [N],
  input  star_pkg_t           tx_pkg_i     [N],
  output logic                tx_ready_o   [N],
  output logic                rx_valid_o   [N],
  output star_pkg_t           rx_pkg_o     [N],
  // fibers and status, per channel core (N = spare)
  output lane_word_t          tx_lane_o    [N+1][N_FIBERS],
  output logic [N_FIBERS-1:0] tx_lane_en_o [N+1],
  output lane_rate_e          tx_rate_o    [N+1],
  input  lane_word_t          rx_lane_i    [N+1][N_FIBERS],
  input  logic [N_FIBERS-1:0] rx_lane_en_i [N+1],
  output lane_rate_e          rx_rate_o    [N+1],
  output star_status_t        status_o     [N+1],
  input  star_status_t        status_i     [N+1],
  // state and events, per channel core
  output fiber_cfg_e          rx_cfg_o     [N+1],
  output logic                er_o         [N+1],
  output logic                corr_o       [N+1],
  output logic                resend_o     [N+1],
  output logic                retrained_o  [N+1],
  output logic                spare_tx_used_o,
  output logic                spare_rx_used_o
);
  localparam int unsigned IW = $clog2(N + 1);

  logic       c_tx_valid [N+1];
  star_pkg_t  c_tx_pkg   [N+1];
  logic       c_tx_ready [N+1];
  logic       c_rx_valid [N+1];
  star_pkg_t  c_rx_pkg   [N+1];
  logic       c_fwd_valid[N+1];
  star_pkg_t  c_fwd_pkg  [N+1];
  logic       c_fwd_ready[N+1];
  logic       c_tx_failed[N+1];
  logic       c_rx_failed[N+1];

  logic          stx_used, srx_used;
  logic [IW-1:0] stx_sel,  srx_sel;

  for (genvar c = 0; c <= N; c++) begin : g_core
    star_channel_core #(.DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR_CYCLES), .N_TRAIN(N_TRAIN)) u_core (
      .clk, .rst_n,
      .tx_valid_i(c_tx_valid[c]), .tx_pkg_i(c_tx_pkg[c]), .tx_ready_o(c_tx_ready[c]),
      .rx_valid_o(c_rx_valid[c]), .rx_pkg_o(c_rx_pkg[c]),
      .tx_lane_o(tx_lane_o[c]), .tx_lane_en_o(tx_lane_en_o[c]), .tx_rate_o(tx_rate_o[c]),
      .rx_lane_i(rx_lane_i[c]), .rx_lane_en_i(rx_lane_en_i[c]), .rx_rate_o(rx_rate_o[c]),
      .status_o(status_o[c]), .status_i(status_i[c]),
      .fwd_valid_o(c_fwd_valid[c]), .fwd_pkg_o(c_fwd_pkg[c]), .fwd_ready_i(c_fwd_ready[c]),
      .tx_failed_o(c_tx_failed[c]), .rx_failed_o(c_rx_failed[c]), .rx_cfg_o(rx_cfg_o[c]),
      .er_o(er_o[c]), .corr_o(corr_o[c]), .resend_o(resend_o[c]), .retrained_o(retrained_o[c])
    );
  end

  // Spare assignment: latched on the first failure in each direction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stx_used <= 1'b0;
      srx_used <= 1'b0;
      stx_sel  <= '0;
      srx_sel  <= '0;
    end else begin
      if (!stx_used) begin
        for (int i = N - 1; i >= 0; i--)
          if (c_tx_failed[i]) begin
            stx_used <= 1'b1;
            stx_sel  <= IW'(i);
          end
      end
      if (!srx_used) begin
        for (int i = N - 1; i >= 0; i--)
          if (c_rx_failed[i]) begin
            srx_used <= 1'b1;
            srx_sel  <= IW'(i);
          end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      c_tx_valid[i]  = tx_valid_i[i];
      c_tx_pkg[i]    = tx_pkg_i[i];
      tx_ready_o[i]  = c_tx_ready[i];
      c_fwd_ready[i] = stx_used && (stx_sel == IW'(i)) && c_tx_ready[N];
      rx_valid_o[i]  = c_rx_valid[i] || (srx_used && (srx_sel == IW'(i)) && c_rx_valid[N]);
      rx_pkg_o[i]    = (srx_used && (srx_sel == IW'(i)) && c_rx_valid[N]) ? c_rx_pkg[N] : c_rx_pkg[i];
    end
    c_tx_valid[N]  = stx_used && c_fwd_valid[stx_sel];
    c_tx_pkg[N]    = c_fwd_pkg[stx_sel];
    c_fwd_ready[N] = 1'b0;
  end

  assign spare_tx_used_o = stx_used;
  assign spare_rx_used_o = srx_used;
endmodule
