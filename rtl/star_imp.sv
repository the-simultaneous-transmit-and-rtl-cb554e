// star_imp: Incoming Message Processor of one STAR channel direction.
//
// Takes the message rebuilt from the fibers, runs it through the EDC pipe
// (star_edc_decoder, one clock) and
//  * delivers data packages (non-null context) to the core, one per clock,
//    counting them (the count is the cumulative acknowledgement returned to
//    the transmitter);
//  * on an uncorrectable error raises ER (er_o) for one clock, sends a nack
//    carrying the count of good packages and the next fiber configuration,
//    and then drops everything until the channel is retrained.
// Retraining: after the error the IMP first waits for a clock with no
// message (the transmitter's reconfiguration pause), then for a clean
// training message. An uncorrectable error in that second phase means the
// new configuration is bad too and repeats the nack with the next one.
// Null and training packages are never delivered.
//
// The EDC pipe and ER follow the protocol; the acknowledgement count, the
// drop-and-retrain sequence and the status format are this design's
// choices. status_o is registered; latency from msg_i to pkg_o is two
// clocks (EDC pipe, delivery register).
module star_imp
  import star_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                msg_valid_i,
  input  star_msg_t           msg_i,
  // configuration from the resilience controller
  input  fiber_cfg_e          cfg_i,
  // to the core
  output logic                pkg_valid_o,
  output star_pkg_t           pkg_o,
  // to the resilience controller and the far-end transmitter
  output logic                er_o,
  output star_status_t        status_o,
  // events
  output logic                corr_o,      // a single-bit error was corrected
  output logic                retrained_o  // retraining finished
);
  typedef enum logic [1:0] {R_RUN, R_WAIT_GAP, R_WAIT_TRAIN} rstate_e;

  rstate_e          state;
  logic             d_valid, d_err;
  star_pkg_t        d_pkg;
  logic [N_GROUPS-1:0] d_corr;
  logic [SEQ_W-1:0] rx_cnt;
  logic             err_now;

  star_edc_decoder u_edc (
    .clk, .rst_n,
    .valid_i(msg_valid_i), .msg_i(msg_i),
    .valid_o(d_valid), .pkg_o(d_pkg), .corr_o(d_corr), .unc_o(), .err_o(d_err)
  );

  assign err_now = d_valid && d_err &&
                   (state == R_RUN || state == R_WAIT_TRAIN) && cfg_i != CFG_FAIL;
  assign er_o    = err_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= R_RUN;
      rx_cnt      <= '0;
      pkg_valid_o <= 1'b0;
      pkg_o       <= '0;
      status_o    <= '{ack_seq: '0, nack: 1'b0, cfg: CFG_P01};
      corr_o      <= 1'b0;
      retrained_o <= 1'b0;
    end else begin
      pkg_valid_o     <= 1'b0;
      retrained_o     <= 1'b0;
      corr_o          <= d_valid && (|d_corr) && !d_err;
      pkg_o           <= d_pkg;
      status_o.nack   <= 1'b0;
      case (state)
        R_RUN: begin
          if (err_now) state <= R_WAIT_GAP;
          else if (d_valid && !is_null(d_pkg)) begin
            pkg_valid_o <= 1'b1;
            rx_cnt      <= rx_cnt + 1'b1;
          end
        end
        R_WAIT_GAP:   if (!msg_valid_i) state <= R_WAIT_TRAIN;
        R_WAIT_TRAIN: begin
          if (err_now) state <= R_WAIT_GAP;
          else if (d_valid && is_train(d_pkg)) begin
            state       <= R_RUN;
            retrained_o <= 1'b1;
          end
        end
        default: state <= R_RUN;
      endcase
      status_o.ack_seq <= rx_cnt + SEQ_W'(state == R_RUN && !err_now && d_valid && !is_null(d_pkg));
      if (err_now) begin
        status_o.nack <= 1'b1;
        status_o.cfg  <= cfg_next(cfg_i);
      end else begin
        status_o.cfg  <= cfg_i;
      end
    end
  end
endmodule
