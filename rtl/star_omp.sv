// star_omp: Outgoing Message Processor of one STAR channel direction.
//
// On every clock the OMP sends one 200-bit message (package plus EDC):
//  * the head of the resend queue when the queue has a backlog (new packages
//    from the context generator are then appended to the queue),
//  * otherwise the generator's new package, logged in the resend queue as it
//    is sent,
//  * otherwise a null package (context 0), so that the channel still carries
//    a message every clock.
// Status from the far-end receiver confirms packages (cumulative ack_seq)
// and reports uncorrectable errors (nack). On a nack the OMP adopts the new
// fiber configuration, rewinds the resend queue to the first lost package,
// sends nothing for REPAIR_CYCLES clocks while the fibers are reconfigured,
// then sends N_TRAIN training messages before resuming. A nack that arrives
// during the pause or the training (the new configuration failed too)
// restarts this sequence with the next configuration. When the receiver
// declares the direction failed (cfg CFG_FAIL) the OMP stops using its
// fibers and instead hands its unconfirmed backlog, then every new package,
// to the bundle's spare channel through fwd_*. Nothing sent is lost.
//
// Sending from the queue backlog and logging follow the protocol; the
// pause, the training messages, the null package and the hand-over to the
// spare are this design's choices. msg_o/msg_valid_o/cfg_o are registered
// (one clock from the decision).
module star_omp
  import star_pkg::*;
#(
  parameter int unsigned DEPTH         = 16,
  parameter int unsigned REPAIR_CYCLES = 8,
  parameter int unsigned N_TRAIN       = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  // context generator
  input  logic         gen_valid_i,
  input  star_pkg_t    gen_pkg_i,
  output logic         gen_ready_o,
  // status from the far-end receiver
  input  star_status_t status_i,
  // message to the fibers
  output logic         msg_valid_o,
  output star_msg_t    msg_o,
  output fiber_cfg_e   cfg_o,
  // hand-over to the spare channel after this direction failed
  output logic         fwd_valid_o,
  output star_pkg_t    fwd_pkg_o,
  input  logic         fwd_ready_i,
  // events
  output logic         resend_o,     // a package was sent from the backlog
  output logic         failed_o
);
  typedef enum logic [1:0] {S_RUN, S_HOLD, S_TRAIN, S_FAIL} state_e;

  state_e           state;
  logic [7:0]       cnt;
  fiber_cfg_e       cfg;
  logic             q_full, q_backlog, q_push, q_adv, q_ack, q_rewind;
  logic [SEQ_W-1:0] q_ack_seq, q_send_seq;
  star_pkg_t        q_head, tx_pkg;
  logic             tx_valid;
  star_msg_t        tx_msg;

  star_resend_queue #(.DEPTH(DEPTH)) u_queue (
    .clk, .rst_n,
    .push_i(q_push), .push_pkg_i(gen_pkg_i), .full_o(q_full),
    .backlog_o(q_backlog), .head_o(q_head), .adv_i(q_adv),
    .ack_i(q_ack), .ack_seq_i(q_ack_seq),
    .rewind_i(q_rewind), .rewind_seq_i(status_i.ack_seq),
    .send_seq_o(q_send_seq), .unacked_o()
  );

  assign gen_ready_o = !q_full;
  assign failed_o    = (state == S_FAIL);
  assign fwd_valid_o = (state == S_FAIL) && q_backlog;
  assign fwd_pkg_o   = q_head;

  always_comb begin
    q_push    = gen_valid_i && !q_full;
    q_adv     = 1'b0;
    q_rewind  = 1'b0;
    q_ack     = 1'b0;
    q_ack_seq = status_i.ack_seq;
    tx_valid  = 1'b0;
    tx_pkg    = '0;
    resend_o  = 1'b0;
    case (state)
      S_RUN: begin
        tx_valid = 1'b1;
        q_ack    = 1'b1;
        if (status_i.nack) begin
          tx_valid = 1'b0;
          q_rewind = 1'b1;
        end else if (q_backlog) begin
          tx_pkg   = q_head;
          q_adv    = 1'b1;
          resend_o = 1'b1;
        end else if (q_push) begin
          tx_pkg   = gen_pkg_i;
          q_adv    = 1'b1;
        end
      end
      S_HOLD, S_TRAIN: begin
        q_ack    = 1'b1;
        q_rewind = status_i.nack;
        if (state == S_TRAIN && !status_i.nack) begin
          tx_valid       = 1'b1;
          tx_pkg.payload = TRAIN_PATTERN;
        end
      end
      default: begin  // S_FAIL: confirm each package as the spare takes it
        if (fwd_valid_o && fwd_ready_i) begin
          q_adv     = 1'b1;
          q_ack     = 1'b1;
          q_ack_seq = q_send_seq + 1'b1;
        end
      end
    endcase
  end

  star_edc_encoder u_enc (.pkg_i(tx_pkg), .msg_o(tx_msg));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RUN;
      cnt         <= '0;
      cfg         <= CFG_P01;
      msg_valid_o <= 1'b0;
      msg_o       <= '0;
    end else begin
      msg_valid_o <= tx_valid;
      msg_o       <= tx_msg;
      if (state != S_FAIL && status_i.nack) begin
        cfg   <= status_i.cfg;
        state <= (status_i.cfg == CFG_FAIL) ? S_FAIL : S_HOLD;
        cnt   <= 8'(REPAIR_CYCLES);
      end else case (state)
        S_HOLD: begin
          if (cnt <= 8'd1) begin
            state <= S_TRAIN;
            cnt   <= 8'(N_TRAIN);
          end else cnt <= cnt - 8'd1;
        end
        S_TRAIN: begin
          if (cnt <= 8'd1) state <= S_RUN;
          else cnt <= cnt - 8'd1;
        end
        default: ;
      endcase
    end
  end

  assign cfg_o = cfg;
endmodule
