// star_resend_queue: the transmitter's log of sent packages.
//
// Every package the OMP sends is logged here until the far-end receiver has
// confirmed it, so that it can be sent again after an uncorrectable error.
// The queue is a circular buffer addressed by SEQ_W-bit message sequence
// numbers, with three pointers:
//   ack_ptr  - oldest package not yet confirmed by the receiver
//   send_ptr - next logged package to (re)send
//   wr_ptr   - next free slot
// Packages between send_ptr and wr_ptr are the backlog. When the backlog is
// empty the OMP sends a new package directly and logs it in the same clock
// (push_i and adv_i together); when there is a backlog it sends head_o and
// appends new packages behind it, as the protocol describes. ack_i moves
// ack_ptr to the cumulative count of confirmed packages; rewind_i moves
// send_ptr back to the first package the receiver did not get. The queue is
// full when DEPTH packages are unconfirmed.
//
// The depth and the cumulative-acknowledge scheme are this design's
// choices: the protocol only says that sent messages are kept until they
// are known to be received. DEPTH must be a power of two no larger than
// 2**(SEQ_W-1) and must cover the round trip to the receiver and back.
module star_resend_queue
  import star_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push_i,
  input  star_pkg_t        push_pkg_i,
  output logic             full_o,
  output logic             backlog_o,
  output star_pkg_t        head_o,
  input  logic             adv_i,
  input  logic             ack_i,
  input  logic [SEQ_W-1:0] ack_seq_i,
  input  logic             rewind_i,
  input  logic [SEQ_W-1:0] rewind_seq_i,
  output logic [SEQ_W-1:0] send_seq_o,
  output logic [SEQ_W-1:0] unacked_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  star_pkg_t        mem [DEPTH];
  logic [SEQ_W-1:0] ack_ptr, send_ptr, wr_ptr;

  assign unacked_o  = wr_ptr - ack_ptr;
  assign full_o     = (unacked_o >= SEQ_W'(DEPTH));
  assign backlog_o  = (send_ptr != wr_ptr);
  assign head_o     = mem[send_ptr[AW-1:0]];
  assign send_seq_o = send_ptr;

  always_ff @(posedge clk) begin
    if (push_i && !full_o) mem[wr_ptr[AW-1:0]] <= push_pkg_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_ptr  <= '0;
      send_ptr <= '0;
      wr_ptr   <= '0;
    end else begin
      if (push_i && !full_o) wr_ptr <= wr_ptr + 1'b1;
      if (rewind_i)          send_ptr <= rewind_seq_i;
      else if (adv_i)        send_ptr <= send_ptr + 1'b1;
      if (ack_i)             ack_ptr  <= ack_seq_i;
    end
  end

  // A confirmation can only cover packages that were sent (including one
  // sent in the same clock).
  property p_ack_in_window;
    @(posedge clk) disable iff (!rst_n)
      ack_i |-> (SEQ_W'(ack_seq_i - ack_ptr) <= SEQ_W'(send_ptr + SEQ_W'(adv_i) - ack_ptr));
  endproperty
  a_ack_in_window: assert property (p_ack_in_window);

  // Never advance past the newest logged package.
  a_adv_backlog: assert property (@(posedge clk) disable iff (!rst_n)
    (adv_i && !rewind_i) |-> (backlog_o || (push_i && !full_o)));
endmodule
