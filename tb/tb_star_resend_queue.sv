// tb_star_resend_queue: checks the transmitter's resend log.
//
// A reference model keeps every pushed package in a list indexed by
// sequence number. The test pushes and sends packages directly (push and
// advance together), builds a backlog by pushing without sending, drains
// it, acknowledges, rewinds to an earlier sequence number and checks that
// the head then replays the packages from that number in order, and fills
// the queue to check that full_o appears after exactly DEPTH unconfirmed
// packages and that a push while full is ignored.
module tb_star_resend_queue;
  import star_pkg::*;

  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 1;
  logic push, adv, ack, rewind;
  star_pkg_t push_pkg, head;
  logic full, backlog;
  logic [SEQ_W-1:0] ack_seq, rewind_seq, send_seq, unacked;
  star_pkg_t model [256];
  int wr = 0, snd = 0, acked = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  star_resend_queue #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .push_i(push), .push_pkg_i(push_pkg), .full_o(full),
    .backlog_o(backlog), .head_o(head), .adv_i(adv), .ack_i(ack), .ack_seq_i(ack_seq),
    .rewind_i(rewind), .rewind_seq_i(rewind_seq), .send_seq_o(send_seq), .unacked_o(unacked)
  );

  function automatic star_pkg_t rnd_pkg();
    return {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic expect_state();
    checks++;
    if (backlog != (snd != wr) || full != (wr - acked >= DEPTH) ||
        send_seq != SEQ_W'(snd) || unacked != SEQ_W'(wr - acked) ||
        (backlog && head != model[snd % 256])) begin
      failures++;
      $display("FAIL t=%0t backlog %0d full %0d send %0d/%0d unacked %0d/%0d head_ok %0d",
               $time, backlog, full, send_seq, snd, unacked, wr - acked, head == model[snd % 256]);
    end
  endtask

  // one clock with the given controls; updates the model
  task automatic step(input logic p, input logic a, input logic k, input int kseq,
                      input logic r, input int rseq);
    logic do_push;
    @(negedge clk);
    do_push  = p && !full;
    push = p; adv = a; ack = k; ack_seq = SEQ_W'(kseq); rewind = r; rewind_seq = SEQ_W'(rseq);
    push_pkg = rnd_pkg();
    if (do_push) model[wr % 256] = push_pkg;
    @(negedge clk);
    push = 0; adv = 0; ack = 0; rewind = 0;
    if (do_push) wr++;
    if (r) snd = rseq;
    else if (a) snd++;
    if (k) acked = kseq;
    #1 expect_state();
  endtask

  initial begin
    push = 0; adv = 0; ack = 0; rewind = 0; ack_seq = 0; rewind_seq = 0; push_pkg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 expect_state();
    // direct sends with acks trailing by 3
    for (int i = 0; i < 20; i++) step(1, 1, i >= 3, (i >= 3) ? snd - 3 : 0, 0, 0);
    step(0, 0, 1, snd, 0, 0);                 // everything confirmed
    // backlog: push 5 without sending, then drain while pushing
    for (int i = 0; i < 5; i++) step(1, 0, 0, 0, 0, 0);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (head != model[snd % 256]) begin failures++; $display("FAIL head in backlog"); end
      step(1, 1, 0, 0, 0, 0);
    end
    // rewind to the oldest unconfirmed package and replay in order
    step(0, 0, 0, 0, 1, acked);
    while (snd != wr) begin
      checks++;
      if (head != model[snd % 256]) begin failures++; $display("FAIL replay seq %0d", snd); end
      step(0, 1, 0, 0, 0, 0);
    end
    // fill: full after DEPTH unconfirmed
    while (!full) step(1, 1, 0, 0, 0, 0);
    checks++;
    if (wr - acked != DEPTH) begin failures++; $display("FAIL full at %0d", wr - acked); end
    step(1, 0, 0, 0, 0, 0);                   // ignored
    step(0, 0, 1, snd, 0, 0);
    for (int i = 0; i < 300; i++) step(1, 1, 1, snd, 0, 0);   // sequence wrap
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
