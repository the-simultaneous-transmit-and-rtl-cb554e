// tb_star_omp: checks the Outgoing Message Processor.
//
// A monitor decodes every message the OMP sends (package bits out of the
// five 40-bit groups), checks its EDC against a reference encoder, and
// checks that data packages come out in sequence-number order from the
// generator's accepted packages, restarting from the nack's sequence number
// after each error report. The directed part checks: null messages while
// idle; one-clock latency from the generator; after a nack, exactly
// REPAIR_CYCLES clocks with no message, the new fiber configuration, then
// exactly N_TRAIN training messages, then the replayed backlog flagged by
// resend_o; back-pressure after DEPTH unconfirmed packages; and after a
// nack with the failed configuration, silence on the fibers and hand-over
// of the whole unconfirmed backlog through fwd_*.
module tb_star_omp;
  import star_pkg::*;
  import star_tb_edc::*;

  localparam int DEPTH = 8, REPAIR = 4, NTRAIN = 3;

  logic clk = 0, rst_n = 1;
  logic gen_valid, gen_ready, msg_valid, fwd_valid, fwd_ready, resend, failed;
  star_pkg_t gen_pkg, fwd_pkg;
  star_status_t status;
  star_msg_t msg;
  fiber_cfg_e cfg;
  star_pkg_t sent [256];
  int n_acc = 0, nxt = 0, n_train = 0, n_null = 0, n_quiet = 0, n_resend = 0, n_fwd = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  star_omp #(.DEPTH(DEPTH), .REPAIR_CYCLES(REPAIR), .N_TRAIN(NTRAIN)) dut (
    .clk, .rst_n, .gen_valid_i(gen_valid), .gen_pkg_i(gen_pkg), .gen_ready_o(gen_ready),
    .status_i(status), .msg_valid_o(msg_valid), .msg_o(msg), .cfg_o(cfg),
    .fwd_valid_o(fwd_valid), .fwd_pkg_o(fwd_pkg), .fwd_ready_i(fwd_ready),
    .resend_o(resend), .failed_o(failed)
  );

  function automatic star_pkg_t unpack(star_msg_t m);
    logic [PKG_W-1:0] f;
    for (int g = 0; g < 5; g++) f[33*g +: 33] = m[40*g +: 33];
    return f;
  endfunction

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (gen_valid && gen_ready) begin
      sent[n_acc % 256] = gen_pkg;
      n_acc++;
    end
    if (resend) n_resend++;
    if (fwd_valid && fwd_ready) begin
      checks++;
      if (fwd_pkg != sent[nxt % 256]) begin
        failures++; $display("FAIL fwd seq %0d", nxt);
      end
      nxt++;
      n_fwd++;
    end
    if (!msg_valid) n_quiet++;
    else begin
      star_pkg_t p;
      p = unpack(msg);
      checks++;
      if (msg != ref_encode(p)) begin failures++; $display("FAIL EDC at %0t", $time); end
      if (is_train(p)) n_train++;
      else if (is_null(p)) n_null++;
      else begin
        checks++;
        if (p != sent[nxt % 256]) begin
          failures++; $display("FAIL t=%0t data seq %0d out of order", $time, nxt);
        end
        nxt++;
      end
    end
    if (status.nack) nxt = int'(status.ack_seq);
  end

  function automatic star_pkg_t mk(int i);
    star_pkg_t p;
    p.ext = 5'(i);
    p.payload = {$urandom, $urandom, $urandom, 32'(i)};
    p.ctx = 32'h1000 + 32'(i);
    return p;
  endfunction

  task automatic nack(input int seq, input fiber_cfg_e c);
    @(negedge clk);
    status = '{ack_seq: SEQ_W'(seq), nack: 1'b1, cfg: c};
    @(negedge clk);
    status.nack = 1'b0;
  endtask

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, want); end
  endtask

  initial begin
    int q0, t0, r0;
    gen_valid = 0; gen_pkg = '0; fwd_ready = 0;
    status = '{ack_seq: '0, nack: 1'b0, cfg: CFG_P01};
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    expect_eq(n_null >= 3, 1, "null messages while idle");
    // 10 packages back to back, acks trailing
    for (int i = 0; i < 10; i++) begin
      gen_valid = 1; gen_pkg = mk(i);
      @(negedge clk);
      status.ack_seq = SEQ_W'((i > 3) ? i - 3 : 0);
    end
    gen_valid = 0;
    @(negedge clk);
    expect_eq(nxt, 10, "packages sent with one-clock latency");
    // error report: resend from 6, go to fiber pair 2,3
    q0 = n_quiet; t0 = n_train; r0 = n_resend;
    nack(6, CFG_P23);
    // two new packages arrive during the pause
    for (int i = 10; i < 12; i++) begin
      gen_valid = 1; gen_pkg = mk(i);
      @(negedge clk);
    end
    gen_valid = 0;
    repeat (REPAIR + NTRAIN + 10) @(negedge clk);
    expect_eq(n_quiet - q0, REPAIR + 1, "clocks without a message after nack");
    expect_eq(n_train - t0, NTRAIN, "training messages");
    expect_eq(n_resend - r0, 6, "packages resent from the backlog");
    expect_eq(int'(cfg), int'(CFG_P23), "configuration after nack");
    expect_eq(nxt, 12, "all packages sent after replay");
    // back-pressure: stop confirming, fill to DEPTH
    status.ack_seq = 8'd12;
    @(negedge clk);
    for (int i = 12; i < 12 + DEPTH + 3; i++) begin
      gen_valid = 1; gen_pkg = mk(i);
      @(negedge clk);
      if (!gen_ready) break;
    end
    gen_valid = 0;
    expect_eq(n_acc, 12 + DEPTH, "accepted until the queue was full");
    expect_eq(gen_ready, 0, "ready low when full");
    // direction failed: hand over the unconfirmed backlog (from 14)
    repeat (3) @(negedge clk);
    nack(14, CFG_FAIL);
    repeat (3) @(negedge clk);
    expect_eq(failed, 1, "failed state");
    q0 = n_quiet;
    fwd_ready = 1;
    repeat (12) @(negedge clk);
    expect_eq(n_quiet - q0, 12, "no messages on the fibers after failure");
    expect_eq(n_fwd, 12 + DEPTH - 14, "backlog handed over");
    expect_eq(gen_ready, 1, "ready again after hand-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
