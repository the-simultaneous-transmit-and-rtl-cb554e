// tb_star_imp: checks the Incoming Message Processor.
//
// Messages are built with a reference encoder. Checks: data packages are
// delivered two clocks after they arrive and counted in the acknowledge
// sequence; null and training packages are not delivered; a single-bit
// error is corrected (corr_o) and delivered; a two-bit error raises ER one
// clock after arrival, sends a nack with the count of good packages and the
// next fiber configuration, and starts the drop phase, in which clean data
// and further errors are ignored until a clock without a message; after
// that an error repeats the nack, and a clean training message ends
// retraining, after which data is delivered again.
module tb_star_imp;
  import star_pkg::*;
  import star_tb_edc::*;

  logic clk = 0, rst_n = 1;
  logic mv, pv, er, corr, retrained;
  star_msg_t m;
  star_pkg_t p;
  star_status_t st;
  fiber_cfg_e cfg;
  int delivered = 0, n_er = 0, n_nack = 0, last_nack_seq = -1, n_corr = 0, n_rt = 0;
  int expect_q [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  star_imp dut (.clk, .rst_n, .msg_valid_i(mv), .msg_i(m), .cfg_i(cfg), .pkg_valid_o(pv),
                .pkg_o(p), .er_o(er), .status_o(st), .corr_o(corr), .retrained_o(retrained));

  // stand-in for the resilience controller
  always_ff @(posedge clk) if (rst_n && er) cfg <= cfg_next(cfg);

  always @(posedge clk) if (rst_n) begin
    if (pv) begin
      checks++;
      if (expect_q.size() == 0 || p.payload[31:0] != 32'(expect_q[0])) begin
        failures++;
        $display("FAIL t=%0t unexpected delivery %0d", $time, p.payload[31:0]);
      end else void'(expect_q.pop_front());
      delivered++;
    end
    if (er) n_er++;
    if (corr) n_corr++;
    if (retrained) n_rt++;
    if (st.nack) begin
      n_nack++;
      last_nack_seq = int'(st.ack_seq);
      checks++;
      if (st.cfg != cfg) begin failures++; $display("FAIL nack cfg %0d vs %0d", st.cfg, cfg); end
    end
  end

  function automatic star_pkg_t data(int i);
    star_pkg_t q;
    q.ext = '0;
    q.payload = {$urandom, $urandom, $urandom, 32'(i)};
    q.ctx = 32'h77;
    return q;
  endfunction

  task automatic send(input star_msg_t msg);
    @(negedge clk);
    mv = 1; m = msg;
  endtask

  task automatic idle();
    @(negedge clk);
    mv = 0;
  endtask

  function automatic star_msg_t dbl_err(star_msg_t x);
    x[41] = ~x[41];
    x[47] = ~x[47];
    return x;
  endfunction

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, want); end
  endtask

  initial begin
    star_pkg_t nul, trn;
    nul = '0;
    trn = '0;
    trn.payload = TRAIN_PATTERN;
    mv = 0; m = '0; cfg = CFG_P01;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: one data package, delivered exactly two clocks later
    send(ref_encode(data(0))); expect_q.push_back(0);
    idle();
    expect_eq(pv, 0, "not yet delivered after one clock");
    @(negedge clk);
    expect_eq(pv, 1, "delivered after two clocks");
    for (int i = 1; i < 8; i++) begin
      send(ref_encode(data(i))); expect_q.push_back(i);
      send(ref_encode(nul));
    end
    send(ref_encode(trn));
    begin
      star_msg_t x;
      x = ref_encode(data(8));
      x[150] = ~x[150];
      send(x); expect_q.push_back(8);
    end
    idle(); idle(); idle();
    expect_eq(delivered, 9, "packages delivered");
    expect_eq(n_corr, 1, "single error corrected");
    expect_eq(int'(st.ack_seq), 9, "acknowledge count");
    // uncorrectable error
    send(dbl_err(ref_encode(data(100))));
    @(posedge clk); #1;
    expect_eq(er, 1, "ER one clock after the bad message");
    send(ref_encode(data(101)));           // dropped
    send(dbl_err(ref_encode(data(102))));  // ignored: before the gap
    send(ref_encode(trn));                 // ignored: before the gap
    idle(); idle();
    expect_eq(n_er, 1, "one ER before the gap");
    expect_eq(n_nack, 1, "one nack");
    expect_eq(last_nack_seq, 9, "nack carries the good count");
    expect_eq(int'(cfg), int'(CFG_P23), "next configuration");
    send(dbl_err(ref_encode(trn)));        // new configuration bad too
    idle(); idle(); idle();
    expect_eq(n_er, 2, "second ER after the gap");
    expect_eq(int'(cfg), int'(CFG_P02), "third configuration");
    send(ref_encode(trn));
    send(ref_encode(trn));
    send(ref_encode(data(9))); expect_q.push_back(9);
    send(ref_encode(data(10))); expect_q.push_back(10);
    idle(); idle(); idle();
    expect_eq(n_rt, 1, "retrained once");
    expect_eq(delivered, 11, "delivery resumed");
    expect_eq(expect_q.size(), 0, "nothing missing");
    expect_eq(int'(st.ack_seq), 11, "acknowledge count after retraining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
