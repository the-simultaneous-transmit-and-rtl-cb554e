// tb_star_channel_core: two channel cores, X and Y, joined by two
// behavioural fiber paths (star_tb_fiber) and a one-register status return.
//
// Both cores send numbered packages to each other whenever the random
// traffic source has one and the core is ready. Scoreboards check that each
// side receives the other's packages exactly once and in order. Fiber
// faults are injected in the X-to-Y direction: single-bit errors (must be
// corrected), then a bad fiber 1 (pair 0,1 must give way to pair 2,3), then
// bad fibers 1 and 3 (pair 2,3 fails, pair 0,2 takes over), then bad fiber
// 0 only (pair 0,2 fails, pair 1,3 takes over). Each reconfiguration must
// be followed by a resend of the lost packages and retraining, and both
// ends must agree on the configuration. The message rate (one per clock
// once the link is idle-free) is checked on a clean stretch.
module tb_star_channel_core;
  import star_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  // core X and Y ports
  logic                xtv, xtr, xrv, ytv, ytr, yrv;
  star_pkg_t           xtp, xrp, ytp, yrp;
  lane_word_t          x_tl [N_FIBERS], y_tl [N_FIBERS], x_rl [N_FIBERS], y_rl [N_FIBERS];
  logic [N_FIBERS-1:0] x_te, y_te, x_re, y_re;
  lane_rate_e          x_tr, y_tr, x_rr, y_rr;
  star_status_t        x_so, y_so, x_si, y_si;
  fiber_cfg_e          x_cfg, y_cfg;
  logic                x_er, y_er, x_corr, y_corr, x_rs, y_rs, x_rt, y_rt;
  logic                x_tf, x_rf, y_tf, y_rf;
  logic [N_FIBERS-1:0] bad_xy = '0;
  logic                single_xy = 0;
  logic                x2y_bad, y2x_bad;

  star_channel_core #(.DEPTH(16), .REPAIR_CYCLES(6), .N_TRAIN(3)) u_x (
    .clk, .rst_n, .tx_valid_i(xtv), .tx_pkg_i(xtp), .tx_ready_o(xtr),
    .rx_valid_o(xrv), .rx_pkg_o(xrp),
    .tx_lane_o(x_tl), .tx_lane_en_o(x_te), .tx_rate_o(x_tr),
    .rx_lane_i(x_rl), .rx_lane_en_i(x_re), .rx_rate_o(x_rr),
    .status_o(x_so), .status_i(x_si),
    .fwd_valid_o(), .fwd_pkg_o(), .fwd_ready_i(1'b0),
    .tx_failed_o(x_tf), .rx_failed_o(x_rf), .rx_cfg_o(x_cfg),
    .er_o(x_er), .corr_o(x_corr), .resend_o(x_rs), .retrained_o(x_rt)
  );
  star_channel_core #(.DEPTH(16), .REPAIR_CYCLES(6), .N_TRAIN(3)) u_y (
    .clk, .rst_n, .tx_valid_i(ytv), .tx_pkg_i(ytp), .tx_ready_o(ytr),
    .rx_valid_o(yrv), .rx_pkg_o(yrp),
    .tx_lane_o(y_tl), .tx_lane_en_o(y_te), .tx_rate_o(y_tr),
    .rx_lane_i(y_rl), .rx_lane_en_i(y_re), .rx_rate_o(y_rr),
    .status_o(y_so), .status_i(y_si),
    .fwd_valid_o(), .fwd_pkg_o(), .fwd_ready_i(1'b0),
    .tx_failed_o(y_tf), .rx_failed_o(y_rf), .rx_cfg_o(y_cfg),
    .er_o(y_er), .corr_o(y_corr), .resend_o(y_rs), .retrained_o(y_rt)
  );

  star_tb_fiber f_xy (.clk, .lane_i(x_tl), .en_i(x_te), .rate_i(x_tr), .bad_i(bad_xy),
                      .pair_bad_i(4'b0), .trio_bad_i(4'b0), .single_i(single_xy),
                      .lane_o(y_rl), .en_o(y_re), .corrupted_o(x2y_bad));
  star_tb_fiber f_yx (.clk, .lane_i(y_tl), .en_i(y_te), .rate_i(y_tr), .bad_i(4'b0),
                      .pair_bad_i(4'b0), .trio_bad_i(4'b0), .single_i(1'b0),
                      .lane_o(x_rl), .en_o(x_re), .corrupted_o(y2x_bad));

  always_ff @(posedge clk) begin
    x_si <= y_so;
    y_si <= x_so;
  end

  int checks = 0, failures = 0;
  int x_sent = 0, y_sent = 0, x_got = 0, y_got = 0;
  int n_corr = 0, n_er = 0, n_rs = 0, n_rt = 0;
  int traffic_pct = 70;

  function automatic star_pkg_t mk(int src, int i);
    star_pkg_t p;
    p.ext = 5'(i);
    p.payload = {32'(src), 32'(i * 7), 32'(~i), 32'(i)};
    p.ctx = 32'h100 | 32'(src);
    return p;
  endfunction

  // sources
  always @(negedge clk) begin
    xtv <= rst_n && ($urandom_range(0, 99) < traffic_pct);
    ytv <= rst_n && ($urandom_range(0, 99) < traffic_pct);
  end
  assign xtp = mk(1, x_sent);
  assign ytp = mk(2, y_sent);

  always @(posedge clk) if (rst_n) begin
    if (xtv && xtr) x_sent++;
    if (ytv && ytr) y_sent++;
    if (yrv) begin
      checks++;
      if (yrp != mk(1, y_got)) begin
        failures++; $display("FAIL t=%0t Y got %0d expected %0d", $time, yrp.payload[31:0], y_got);
      end
      y_got++;
    end
    if (xrv) begin
      checks++;
      if (xrp != mk(2, x_got)) begin
        failures++; $display("FAIL t=%0t X got %0d expected %0d", $time, xrp.payload[31:0], x_got);
      end
      x_got++;
    end
    if (y_corr) n_corr++;
    if (y_er) n_er++;
    if (x_rs) n_rs++;
    if (y_rt) n_rt++;
  end

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, want); end
  endtask

  task automatic settle();
    traffic_pct = 0;
    repeat (60) @(negedge clk);
    expect_eq(y_got, x_sent, "X to Y all delivered");
    expect_eq(x_got, y_sent, "Y to X all delivered");
    traffic_pct = 70;
  endtask

  initial begin
    int g0, c0;
    xtv = 0; ytv = 0; x_si = '0; y_si = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    // full rate: one package per clock on a clean link
    traffic_pct = 100;
    repeat (20) @(negedge clk);
    g0 = y_got;
    repeat (50) @(negedge clk);
    expect_eq(y_got - g0, 50, "one package per clock");
    traffic_pct = 70;
    // correctable errors
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); single_xy = 1;
      @(negedge clk); single_xy = 0;
      repeat (5) @(negedge clk);
    end
    expect_eq(n_corr, 5, "single errors corrected");
    expect_eq(n_er, 0, "no uncorrectable error yet");
    // fiber 1 goes bad: pair 0,1 -> pair 2,3
    bad_xy = 4'b0010;
    repeat (80) @(negedge clk);
    expect_eq(int'(y_cfg), int'(CFG_P23), "receiver on pair 2,3");
    expect_eq(int'(x_te), 4'b1100, "transmitter lights fibers 2,3");
    expect_eq(n_er, 1, "one uncorrectable error");
    settle();
    // fibers 1 and 3 bad: pair 2,3 -> pair 0,2
    bad_xy = 4'b1010;
    repeat (80) @(negedge clk);
    expect_eq(int'(y_cfg), int'(CFG_P02), "receiver on pair 0,2");
    settle();
    // fiber 0 bad only: pair 0,2 -> pair 1,3
    bad_xy = 4'b0001;
    repeat (80) @(negedge clk);
    expect_eq(int'(y_cfg), int'(CFG_P13), "receiver on pair 1,3");
    expect_eq(int'(x_tr), int'(RATE_PAIR), "pair lane rate");
    settle();
    expect_eq(n_er, 3, "three uncorrectable errors");
    expect_eq(n_rt, 3, "three retrainings");
    expect_eq(n_rs > 0, 1, "packages were resent");
    expect_eq(int'(x_cfg), int'(CFG_P01), "other direction untouched");
    expect_eq(x_tf || x_rf || y_tf || y_rf, 0, "no direction failed");
    $display("sent X->Y %0d, Y->X %0d, resent %0d", x_sent, y_sent, n_rs);
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
