// tb_star_link: end-to-end test of a STAR link at its default size (16
// data channels plus spare, task, transfer request and control spare, in
// both directions), with every parameter at its default.
//
// A behavioural fiber path (star_tb_fiber) joins each channel direction.
// Numbered packages flow on all data, task and transfer-request channels in
// both directions, at a high enough rate that resend queues fill during
// repairs. Data packages alternate between the two payload formats.
// Scoreboards check exactly-once, in-order delivery per channel and class.
// Faults injected from A to B:
//   data 3: occasional single-bit errors           -> corrected
//   data 5: fiber 1 dead                           -> another fiber pair
//   data 6: all fibers fail at the pair rate       -> a fiber trio
//   data 7: all fibers fail at pair and trio rates -> all four fibers
//   data 8: all fibers dead                        -> data spare channel
// and from B to A: task channel, all fibers dead   -> control spare.
// Each mechanism is counted and must have happened at least once; the
// final fiber configurations and spare assignments are checked, and the
// message rate (one package per clock per channel) is checked on a clean
// channel.
module tb_star_link;
  import star_pkg::*;

  localparam int ND = 16, NCH = ND + 4, NCL = ND + 2;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  // per end (0 = A, 1 = B)
  logic                dtv [2][ND], dtr [2][ND], drv [2][ND];
  star_pkg_t           dtp [2][ND], drp [2][ND];
  logic [1:0]          dfmt [2][ND];
  logic [3:0]          dobj [2][ND];
  logic                ttv [2], ttr [2], trv [2], xtv [2], xtr [2], xrv [2];
  star_pkg_t           ttp [2], trp [2], xtp [2], xrp [2];
  lane_word_t          tl [2][NCH][N_FIBERS], rl [2][NCH][N_FIBERS];
  logic [N_FIBERS-1:0] te [2][NCH], re [2][NCH];
  lane_rate_e          trate [2][NCH], rrate [2][NCH];
  fiber_cfg_e          cfg [2][NCH];
  logic                er [2][NCH], corr [2][NCH], rs [2][NCH], rt [2][NCH];
  logic [1:0]          stx [2], srx [2];
  logic [N_FIBERS-1:0] bad [2][NCH], pbad [2][NCH], tbad [2][NCH];
  logic                single [2][NCH];

  star_link dut (
    .clk, .rst_n,
    .a_data_tx_valid_i(dtv[0]), .a_data_tx_pkg_i(dtp[0]), .a_data_tx_ready_o(dtr[0]),
    .a_data_rx_valid_o(drv[0]), .a_data_rx_pkg_o(drp[0]),
    .a_data_rx_fmt_o(dfmt[0]), .a_data_rx_obj_o(dobj[0]),
    .a_task_tx_valid_i(ttv[0]), .a_task_tx_pkg_i(ttp[0]), .a_task_tx_ready_o(ttr[0]),
    .a_task_rx_valid_o(trv[0]), .a_task_rx_pkg_o(trp[0]),
    .a_xfer_tx_valid_i(xtv[0]), .a_xfer_tx_pkg_i(xtp[0]), .a_xfer_tx_ready_o(xtr[0]),
    .a_xfer_rx_valid_o(xrv[0]), .a_xfer_rx_pkg_o(xrp[0]),
    .b_data_tx_valid_i(dtv[1]), .b_data_tx_pkg_i(dtp[1]), .b_data_tx_ready_o(dtr[1]),
    .b_data_rx_valid_o(drv[1]), .b_data_rx_pkg_o(drp[1]),
    .b_data_rx_fmt_o(dfmt[1]), .b_data_rx_obj_o(dobj[1]),
    .b_task_tx_valid_i(ttv[1]), .b_task_tx_pkg_i(ttp[1]), .b_task_tx_ready_o(ttr[1]),
    .b_task_rx_valid_o(trv[1]), .b_task_rx_pkg_o(trp[1]),
    .b_xfer_tx_valid_i(xtv[1]), .b_xfer_tx_pkg_i(xtp[1]), .b_xfer_tx_ready_o(xtr[1]),
    .b_xfer_rx_valid_o(xrv[1]), .b_xfer_rx_pkg_o(xrp[1]),
    .a_tx_lane_o(tl[0]), .a_tx_lane_en_o(te[0]), .a_tx_rate_o(trate[0]),
    .a_rx_lane_i(rl[0]), .a_rx_lane_en_i(re[0]), .a_rx_rate_o(rrate[0]),
    .b_tx_lane_o(tl[1]), .b_tx_lane_en_o(te[1]), .b_tx_rate_o(trate[1]),
    .b_rx_lane_i(rl[1]), .b_rx_lane_en_i(re[1]), .b_rx_rate_o(rrate[1]),
    .a_rx_cfg_o(cfg[0]), .a_er_o(er[0]), .a_corr_o(corr[0]), .a_resend_o(rs[0]),
    .a_retrained_o(rt[0]), .a_spare_tx_used_o(stx[0]), .a_spare_rx_used_o(srx[0]),
    .b_rx_cfg_o(cfg[1]), .b_er_o(er[1]), .b_corr_o(corr[1]), .b_resend_o(rs[1]),
    .b_retrained_o(rt[1]), .b_spare_tx_used_o(stx[1]), .b_spare_rx_used_o(srx[1])
  );

  for (genvar e = 0; e < 2; e++) begin : g_end
    for (genvar c = 0; c < NCH; c++) begin : g_ch
      star_tb_fiber u_f (.clk, .lane_i(tl[e][c]), .en_i(te[e][c]), .rate_i(trate[e][c]),
                         .bad_i(bad[e][c]), .pair_bad_i(pbad[e][c]), .trio_bad_i(tbad[e][c]),
                         .single_i(single[e][c]), .lane_o(rl[1-e][c]), .en_o(re[1-e][c]),
                         .corrupted_o());
    end
  end

  int checks = 0, failures = 0;
  int sent [2][NCL], got [2][NCL];
  logic want [2][NCL];
  int traffic_pct = 90;
  // mechanism counters
  int n_corr = 0, n_er = 0, n_pair2pair = 0, n_trio = 0, n_quad = 0, n_resend = 0,
      n_retrain = 0, n_full = 0, n_fmt_dual = 0, n_fmt_idx = 0;

  function automatic star_pkg_t mk(int e, int cl, int i);
    star_pkg_t p;
    p.ext = (i % 2 == 0) ? 5'b0_10_01 : 5'b1_00_11;   // dual double / double + index
    p.payload = {32'(e), 32'(cl), 4'(i), 28'h0ABCDEF, 32'(i)};
    p.ctx = 32'h400 + 32'(e * 64 + cl);
    return p;
  endfunction

  always @(negedge clk)
    for (int e = 0; e < 2; e++)
      for (int cl = 0; cl < NCL; cl++) want[e][cl] <= rst_n && ($urandom_range(0, 99) < traffic_pct);

  always_comb
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < ND; c++) begin
        dtv[e][c] = want[e][c];
        dtp[e][c] = mk(e, c, sent[e][c]);
      end
      ttv[e] = want[e][ND];   ttp[e] = mk(e, ND, sent[e][ND]);
      xtv[e] = want[e][ND+1]; xtp[e] = mk(e, ND + 1, sent[e][ND+1]);
    end

  task automatic rx_check(input int from, input int cl, input logic v, input star_pkg_t p);
    if (v) begin
      checks++;
      if (p != mk(from, cl, got[from][cl])) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t class %0d from end %0d: got %0d expected %0d", $time, cl, from,
                   p.payload[31:0], got[from][cl]);
      end
      got[from][cl]++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < ND; c++) begin
        if (dtv[e][c] && dtr[e][c]) sent[e][c]++;
        if (dtv[e][c] && !dtr[e][c]) n_full++;
        rx_check(1 - e, c, drv[e][c], drp[e][c]);
        if (drv[e][c]) begin
          checks++;
          if (drp[e][c].ext[4] == 1'b0) begin
            n_fmt_dual++;
            if (dfmt[e][c] != 2'd0) begin failures++; $display("FAIL format decode dual"); end
          end else begin
            n_fmt_idx++;
            if (dfmt[e][c] != 2'd1 || dobj[e][c] != drp[e][c].payload[63:60]) begin
              failures++; $display("FAIL format decode index");
            end
          end
        end
      end
      if (ttv[e] && ttr[e]) sent[e][ND]++;
      if (xtv[e] && xtr[e]) sent[e][ND+1]++;
      rx_check(1 - e, ND, trv[e], trp[e]);
      rx_check(1 - e, ND + 1, xrv[e], xrp[e]);
      for (int c = 0; c < NCH; c++) begin
        if (corr[e][c]) n_corr++;
        if (er[e][c]) begin
          n_er++;
          if (cfg[e][c] inside {CFG_P01, CFG_P23, CFG_P02}) n_pair2pair++;
          if (cfg[e][c] == CFG_P13) n_trio++;
          if (cfg[e][c] == CFG_T123) n_quad++;
        end
        if (rs[e][c]) n_resend++;
        if (rt[e][c]) n_retrain++;
      end
    end
  end

  task automatic expect_eq(input int got_v, input int want_v, input string what);
    checks++;
    if (got_v != want_v) begin failures++; $display("FAIL %s: %0d expected %0d", what, got_v, want_v); end
  endtask

  task automatic mechanism(input int n, input string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    int g0;
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < NCH; c++) begin
        bad[e][c] = '0; pbad[e][c] = '0; tbad[e][c] = '0; single[e][c] = 0;
      end
      for (int cl = 0; cl < NCL; cl++) begin sent[e][cl] = 0; got[e][cl] = 0; want[e][cl] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    // one package per clock on a clean channel
    traffic_pct = 100;
    repeat (20) @(negedge clk);
    g0 = got[0][0];
    repeat (100) @(negedge clk);
    expect_eq(got[0][0] - g0, 100, "one package per clock on data channel 0");
    traffic_pct = 90;
    // faults
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); single[0][3] = 1;
      @(negedge clk); single[0][3] = 0;
      repeat (10) @(negedge clk);
    end
    bad[0][5]  = 4'b0010;
    pbad[0][6] = 4'b1111;
    tbad[0][7] = 4'b1111;
    bad[0][8]  = 4'b1111;
    bad[1][ND+1] = 4'b1111;                 // task channel B to A
    repeat (600) @(negedge clk);
    expect_eq(int'(cfg[1][5]), int'(CFG_P23), "data 5 on another fiber pair");
    expect_eq(int'(cfg[1][6]), int'(CFG_T012), "data 6 on a fiber trio");
    expect_eq(int'(cfg[1][7]), int'(CFG_Q), "data 7 on all four fibers");
    expect_eq(int'(trate[0][7]), int'(RATE_QUAD), "data 7 transmitter at the quad rate");
    expect_eq(int'(cfg[1][8]), int'(CFG_FAIL), "data 8 failed A to B");
    expect_eq(int'(cfg[0][ND+1]), int'(CFG_FAIL), "task channel failed B to A");
    expect_eq(int'(stx[0]), 2'b01, "data spare transmitting at A");
    expect_eq(int'(srx[1]), 2'b01, "data spare receiving at B");
    expect_eq(int'(stx[1]), 2'b10, "control spare transmitting at B");
    expect_eq(int'(srx[0]), 2'b10, "control spare receiving at A");
    traffic_pct = 0;
    repeat (100) @(negedge clk);
    for (int e = 0; e < 2; e++)
      for (int cl = 0; cl < NCL; cl++)
        expect_eq(got[e][cl], sent[e][cl], $sformatf("class %0d from end %0d all delivered", cl, e));
    $display("mechanisms:");
    mechanism(n_corr,      "single-bit errors corrected");
    mechanism(n_er,        "uncorrectable errors (ER)");
    mechanism(n_pair2pair, "moves to another fiber pair");
    mechanism(n_trio,      "moves to a fiber trio");
    mechanism(n_quad,      "moves to all four fibers");
    mechanism(int'(stx[0][0] && srx[1][0]), "data spare channel takeovers");
    mechanism(int'(stx[1][1] && srx[0][1]), "control spare channel takeovers");
    mechanism(n_resend,    "packages resent from backlog");
    mechanism(n_retrain,   "retrainings");
    mechanism(n_full,      "clocks a resend queue was full");
    mechanism(n_fmt_dual,  "dual-double payloads decoded");
    mechanism(n_fmt_idx,   "double+index payloads decoded");
    $display("packages delivered A to B on data 0: %0d", got[0][0]);
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
