// tb_star_bundle_module: two bundle modules (end X and end Y) with
// N_DATA = 2 data channels, joined by behavioural fiber paths for all six
// channels and a one-register status return per channel.
//
// Numbered packages flow both ways on the data, task and transfer-request
// channels; every package is tagged with its class and channel, and the
// scoreboards check exactly-once, in-order delivery on the port of the same
// class and channel (so a task package can never come out of a data port).
// Then all X-to-Y fibers of the task channel go bad: the control spare must
// take over the task channel at both ends while the data spare stays free
// and nothing is lost.
module tb_star_bundle_module;
  import star_pkg::*;

  localparam int ND = 2, NCH = ND + 4, NCL = ND + 2;   // classes: data 0..ND-1, task, xfer

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  logic                dtv [2][ND], dtr [2][ND], drv [2][ND];
  star_pkg_t           dtp [2][ND], drp [2][ND];
  logic                ttv [2], ttr [2], trv [2], xtv [2], xtr [2], xrv [2];
  star_pkg_t           ttp [2], trp [2], xtp [2], xrp [2];
  lane_word_t          tl [2][NCH][N_FIBERS], rl [2][NCH][N_FIBERS];
  logic [N_FIBERS-1:0] te [2][NCH], re [2][NCH];
  lane_rate_e          trate [2][NCH], rrate [2][NCH];
  star_status_t        so [2][NCH], si [2][NCH];
  fiber_cfg_e          cfg [2][NCH];
  logic                er [2][NCH], corr [2][NCH], rs [2][NCH], rt [2][NCH];
  logic [1:0]          stx [2], srx [2];
  logic [N_FIBERS-1:0] bad [2][NCH];

  for (genvar e = 0; e < 2; e++) begin : g_end
    star_bundle_module #(.N_DATA(ND), .DEPTH(16), .REPAIR_CYCLES(6), .N_TRAIN(3)) u_b (
      .clk, .rst_n,
      .data_tx_valid_i(dtv[e]), .data_tx_pkg_i(dtp[e]), .data_tx_ready_o(dtr[e]),
      .data_rx_valid_o(drv[e]), .data_rx_pkg_o(drp[e]),
      .task_tx_valid_i(ttv[e]), .task_tx_pkg_i(ttp[e]), .task_tx_ready_o(ttr[e]),
      .task_rx_valid_o(trv[e]), .task_rx_pkg_o(trp[e]),
      .xfer_tx_valid_i(xtv[e]), .xfer_tx_pkg_i(xtp[e]), .xfer_tx_ready_o(xtr[e]),
      .xfer_rx_valid_o(xrv[e]), .xfer_rx_pkg_o(xrp[e]),
      .tx_lane_o(tl[e]), .tx_lane_en_o(te[e]), .tx_rate_o(trate[e]),
      .rx_lane_i(rl[e]), .rx_lane_en_i(re[e]), .rx_rate_o(rrate[e]),
      .status_o(so[e]), .status_i(si[e]),
      .rx_cfg_o(cfg[e]), .er_o(er[e]), .corr_o(corr[e]), .resend_o(rs[e]), .retrained_o(rt[e]),
      .spare_tx_used_o(stx[e]), .spare_rx_used_o(srx[e])
    );
    for (genvar c = 0; c < NCH; c++) begin : g_ch
      star_tb_fiber u_f (.clk, .lane_i(tl[e][c]), .en_i(te[e][c]), .rate_i(trate[e][c]),
                         .bad_i(bad[e][c]), .pair_bad_i(4'b0), .trio_bad_i(4'b0),
                         .single_i(1'b0), .lane_o(rl[1-e][c]), .en_o(re[1-e][c]), .corrupted_o());
      always_ff @(posedge clk) si[1-e][c] <= so[e][c];
    end
  end

  int checks = 0, failures = 0;
  int sent [2][NCL], got [2][NCL];
  logic want [2][NCL];
  int traffic_pct = 60;

  function automatic star_pkg_t mk(int e, int cl, int i);
    star_pkg_t p;
    p.ext = '0;
    p.payload = {32'(e), 32'(cl), 32'hC0DE, 32'(i)};
    p.ctx = 32'h300 + 32'(e * 16 + cl);
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
        $display("FAIL t=%0t class %0d from end %0d: got tag %0d/%0d expected %0d", $time, cl,
                 from, p.payload[95:64], p.payload[31:0], got[from][cl]);
      end
      got[from][cl]++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < ND; c++) if (dtv[e][c] && dtr[e][c]) sent[e][c]++;
      if (ttv[e] && ttr[e]) sent[e][ND]++;
      if (xtv[e] && xtr[e]) sent[e][ND+1]++;
      for (int c = 0; c < ND; c++) rx_check(1 - e, c, drv[e][c], drp[e][c]);
      rx_check(1 - e, ND, trv[e], trp[e]);
      rx_check(1 - e, ND + 1, xrv[e], xrp[e]);
    end
  end

  task automatic expect_eq(input int got_v, input int want_v, input string what);
    checks++;
    if (got_v != want_v) begin failures++; $display("FAIL %s: %0d expected %0d", what, got_v, want_v); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c < NCH; c++) bad[e][c] = '0;
      for (int cl = 0; cl < NCL; cl++) begin sent[e][cl] = 0; got[e][cl] = 0; want[e][cl] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    bad[0][ND+1] = 4'b1111;                 // task channel, X to Y
    repeat (400) @(negedge clk);
    expect_eq(int'(cfg[1][ND+1]), int'(CFG_FAIL), "task channel failed X to Y");
    expect_eq(int'(stx[0]), 2'b10, "control spare transmitting at X, data spare free");
    expect_eq(int'(srx[1]), 2'b10, "control spare receiving at Y, data spare free");
    traffic_pct = 0;
    repeat (100) @(negedge clk);
    for (int e = 0; e < 2; e++)
      for (int cl = 0; cl < NCL; cl++)
        expect_eq(got[e][cl], sent[e][cl], $sformatf("class %0d from end %0d all delivered", cl, e));
    expect_eq(sent[0][ND] > 100, 1, "task traffic flowed");
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
