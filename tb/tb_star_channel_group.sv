// tb_star_channel_group: two channel groups of N = 2 channels plus a spare,
// end X and end Y, joined by behavioural fiber paths per channel and a
// one-register status return.
//
// Numbered packages flow both ways on both channels; scoreboards check
// exactly-once, in-order delivery per channel. Then every X-to-Y fiber of
// channel 0 goes bad. The receiver must walk the whole ladder (four pairs,
// two trios at the trio rate, all four fibers at the quad rate) and then
// fail the direction; the spare core must take over channel 0 in that
// direction at both ends, carrying the unconfirmed backlog, with no package
// lost, while channel 1 and the Y-to-X direction keep working.
module tb_star_channel_group;
  import star_pkg::*;

  localparam int N = 2;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  logic                tv [2][N], tr [2][N], rv [2][N];
  star_pkg_t           tp [2][N], rp [2][N];
  lane_word_t          tl [2][N+1][N_FIBERS], rl [2][N+1][N_FIBERS];
  logic [N_FIBERS-1:0] te [2][N+1], re [2][N+1];
  lane_rate_e          trate [2][N+1], rrate [2][N+1];
  star_status_t        so [2][N+1], si [2][N+1];
  fiber_cfg_e          cfg [2][N+1];
  logic                er [2][N+1], corr [2][N+1], rs [2][N+1], rt [2][N+1];
  logic                stx [2], srx [2];
  logic [N_FIBERS-1:0] bad [2][N+1];

  for (genvar e = 0; e < 2; e++) begin : g_end
    star_channel_group #(.N(N), .DEPTH(16), .REPAIR_CYCLES(6), .N_TRAIN(3)) u_g (
      .clk, .rst_n,
      .tx_valid_i(tv[e]), .tx_pkg_i(tp[e]), .tx_ready_o(tr[e]),
      .rx_valid_o(rv[e]), .rx_pkg_o(rp[e]),
      .tx_lane_o(tl[e]), .tx_lane_en_o(te[e]), .tx_rate_o(trate[e]),
      .rx_lane_i(rl[e]), .rx_lane_en_i(re[e]), .rx_rate_o(rrate[e]),
      .status_o(so[e]), .status_i(si[e]),
      .rx_cfg_o(cfg[e]), .er_o(er[e]), .corr_o(corr[e]), .resend_o(rs[e]), .retrained_o(rt[e]),
      .spare_tx_used_o(stx[e]), .spare_rx_used_o(srx[e])
    );
    for (genvar c = 0; c <= N; c++) begin : g_ch
      // fibers from end e to end 1-e
      star_tb_fiber u_f (.clk, .lane_i(tl[e][c]), .en_i(te[e][c]), .rate_i(trate[e][c]),
                         .bad_i(bad[e][c]), .pair_bad_i(4'b0), .trio_bad_i(4'b0),
                         .single_i(1'b0), .lane_o(rl[1-e][c]), .en_o(re[1-e][c]), .corrupted_o());
      always_ff @(posedge clk) si[1-e][c] <= so[e][c];
    end
  end

  int checks = 0, failures = 0;
  int sent [2][N], got [2][N];
  int n_er = 0, seen_trio = 0, seen_quad = 0;
  int traffic_pct = 60;

  function automatic star_pkg_t mk(int e, int c, int i);
    star_pkg_t p;
    p.ext = '0;
    p.payload = {32'(e), 32'(c), 32'(i * 3), 32'(i)};
    p.ctx = 32'h200 + 32'(e * 16 + c);
    return p;
  endfunction

  always @(negedge clk)
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < N; c++) begin
        tv[e][c] <= rst_n && ($urandom_range(0, 99) < traffic_pct);
        tp[e][c] <= mk(e, c, sent[e][c]);
      end

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < N; c++) begin
        if (tv[e][c] && tr[e][c]) sent[e][c]++;
        if (rv[1-e][c]) begin
          checks++;
          if (rp[1-e][c] != mk(e, c, got[e][c])) begin
            failures++;
            $display("FAIL t=%0t ch %0d from end %0d: got %0d expected %0d", $time, c, e,
                     rp[1-e][c].payload[31:0], got[e][c]);
          end
          got[e][c]++;
        end
      end
    if (er[1][0]) n_er++;
    if (rrate[1][0] == RATE_TRIO) seen_trio = 1;
    if (rrate[1][0] == RATE_QUAD) seen_quad = 1;
  end

  task automatic expect_eq(input int got_v, input int want, input string what);
    checks++;
    if (got_v != want) begin failures++; $display("FAIL %s: %0d expected %0d", what, got_v, want); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int c = 0; c <= N; c++) bad[e][c] = '0;
      for (int c = 0; c < N; c++) begin sent[e][c] = 0; got[e][c] = 0; tv[e][c] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (100) @(negedge clk);
    bad[0][0] = 4'b1111;                        // channel 0, X to Y: all fibers bad
    repeat (400) @(negedge clk);
    expect_eq(n_er, 7, "errors until the direction failed");
    expect_eq(seen_trio, 1, "trio configuration used");
    expect_eq(seen_quad, 1, "all-fiber configuration used");
    expect_eq(int'(cfg[1][0]), int'(CFG_FAIL), "channel 0 receive direction failed at Y");
    expect_eq(stx[0], 1, "spare transmitter in use at X");
    expect_eq(srx[1], 1, "spare receiver in use at Y");
    expect_eq(stx[1] || srx[0], 0, "other direction keeps its channel");
    traffic_pct = 0;
    repeat (100) @(negedge clk);
    for (int e = 0; e < 2; e++)
      for (int c = 0; c < N; c++)
        expect_eq(got[e][c], sent[e][c], $sformatf("all delivered ch %0d from end %0d", c, e));
    traffic_pct = 100;
    repeat (100) @(negedge clk);
    traffic_pct = 0;
    repeat (100) @(negedge clk);
    expect_eq(got[0][0], sent[0][0], "spare carries channel 0 at full rate");
    $display("channel 0 X->Y: %0d packages", sent[0][0]);
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
