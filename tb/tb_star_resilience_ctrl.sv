// tb_star_resilience_ctrl: checks the fiber-configuration ladder.
//
// Each error pulse must move the configuration one step: pair 01, pair 23,
// pair 02, pair 13, trio 012, trio 123, all four, failed; then stay failed.
// The fiber rate must follow (pair, trio, quad, off) and nothing may change
// without an error. The change is checked on the clock after the pulse.
module tb_star_resilience_ctrl;
  import star_pkg::*;

  logic clk = 0, rst_n = 1, err = 0;
  fiber_cfg_e cfg;
  lane_rate_e rate;
  logic failed;
  logic [3:0] steps;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  star_resilience_ctrl dut (.clk, .rst_n, .err_i(err), .cfg_o(cfg), .rate_o(rate),
                            .failed_o(failed), .steps_o(steps));

  fiber_cfg_e exp_cfg [9] = '{CFG_P01, CFG_P23, CFG_P02, CFG_P13, CFG_T012, CFG_T123,
                              CFG_Q, CFG_FAIL, CFG_FAIL};
  lane_rate_e exp_rate [9] = '{RATE_PAIR, RATE_PAIR, RATE_PAIR, RATE_PAIR, RATE_TRIO,
                               RATE_TRIO, RATE_QUAD, RATE_OFF, RATE_OFF};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 9; i++) begin
      repeat (3) @(negedge clk);              // idle clocks: no change
      checks++;
      if (cfg != exp_cfg[i] || rate != exp_rate[i] || failed != (i >= 7) ||
          steps != 4'((i > 7) ? 7 : i)) begin
        failures++;
        $display("FAIL step %0d: cfg %0d/%0d rate %0d/%0d failed %0d steps %0d", i, cfg,
                 exp_cfg[i], rate, exp_rate[i], failed, steps);
      end
      err = 1;
      @(negedge clk);
      err = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
