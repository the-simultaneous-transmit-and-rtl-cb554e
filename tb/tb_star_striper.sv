// tb_star_striper: checks the message-to-fiber spreading.
//
// For every fiber configuration and random messages, the expected lane
// words are built bit by bit: with n active fibers and W = ceil(200/n), the
// k-th active fiber (from fiber 0 up) carries message bits k*W .. k*W+W-1
// (bits past 199 are zero) in its low bits; inactive fibers carry zero. The
// enable mask and the lane rate are checked too.
module tb_star_striper;
  import star_pkg::*;

  star_msg_t           msg;
  fiber_cfg_e          cfg;
  lane_word_t          lane [N_FIBERS];
  logic [N_FIBERS-1:0] en;
  lane_rate_e          rate;
  int checks = 0, failures = 0;

  star_striper dut (.msg_i(msg), .cfg_i(cfg), .lane_o(lane), .lane_en_o(en), .lane_rate_o(rate));

  task automatic check(input logic [3:0] exp_mask, input int w, input lane_rate_e exp_rate);
    int k;
    k = 0;
    checks++;
    if (en != exp_mask || rate != exp_rate) begin
      failures++;
      $display("FAIL cfg %0d: mask %b/%b rate %0d/%0d", cfg, en, exp_mask, rate, exp_rate);
    end
    for (int f = 0; f < 4; f++) begin
      lane_word_t e;
      e = '0;
      if (exp_mask[f]) begin
        for (int b = 0; b < w; b++)
          if (k * w + b < 200) e[b] = msg[k*w+b];
        k++;
      end
      checks++;
      if (lane[f] !== e) begin
        failures++;
        $display("FAIL cfg %0d fiber %0d: %h expected %h", cfg, f, lane[f], e);
      end
    end
  endtask

  initial begin
    for (int t = 0; t < 40; t++) begin
      msg = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      cfg = CFG_P01;  #1 check(4'b0011, 100, RATE_PAIR);
      cfg = CFG_P23;  #1 check(4'b1100, 100, RATE_PAIR);
      cfg = CFG_P02;  #1 check(4'b0101, 100, RATE_PAIR);
      cfg = CFG_P13;  #1 check(4'b1010, 100, RATE_PAIR);
      cfg = CFG_T012; #1 check(4'b0111, 67,  RATE_TRIO);
      cfg = CFG_T123; #1 check(4'b1110, 67,  RATE_TRIO);
      cfg = CFG_Q;    #1 check(4'b1111, 50,  RATE_QUAD);
      cfg = CFG_FAIL; #1 check(4'b0000, 0,   RATE_OFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
