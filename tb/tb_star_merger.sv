// tb_star_merger: checks message reassembly from the fibers.
//
// Lane words are built by the testbench from a random message (k-th active
// fiber carries bits k*W .. k*W+W-1, W = ceil(200/n)); inactive fibers and
// the unused high bits of active ones are filled with random junk that must
// be ignored. The merged message must equal the original for every fiber
// configuration.
module tb_star_merger;
  import star_pkg::*;

  lane_word_t lane [N_FIBERS];
  fiber_cfg_e cfg;
  star_msg_t  msg, exp_msg;
  int checks = 0, failures = 0;

  star_merger dut (.lane_i(lane), .cfg_i(cfg), .msg_o(msg));

  task automatic run(input fiber_cfg_e c, input logic [3:0] mask, input int w);
    int k;
    cfg = c;
    k = 0;
    for (int f = 0; f < 4; f++) begin
      lane[f] = {$urandom, $urandom, $urandom, $urandom};
      if (mask[f]) begin
        for (int b = 0; b < w; b++)
          lane[f][b] = (k * w + b < 200) ? exp_msg[k*w+b] : 1'b0;
        k++;
      end
    end
    #1;
    checks++;
    if (msg !== exp_msg) begin
      failures++;
      $display("FAIL cfg %0d: %h expected %h", c, msg, exp_msg);
    end
  endtask

  initial begin
    for (int t = 0; t < 50; t++) begin
      exp_msg = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      run(CFG_P01, 4'b0011, 100);
      run(CFG_P23, 4'b1100, 100);
      run(CFG_P02, 4'b0101, 100);
      run(CFG_P13, 4'b1010, 100);
      run(CFG_T012, 4'b0111, 67);
      run(CFG_T123, 4'b1110, 67);
      run(CFG_Q,   4'b1111, 50);
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
