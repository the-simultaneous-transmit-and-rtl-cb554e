// tb_star_edc_decoder: checks the receiver's EDC pipe.
//
// Messages built by a reference encoder are sent clean, with one flipped
// bit (anywhere in the 200 bits), with one flipped bit in each of the five
// groups, and with two flipped bits in one group. Expected: clean and
// single-error messages come out as the original package, with corr_o set
// for exactly the groups that had a flip; a double error sets unc_o for its
// group and err_o. Results must appear exactly one clock after the input.
module tb_star_edc_decoder;
  import star_pkg::*;
  import star_tb_edc::*;

  logic clk = 0, rst_n = 1;
  logic valid_i;
  star_msg_t msg_i;
  logic valid_o, err_o;
  star_pkg_t pkg_o;
  logic [4:0] corr_o, unc_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous resets act

  star_edc_decoder dut (.clk, .rst_n, .valid_i, .msg_i, .valid_o, .pkg_o, .corr_o, .unc_o, .err_o);

  task automatic send(input star_msg_t m, input star_pkg_t exp_pkg, input logic [4:0] exp_corr,
                      input logic [4:0] exp_unc);
    @(negedge clk);
    valid_i = 1'b1;
    msg_i   = m;
    @(negedge clk);
    valid_i = 1'b0;
    checks++;
    if (!valid_o || corr_o != exp_corr || unc_o != exp_unc || err_o != (|exp_unc) ||
        (exp_unc == 0 && pkg_o != exp_pkg)) begin
      failures++;
      $display("FAIL: valid=%0d corr=%b/%b unc=%b/%b err=%0d pkg_ok=%0d", valid_o, corr_o,
               exp_corr, unc_o, exp_unc, err_o, pkg_o == exp_pkg);
    end
  endtask

  initial begin
    star_pkg_t p;
    star_msg_t m;
    valid_i = 0;
    msg_i   = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      m = ref_encode(p);
      case (t % 4)
        0: send(m, p, 5'b0, 5'b0);
        1: begin
          int b;
          b = $urandom_range(0, 199);
          m[b] = ~m[b];
          send(m, p, 5'(1 << (b / 40)), 5'b0);
        end
        2: begin
          for (int g = 0; g < 5; g++) begin
            int b;
            b = 40 * g + $urandom_range(0, 39);
            m[b] = ~m[b];
          end
          send(m, p, 5'b11111, 5'b0);
        end
        default: begin
          int g, b1, b2;
          g  = $urandom_range(0, 4);
          b1 = $urandom_range(0, 39);
          b2 = (b1 + $urandom_range(1, 39)) % 40;
          m[40*g+b1] = ~m[40*g+b1];
          m[40*g+b2] = ~m[40*g+b2];
          send(m, p, 5'b0, 5'(1 << g));
        end
      endcase
    end
    // every single bit position once
    p = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int b = 0; b < 200; b++) begin
      m = ref_encode(p);
      m[b] = ~m[b];
      send(m, p, 5'(1 << (b / 40)), 5'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
