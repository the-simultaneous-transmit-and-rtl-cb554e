// tb_star_edc_encoder: checks the transport-layer EDC generator.
//
// For random and corner-case packages it checks that the package bits pass
// through to their place in each 40-bit group, and that every group is a
// valid extended-Hamming codeword: the XOR of the Hamming positions of all
// set bits (check bit j at position 2**j, data in the other positions 1..39
// in increasing order) is zero and the 40 bits have even parity. The check
// is written from the code's definition, not from the encoder's equations.
module tb_star_edc_encoder;
  import star_pkg::*;

  star_pkg_t pkg;
  star_msg_t msg;
  int checks = 0, failures = 0;

  star_edc_encoder dut (.pkg_i(pkg), .msg_o(msg));

  task automatic check_msg();
    logic [PKG_W-1:0] flat;
    flat = pkg;
    for (int g = 0; g < 5; g++) begin
      logic [39:0] cw;
      int unsigned syn, k, par;
      cw  = msg[40*g +: 40];
      syn = 0; k = 0; par = 0;
      for (int pos = 1; pos <= 39; pos++) begin
        logic b;
        if ((pos & (pos - 1)) == 0) b = cw[33 + $clog2(pos)];
        else begin
          b = cw[k];
          k++;
        end
        if (b) syn ^= pos;
      end
      for (int i = 0; i < 40; i++) par ^= cw[i];
      checks++;
      if (cw[32:0] != flat[33*g +: 33] || syn != 0 || par != 0) begin
        failures++;
        $display("FAIL group %0d: data ok=%0d syndrome=%0d parity=%0d", g,
                 cw[32:0] == flat[33*g +: 33], syn, par);
      end
    end
  endtask

  initial begin
    pkg = '0;
    #1 check_msg();
    pkg = '1;
    #1 check_msg();
    for (int b = 0; b < PKG_W; b++) begin   // each single data bit
      pkg = '0;
      pkg[b] = 1'b1;
      #1 check_msg();
    end
    repeat (200) begin
      pkg = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      #1 check_msg();
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
