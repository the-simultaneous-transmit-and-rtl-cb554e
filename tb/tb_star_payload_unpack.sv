// tb_star_payload_unpack: checks the payload format decoder on random
// packages of each format: dual double (ext[4] = 0), double plus index
// (ext[4] = 1, ext[3:2] = 0) and context-defined (any other code).
module tb_star_payload_unpack;
  import star_pkg::*;

  star_pkg_t   p;
  logic [1:0]  fmt, g0, g1;
  logic [63:0] n0, n1, idx;
  logic [3:0]  obj;
  int checks = 0, failures = 0;

  star_payload_unpack dut (.pkg_i(p), .fmt_o(fmt), .num0_o(n0), .guard0_o(g0), .num1_o(n1),
                           .guard1_o(g1), .index_o(idx), .obj_o(obj));

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic [63:0] a, b;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      p.payload = {a, b};
      p.ctx     = $urandom;
      p.ext     = 5'($urandom);
      #1;
      checks++;
      if (!p.ext[4]) begin
        if (fmt != 2'd0 || n0 != a || n1 != b || g0 != p.ext[3:2] || g1 != p.ext[1:0]) begin
          failures++; $display("FAIL dual ext=%b", p.ext);
        end
      end else if (p.ext[3:2] == 2'b00) begin
        if (fmt != 2'd1 || n0 != a || g0 != p.ext[1:0] || idx != b || obj != b[63:60]) begin
          failures++; $display("FAIL dbl+index ext=%b", p.ext);
        end
      end else if (fmt != 2'd2) begin
        failures++; $display("FAIL other ext=%b fmt=%0d", p.ext, fmt);
      end
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
