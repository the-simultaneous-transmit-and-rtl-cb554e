// star_tb_edc: testbench-side reference encoder for STAR messages, written
// from the definition of the extended Hamming code (positions 1..39, check
// bit j at position 2**j, overall parity last). Used by the testbenches to
// build messages without relying on the RTL encoder.
package star_tb_edc;
  import star_pkg::*;

  function automatic star_msg_t ref_encode(star_pkg_t p);
    logic [PKG_W-1:0] flat;
    star_msg_t m;
    flat = p;
    for (int g = 0; g < 5; g++) begin
      logic [32:0] d;
      logic [6:0]  c;
      int unsigned syn, k;
      d = flat[33*g +: 33];
      syn = 0; k = 0;
      for (int pos = 1; pos <= 39; pos++)
        if ((pos & (pos - 1)) != 0) begin
          if (d[k]) syn ^= pos;
          k++;
        end
      c[5:0] = 6'(syn);
      c[6]   = ^{d, c[5:0]};
      m[40*g +: 40] = {c, d};
    end
    return m;
  endfunction
endpackage
