// star_merger: receive-side inverse of star_striper.
//
// Rebuilds the 200-bit message from the active fibers of the current fiber
// configuration: the active fiber of rank r supplies message bits
// [r*W +: W] from the low W bits of its lane word, W = ceil(200/n) for n
// active fibers. Bits of inactive fibers are ignored. Combinational; the
// receiver registers the result in its EDC pipe.
module star_merger
  import star_pkg::*;
(
  input  lane_word_t  lane_i [N_FIBERS],
  input  fiber_cfg_e  cfg_i,
  output star_msg_t   msg_o
);
  always_comb begin
    logic [N_FIBERS-1:0]      m;
    int unsigned              w;
    int unsigned              r;
    logic [MSG_W+LANE_W-1:0]  acc;
    logic [MSG_W+LANE_W-1:0]  part;
    m    = cfg_mask(cfg_i);
    w    = rate_width(cfg_rate(cfg_i));
    r    = 0;
    acc  = '0;
    part = '0;
    for (int j = 0; j < N_FIBERS; j++) begin
      if (m[j]) begin
        part = '0;
        for (int b = 0; b < LANE_W; b++)
          part[b] = (b < int'(w)) ? lane_i[j][b] : 1'b0;
        acc = acc | (part << (r * w));
        r++;
      end
    end
    msg_o = acc[MSG_W-1:0];
  end
endmodule
