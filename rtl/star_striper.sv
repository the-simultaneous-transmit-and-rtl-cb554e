// star_striper: spreads one 200-bit STAR message over the active fibers of a
// channel direction, every clock.
//
// The fiber configuration (star_pkg::fiber_cfg_e) selects two, three or four
// of the four fibers. With n active fibers each carries W = ceil(200/n) bits
// per clock (100, 67 or 50): the active fiber of rank r (counting active
// fibers from fiber 0 upward) carries message bits [r*W +: W] in its low
// bits, the rest of its 100-bit lane word being zero. Inactive fibers carry
// zero and have lane_en_o low. lane_rate_o tells the transceivers which lane
// rate to run (pair: fastest, trio: middle, quad: slowest). Using two, three
// or four fibers for one message per clock follows the protocol; the slice
// order is this design's choice. Combinational.
module star_striper
  import star_pkg::*;
(
  input  star_msg_t              msg_i,
  input  fiber_cfg_e             cfg_i,
  output lane_word_t             lane_o [N_FIBERS],
  output logic [N_FIBERS-1:0]    lane_en_o,
  output lane_rate_e             lane_rate_o
);
  always_comb begin
    logic [N_FIBERS-1:0] m;
    int unsigned         w;
    int unsigned         r;
    logic [MSG_W-1:0]    sh;
    m  = cfg_mask(cfg_i);
    w  = rate_width(cfg_rate(cfg_i));
    r  = 0;
    sh = '0;
    lane_en_o   = m;
    lane_rate_o = cfg_rate(cfg_i);
    for (int j = 0; j < N_FIBERS; j++) begin
      lane_o[j] = '0;
      if (m[j]) begin
        sh = msg_i >> (r * w);
        for (int b = 0; b < LANE_W; b++)
          lane_o[j][b] = (b < int'(w)) ? sh[b] : 1'b0;
        r++;
      end
    end
  end
endmodule
