// star_edc_encoder: transport-layer EDC generator of a STAR message.
//
// Splits the 165-bit package into five 33-bit groups and computes seven
// SEC-DED check bits for each, giving the protocol's 35-bit EDC code and the
// 200-bit message. Group g of the message is msg[40*g +: 40] =
// {check bits, package[33*g +: 33]}. The group and check sizes follow the
// protocol; the code itself (extended Hamming, see star_pkg::grp_check) and
// the bit placement are this design's choice.
//
// Purely combinational: the message is valid in the same clock as the
// package.
module star_edc_encoder
  import star_pkg::*;
(
  input  star_pkg_t pkg_i,
  output star_msg_t msg_o
);
  logic [PKG_W-1:0] flat;
  assign flat = pkg_i;

  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      msg_o[CW_W*g +: GRP_W]         = flat[GRP_W*g +: GRP_W];
      msg_o[CW_W*g + GRP_W +: CHK_W] = grp_check(flat[GRP_W*g +: GRP_W]);
    end
  end
endmodule
