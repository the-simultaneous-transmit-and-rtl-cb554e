// star_edc_decoder: the receiver's EDC pipe.
//
// For each of the five 40-bit groups of a received 200-bit message it
// recomputes the check bits, corrects a single-bit error and flags a
// two-bit error as uncorrectable (SEC-DED per group, so up to five single
// errors are corrected, one per group). The protocol requires these
// calculations to fit in one or more nanosecond pipe stages; this design
// uses one register stage after the combinational syndrome logic.
//
// Interface: valid_i/msg_i in; one clock later valid_o, the corrected
// package pkg_o, corr_o (group had a corrected single error), unc_o (group
// has an uncorrectable error) and err_o (any group uncorrectable).
module star_edc_decoder
  import star_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  star_msg_t           msg_i,
  output logic                valid_o,
  output star_pkg_t           pkg_o,
  output logic [N_GROUPS-1:0] corr_o,
  output logic [N_GROUPS-1:0] unc_o,
  output logic                err_o
);
  logic [PKG_W-1:0]    fixed;
  logic [N_GROUPS-1:0] corr_c, unc_c;

  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      logic [GRP_W-1:0] d;
      logic [CHK_W-1:0] rc, cc;
      logic [5:0]       syn;
      logic             par;
      d   = msg_i[CW_W*g +: GRP_W];
      rc  = msg_i[CW_W*g + GRP_W +: CHK_W];
      cc  = grp_check(d);
      syn = cc[5:0] ^ rc[5:0];
      par = ^d ^ ^rc;                        // overall parity of all 40 bits
      corr_c[g] = 1'b0;
      unc_c[g]  = 1'b0;
      if (par) begin
        // odd number of flips: a single error somewhere in the 40 bits
        if (syn > 6'd39) unc_c[g] = 1'b1;
        else begin
          corr_c[g] = 1'b1;
          for (int i = 0; i < GRP_W; i++)
            if (syn == DPOS[i]) d[i] = ~d[i];
        end
      end else if (syn != 6'd0) begin
        unc_c[g] = 1'b1;                     // even number of flips: two errors
      end
      fixed[GRP_W*g +: GRP_W] = d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      pkg_o   <= '0;
      corr_o  <= '0;
      unc_o   <= '0;
      err_o   <= 1'b0;
    end else begin
      valid_o <= valid_i;
      pkg_o   <= fixed;
      corr_o  <= valid_i ? corr_c : '0;
      unc_o   <= valid_i ? unc_c  : '0;
      err_o   <= valid_i && (|unc_c);
    end
  end
endmodule
