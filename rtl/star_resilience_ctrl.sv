// star_resilience_ctrl: fiber-configuration ladder of one receiving channel
// direction.
//
// Each uncorrectable error reported by the receiver's EDC pipe (err_i)
// moves the direction one step along the ladder of star_pkg::fiber_cfg_e:
// a different fiber pair (first degree of freedom), a fiber trio at a lower
// lane rate (second), all four fibers at the lowest rate (third), and
// finally CFG_FAIL, after which the bundle's spare channel takes over the
// direction (fourth). The receiver tells the far-end transmitter the new
// configuration in its status, so both ends change together.
//
// The four degrees of freedom and their order follow the protocol; which
// pairs and trios are tried, and that each error moves exactly one step,
// are this design's choices. cfg_o changes on the clock after err_i.
// steps_o counts reconfigurations since reset.
module star_resilience_ctrl
  import star_pkg::*;
#(
  parameter fiber_cfg_e INIT_CFG = CFG_P01
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       err_i,
  output fiber_cfg_e cfg_o,
  output lane_rate_e rate_o,
  output logic       failed_o,
  output logic [3:0] steps_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_o   <= INIT_CFG;
      steps_o <= '0;
    end else if (err_i && cfg_o != CFG_FAIL) begin
      cfg_o   <= cfg_next(cfg_o);
      steps_o <= steps_o + 4'd1;
    end
  end

  assign rate_o   = cfg_rate(cfg_o);
  assign failed_o = (cfg_o == CFG_FAIL);
endmodule
