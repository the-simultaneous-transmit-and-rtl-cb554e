// star_tb_fiber: behavioural model of one direction of a STAR channel's
// optical path (four transceiver pairs and four fibers), for testbenches.
//
// Lane words and their enables pass through with one clock of delay. A
// fiber marked in bad_i corrupts every word it carries by flipping its two
// lowest bits, which always lands two errors in one EDC group of the
// message (an uncorrectable error). single_i flips one bit (bit 3) of the
// lowest enabled fiber for that clock, a correctable error. The lane rate
// itself is not modelled (every rate delivers its word in one clock), but
// its effect on marginal fibers is: a fiber in pair_bad_i corrupts words
// only while it runs at the fastest (pair) rate, and a fiber in trio_bad_i
// at the pair and the trio rates; both work at the slowest (quad) rate.
module star_tb_fiber
  import star_pkg::*;
(
  input  logic                clk,
  input  lane_word_t          lane_i [N_FIBERS],
  input  logic [N_FIBERS-1:0] en_i,
  input  lane_rate_e          rate_i,
  input  logic [N_FIBERS-1:0] bad_i,
  input  logic [N_FIBERS-1:0] pair_bad_i,
  input  logic [N_FIBERS-1:0] trio_bad_i,
  input  logic                single_i,
  output lane_word_t          lane_o [N_FIBERS],
  output logic [N_FIBERS-1:0] en_o,
  output logic                corrupted_o   // a bad fiber carried a word
);
  logic [N_FIBERS-1:0] bad_now;
  assign bad_now = bad_i | ((rate_i == RATE_PAIR) ? (pair_bad_i | trio_bad_i) : '0)
                         | ((rate_i == RATE_TRIO) ? trio_bad_i : '0);

  always_ff @(posedge clk) begin
    logic done;
    done = 1'b0;
    en_o        <= en_i;
    corrupted_o <= |(en_i & bad_now);
    for (int f = 0; f < N_FIBERS; f++) begin
      lane_word_t w;
      w = lane_i[f];
      if (en_i[f] && bad_now[f]) w[1:0] = ~w[1:0];
      if (en_i[f] && single_i && !done) begin
        w[3] = ~w[3];
        done = 1'b1;
      end
      lane_o[f] <= w;
    end
  end
endmodule
