// star_payload_unpack: decodes the two payload formats of a STAR package.
//
// The 5-bit extension code selects how the 128-bit payload is read:
//  * ext[4] = 0: two double-precision numbers, each with two guard bits
//    taken from the extension code (FMT_DUAL). Used for complex numbers and
//    for bulk saving and restoring core state.
//  * ext[4] = 1, ext[3:2] = 0: one double with two guard bits and a 64-bit
//    index list (FMT_DBL_INDEX). Used for pivots in dense matrix work and for
//    sparse matrix entries, where four bits of the index list name one of
//    sixteen large objects (obj_o).
//  * any other code: the context defines the meaning (FMT_OTHER).
// The two formats and their field widths follow the protocol. Which guard
// bits go with which number, which two extension bits must be zero, where
// each field sits in the payload and which four index bits name the object
// are this design's choices: double 0 (or the single double) in
// payload[127:64] with guard ext[3:2] (ext[1:0] for FMT_DBL_INDEX), double
// 1 or the index list in payload[63:0] with guard ext[1:0], object in
// index[63:60]. Combinational.
module star_payload_unpack
  import star_pkg::*;
(
  input  star_pkg_t    pkg_i,
  output logic [1:0]   fmt_o,      // 0 FMT_DUAL, 1 FMT_DBL_INDEX, 2 FMT_OTHER
  output logic [63:0]  num0_o,
  output logic [1:0]   guard0_o,
  output logic [63:0]  num1_o,
  output logic [1:0]   guard1_o,
  output logic [63:0]  index_o,
  output logic [3:0]   obj_o
);
  localparam logic [1:0] FMT_DUAL      = 2'd0;
  localparam logic [1:0] FMT_DBL_INDEX = 2'd1;
  localparam logic [1:0] FMT_OTHER     = 2'd2;

  always_comb begin
    num0_o   = pkg_i.payload[127:64];
    num1_o   = '0;
    guard0_o = '0;
    guard1_o = '0;
    index_o  = '0;
    obj_o    = '0;
    if (!pkg_i.ext[4]) begin
      fmt_o    = FMT_DUAL;
      guard0_o = pkg_i.ext[3:2];
      num1_o   = pkg_i.payload[63:0];
      guard1_o = pkg_i.ext[1:0];
    end else if (pkg_i.ext[3:2] == 2'b00) begin
      fmt_o    = FMT_DBL_INDEX;
      guard0_o = pkg_i.ext[1:0];
      index_o  = pkg_i.payload[63:0];
      obj_o    = pkg_i.payload[63:60];
    end else begin
      fmt_o    = FMT_OTHER;
      num0_o   = '0;
    end
  end
endmodule
