// star_pkg: types, sizes and helper functions shared by the STAR message
// channel RTL.
//
// A STAR message is 200 bits. Its application layer, the package, is 165
// bits: a 5-bit extension code, 128 bits of standard payload and a 32-bit
// context. The transport layer adds a 35-bit error detection/correction (EDC)
// code, 7 bits for each of five 33-bit groups of the package. These sizes are
// the protocol's. The bit order inside the message, the SEC-DED code used for
// each group (an extended Hamming(39,33) code plus overall parity) and the
// reserved "null" context are this implementation's choices.
//
// Fiber configurations: each channel direction has four fibers. Normal
// operation uses a pair, then (after errors) other pairs, trios and finally
// all four fibers; after that the direction is declared failed and the spare
// channel of the bundle replaces it. The configuration ladder below encodes
// that order.
package star_pkg;

  localparam int unsigned EXT_W     = 5;
  localparam int unsigned PAYLOAD_W = 128;
  localparam int unsigned CTX_W     = 32;
  localparam int unsigned PKG_W     = EXT_W + PAYLOAD_W + CTX_W;   // 165
  localparam int unsigned N_GROUPS  = 5;
  localparam int unsigned GRP_W     = 33;
  localparam int unsigned CHK_W     = 7;
  localparam int unsigned EDC_W     = N_GROUPS * CHK_W;            // 35
  localparam int unsigned CW_W      = GRP_W + CHK_W;               // 40
  localparam int unsigned MSG_W     = PKG_W + EDC_W;               // 200
  localparam int unsigned N_FIBERS  = 4;
  localparam int unsigned LANE_W    = MSG_W / 2;                   // 100 bits per fiber per clock at most

  // Package: {ext, payload, context}; the context sits in the low bits.
  typedef struct packed {
    logic [EXT_W-1:0]     ext;
    logic [PAYLOAD_W-1:0] payload;
    logic [CTX_W-1:0]     ctx;
  } star_pkg_t;

  typedef logic [MSG_W-1:0]  star_msg_t;
  typedef logic [LANE_W-1:0] lane_word_t;

  // A package whose context is zero carries no data ("null" message). It is
  // sent on every clock that has nothing else to send, so that a message
  // still crosses the channel on every clock. A null package whose payload
  // equals TRAIN_PATTERN is a training message, sent after a reconfiguration.
  localparam logic [CTX_W-1:0]     NULL_CTX      = '0;
  localparam logic [PAYLOAD_W-1:0] TRAIN_PATTERN = {4{32'h5A3C_96E1}};

  function automatic logic is_null(star_pkg_t p);
    return p.ctx == NULL_CTX;
  endfunction

  function automatic logic is_train(star_pkg_t p);
    return (p.ctx == NULL_CTX) && (p.payload == TRAIN_PATTERN);
  endfunction

  // ---------------------------------------------------------------------
  // Fiber configuration ladder
  // ---------------------------------------------------------------------
  typedef enum logic [3:0] {
    CFG_P01  = 4'd0,   // fibers 0,1   (pair, fastest lane rate)
    CFG_P23  = 4'd1,   // fibers 2,3
    CFG_P02  = 4'd2,   // fibers 0,2
    CFG_P13  = 4'd3,   // fibers 1,3
    CFG_T012 = 4'd4,   // fibers 0,1,2 (trio, middle lane rate)
    CFG_T123 = 4'd5,   // fibers 1,2,3
    CFG_Q    = 4'd6,   // all four     (slowest lane rate)
    CFG_FAIL = 4'd7    // direction failed: spare channel takes over
  } fiber_cfg_e;

  typedef enum logic [1:0] {
    RATE_OFF  = 2'd0,
    RATE_PAIR = 2'd1,  // 100 bits per fiber per clock
    RATE_TRIO = 2'd2,  // 67 bits per fiber per clock
    RATE_QUAD = 2'd3   // 50 bits per fiber per clock
  } lane_rate_e;

  function automatic logic [N_FIBERS-1:0] cfg_mask(fiber_cfg_e c);
    case (c)
      CFG_P01:  return 4'b0011;
      CFG_P23:  return 4'b1100;
      CFG_P02:  return 4'b0101;
      CFG_P13:  return 4'b1010;
      CFG_T012: return 4'b0111;
      CFG_T123: return 4'b1110;
      CFG_Q:    return 4'b1111;
      default:  return 4'b0000;
    endcase
  endfunction

  function automatic lane_rate_e cfg_rate(fiber_cfg_e c);
    case (c)
      CFG_P01, CFG_P23, CFG_P02, CFG_P13: return RATE_PAIR;
      CFG_T012, CFG_T123:                 return RATE_TRIO;
      CFG_Q:                              return RATE_QUAD;
      default:                            return RATE_OFF;
    endcase
  endfunction

  // Bits carried by each active fiber: ceil(200 / n).
  function automatic int unsigned rate_width(lane_rate_e r);
    case (r)
      RATE_PAIR: return 100;
      RATE_TRIO: return 67;
      RATE_QUAD: return 50;
      default:   return 0;
    endcase
  endfunction

  function automatic fiber_cfg_e cfg_next(fiber_cfg_e c);
    return (c == CFG_FAIL) ? CFG_FAIL : fiber_cfg_e'(c + 4'd1);
  endfunction

  // ---------------------------------------------------------------------
  // Status returned from a receiver to the far-end transmitter of the same
  // channel direction (carried by the control and status channels).
  // ---------------------------------------------------------------------
  localparam int unsigned SEQ_W = 8;

  typedef struct packed {
    logic [SEQ_W-1:0] ack_seq;  // count of data messages received correctly
    logic             nack;     // pulse: uncorrectable error, resend from ack_seq
    fiber_cfg_e       cfg;      // fiber configuration to use from now on
  } star_status_t;

  // ---------------------------------------------------------------------
  // SEC-DED code of one 33-bit group
  // Hamming positions 1..39; check bit j sits at position 2**j (j=0..5),
  // data bits fill the other positions in increasing order. Check bit 6 is
  // the parity over the 33 data bits and the six Hamming check bits.
  // ---------------------------------------------------------------------
  // Hamming position of each data bit: the positions 3..39 that are not
  // powers of two, in increasing order.
  typedef logic [5:0] pos_arr_t [GRP_W];
  localparam pos_arr_t DPOS = '{6'd3, 6'd5, 6'd6, 6'd7, 6'd9, 6'd10, 6'd11, 6'd12, 6'd13, 6'd14, 6'd15, 6'd17, 6'd18, 6'd19, 6'd20, 6'd21, 6'd22, 6'd23, 6'd24, 6'd25, 6'd26, 6'd27, 6'd28, 6'd29, 6'd30, 6'd31, 6'd33, 6'd34, 6'd35, 6'd36, 6'd37, 6'd38, 6'd39};

  function automatic logic [CHK_W-1:0] grp_check(logic [GRP_W-1:0] d);
    logic [CHK_W-1:0] c;
    c = '0;
    for (int i = 0; i < GRP_W; i++)
      for (int j = 0; j < 6; j++)
        if (DPOS[i][j]) c[j] ^= d[i];
    c[6] = ^d ^ ^c[5:0];
    return c;
  endfunction

endpackage
