// ldpc_pkg: shared constants, types and arithmetic helpers of the G.hn
// QC-LDPC decoder.
//
// Message format: every LLR and every message is a 6-bit two's complement
// number with 3 fraction bits (the (6,3) quantisation), kept in the
// symmetric range -31..+31 so that its magnitude always fits in 5 bits.
// A negative LLR is a hard decision of 1.
//
// The code table (mode_info) lists the six mother codes of the G.hn set:
// all have 24 block columns; the expansion factor Z is n/24 and the number
// of layers M is 24*(1-R). The rates 16/18 and 20/21 are transmitted as
// punctured versions of the rate-5/6 codes and are decoded in the 5/6 modes.
package ldpc_pkg;

  localparam int unsigned QW     = 6;   // LLR / message width (sign + 2 int + 3 frac)
  localparam int unsigned MAGW   = 5;   // magnitude width of compressed messages
  localparam int unsigned NB     = 24;  // block columns of every base matrix
  localparam int unsigned COLW   = 5;   // bits of a block-column index
  localparam int unsigned MMAX   = 12;  // most layers (rate 1/2)
  localparam int unsigned LAYW   = 4;   // bits of a layer index
  localparam int unsigned DMAX   = 20;  // largest row degree (rate 5/6)
  localparam int unsigned ENTW   = 5;   // bits of an entry index within a layer
  localparam int unsigned ZMAX   = 360; // largest expansion factor = number of PUs
  localparam int unsigned ZW     = 9;   // bits of a lane index / cyclic offset
  localparam int unsigned NMODE  = 6;   // mother codes supported
  localparam int unsigned MODEW  = 3;
  localparam int unsigned ITW    = 5;   // bits of an iteration count

  localparam logic signed [QW-1:0] QMAX = 6'sd31;   // "most supported positive number"

  // compressed check-node record held in the EX memory, one per PU lane
  typedef struct packed {
    logic [DMAX-1:0] signs;   // sign of each check-to-variable message
    logic [ENTW-1:0] idx;     // entry that holds the minimum
    logic [MAGW-1:0] sub;     // scaled second minimum
    logic [MAGW-1:0] min;     // scaled minimum
  } ex_rec_t;
  localparam int unsigned EXW = $bits(ex_rec_t);   // 35 bits

  typedef struct packed {
    logic [ZW-1:0]   z;       // expansion factor
    logic [LAYW-1:0] m;       // layers
  } mode_info_t;

  // Mother codes of Table I: 0: 1/2 n=1920, 1: 1/2 n=8640, 2: 2/3 n=1440,
  // 3: 2/3 n=6480, 4: 5/6 n=1152, 5: 5/6 n=5184.
  function automatic mode_info_t mode_info(input logic [MODEW-1:0] mode);
    mode_info_t r;
    case (mode)
      3'd0:    r = '{z: 9'd80,  m: 4'd12};
      3'd1:    r = '{z: 9'd360, m: 4'd12};
      3'd2:    r = '{z: 9'd60,  m: 4'd8};
      3'd3:    r = '{z: 9'd270, m: 4'd8};
      3'd4:    r = '{z: 9'd48,  m: 4'd4};
      default: r = '{z: 9'd216, m: 4'd4};
    endcase
    return r;
  endfunction

  // EX memory word: 64 RAMs of 120 bits. Each code class packs its
  // per-lane records at its own stride so that the largest code of each
  // class fills 7560 bits: rate 1/2: 360 x (5+5+3+8) = 7560,
  // rate 2/3: 270 x (5+5+4+14) = 7560, rate 5/6: 216 x (5+5+5+20) = 7560.
  localparam int unsigned EXBANKS = 64;
  localparam int unsigned EXWORD  = EXBANKS * 120;
  localparam int unsigned NCLASS  = 3;
  // sign bits (= most entries per layer) and index bits of a class
  function automatic int unsigned cls_signs(input int unsigned c);
    return (c == 0) ? 8 : ((c == 1) ? 14 : 20);
  endfunction
  function automatic int unsigned cls_idxw(input int unsigned c);
    return (c == 0) ? 3 : ((c == 1) ? 4 : 5);
  endfunction
  function automatic int unsigned cls_width(input int unsigned c);
    return 2 * MAGW + cls_idxw(c) + cls_signs(c);
  endfunction
  function automatic logic [1:0] mode_class(input logic [MODEW-1:0] mode);
    return (mode <= 3'd1) ? 2'd0 : ((mode <= 3'd3) ? 2'd1 : 2'd2);
  endfunction

  // saturate a wider signed value into -31..+31
  function automatic logic signed [QW-1:0] sat_q(input logic signed [QW+1:0] v);
    if (v > 8'sd31)       return 6'sd31;
    else if (v < -8'sd31) return -6'sd31;
    else                  return v[QW-1:0];
  endfunction

  // magnitude of a -31..+31 value
  function automatic logic [MAGW-1:0] mag_q(input logic signed [QW-1:0] v);
    return MAGW'(v[QW-1] ? -v : v);
  endfunction

  // normalisation by alpha = 0.75: m - m/4 (m/4 rounded down)
  function automatic logic [MAGW-1:0] scale_alpha(input logic [MAGW-1:0] m);
    return m - (m >> 2);
  endfunction

  // signed message from sign bit and magnitude
  function automatic logic signed [QW-1:0] smag(input logic s, input logic [MAGW-1:0] m);
    logic signed [QW-1:0] v;
    v = signed'({1'b0, m});
    return s ? -v : v;
  endfunction

endpackage
