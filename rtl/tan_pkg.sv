// tan_pkg: formats and constants shared by the binary32 tangent datapath.
//
// The argument |x| (x in [2^-12, pi/2]) is held as a 36-bit unsigned fixed-point
// number X with the binary point after bit 35 (LSB weight 2^-35). X splits into
//   c = X[35:27]  (9 bits, weight 2^-8 per step)   -> tan(c) from a table
//   a = X[26:18]  (9 bits, weight 2^-17 per step)  -> tan(a) from a table
//   b = X[17:0]   (18 bits, < 2^-17)               -> tan(b) ~ b
// tan(c) is stored as a small float: 5-bit exponent EC (tan(c) = 1.f * 2^(EC-8))
// and a 29-bit mantissa with the leading one kept explicitly, so that c = 0 is
// the all-zero word. tan(a) is stored in fixed point with LSB weight 2^-45.
// The field widths, the 115 threshold and the 256-ulp window near pi/2 follow
// the published architecture; the class encoding and NaN behaviour are choices
// of this implementation.
package tan_pkg;

  localparam int unsigned WF        = 23;          // binary32 fraction bits
  localparam int unsigned WE        = 8;           // binary32 exponent bits
  localparam int unsigned BIAS      = 127;
  localparam int unsigned FIX_W     = 36;          // 1 + WF + ceil(WF/2)
  localparam int unsigned C_W       = 9;
  localparam int unsigned A_W       = 9;
  localparam int unsigned B_W       = 18;
  localparam int unsigned TC_EXP_W  = 5;
  localparam int unsigned TC_MANT_W = 29;          // explicit 1 + (WF + 5)
  localparam int unsigned TA_W      = 37;          // 9 + 23 + 5 bits, LSB 2^-45
  localparam int unsigned TA_LSB    = 45;          // tan(a) = TA * 2^-45
  localparam int unsigned T_W       = TA_W + 1;    // tan(a) + b, may grow one bit
  localparam int unsigned MANT_W    = 36;          // internal normalized mantissas (1.35)
  localparam int unsigned MIN_EXP   = 115;         // below: tan(x) = x
  localparam logic [31:0] PIO2_BITS = 32'h3FC9_0FDB; // binary32 nearest to pi/2
  localparam int unsigned PIO2_WIN  = 256;         // tabulated ulps ending at PIO2_BITS
  localparam logic [31:0] QNAN      = 32'h7FC0_0000;

  // How the result is produced.
  typedef enum logic [1:0] {
    CLS_MAIN = 2'd0,   // table / multiply / divide datapath
    CLS_TINY = 2'd1,   // exponent < 115: tan(x) = x
    CLS_PIO2 = 2'd2,   // last 256 ulp before pi/2: direct table
    CLS_NAN  = 2'd3    // NaN, infinity or |x| > pi/2: quiet NaN
  } tan_class_e;

  // tan(c) table word.
  typedef struct packed {
    logic [TC_EXP_W-1:0]  exp;   // tan(c) = mant * 2^(exp - 8 - 28)
    logic [TC_MANT_W-1:0] mant;  // 1.28, explicit leading one, zero for c = 0
  } tanc_t;

endpackage
