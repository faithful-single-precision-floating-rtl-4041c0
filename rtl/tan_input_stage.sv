// tan_input_stage: unpacks a binary32 argument, classifies it and converts its
// magnitude to the 36-bit fixed-point word X used by the table datapath.
//
// Conversion: the 24-bit significand 1.f is placed at the top of a 36-bit word
// and shifted right by (127 - e), the distance between the input exponent and
// the largest exponent in range. For 115 <= e <= 127 this is exact, because the
// 36 bits hold 1 + 23 + 12 bit positions. X then splits into c = X[35:27],
// a = X[26:18] and b = X[17:0].
// Classification (purely combinational, no clock):
//   * e < 115            -> CLS_TINY, the result is the input itself
//   * the 256 binary32 values ending at the float nearest pi/2 (0x3FC90FDB)
//                        -> CLS_PIO2, with `pio2_idx` = 8-bit table index
//   * NaN, infinity or |x| above 0x3FC90FDB -> CLS_NAN (outside the supported
//     [-pi/2, pi/2] range; returning a quiet NaN is this design's choice)
//   * everything else    -> CLS_MAIN
// The shift, the 115 comparison and the pi/2 window follow the published
// architecture; zero and subnormal inputs fall into CLS_TINY.
module tan_input_stage
  import tan_pkg::*;
(
  input  logic [31:0]         x,
  output logic                sign,
  output tan_class_e          cls,
  output logic [FIX_W-1:0]    xfix,      // |x| * 2^35 (valid for CLS_MAIN)
  output logic [C_W-1:0]      c,
  output logic [A_W-1:0]      a,
  output logic [B_W-1:0]      b,
  output logic [7:0]          pio2_idx   // x - (0x3FC90FDB - 255), for CLS_PIO2
);
  logic [WE-1:0] e;
  logic [WF-1:0] f;
  logic [WE-1:0] sh;          // 127 - e
  logic [30:0]   mag;
  localparam logic [30:0] WIN_LO = PIO2_BITS[30:0] - 31'(PIO2_WIN - 1);

  assign sign = x[31];
  assign e    = x[30:23];
  assign f    = x[22:0];
  assign mag  = x[30:0];
  assign sh   = WE'(BIAS) - e;

  always_comb begin
    // main-path inputs shift by 0..12, which loses no bits
    xfix = {1'b1, f, 12'b0} >> sh;
    if (e == '1 || mag > PIO2_BITS[30:0])
      cls = CLS_NAN;
    else if (e < WE'(MIN_EXP))
      cls = CLS_TINY;
    else if (mag >= WIN_LO)
      cls = CLS_PIO2;
    else
      cls = CLS_MAIN;
  end

  assign c        = xfix[FIX_W-1 -: C_W];
  assign a        = xfix[FIX_W-1-C_W -: A_W];
  assign b        = xfix[B_W-1:0];
  assign pio2_idx = 8'(mag - WIN_LO);
endmodule
