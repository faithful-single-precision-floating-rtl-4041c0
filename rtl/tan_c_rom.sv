// tan_c_rom: 512-word table of tan(c) for the upper fixed-point field c = X[35:27]
// (c in steps of 2^-8, so the argument is c/256).
//
// Each word is {exp[4:0], mant[28:0]}: tan(c/256) = mant * 2^(exp - 8 - 28), the
// mantissa carrying its leading one explicitly (1.28, round to nearest). This
// covers tan(c) from 2^-8 (c = 1) to about 2^11 (c = 402, the last step below
// pi/2) with exponents 0..19. Word 0 (c = 0) and the words past pi/2, which the
// main datapath never addresses, are all zero. The words are computed at
// elaboration from $tan, so no data file is needed; the 34-bit width, the
// explicit leading one and the exponent range follow the published design.
// Timing: one registered read, data valid the cycle after `addr` (an embedded
// memory block with an output register). `en` holds the output when low.
module tan_c_rom
  import tan_pkg::*;
(
  input  logic           clk,
  input  logic           en,
  input  logic [C_W-1:0] addr,
  output tanc_t          q
);
  localparam int unsigned DW = TC_EXP_W + TC_MANT_W;
  typedef logic [DW-1:0] rom_arr_t [2**C_W];

  function automatic rom_arr_t gen_rom();
    rom_arr_t tbl;
    for (int i = 0; i < 2**C_W; i++) begin
      real    arg, t, scaled;
      int     ex;
      longint m;
      arg = real'(i) / 256.0;
      tbl[i] = '0;
      if (i != 0 && arg < 1.5707963267948966) begin
        t  = $tan(arg);
        ex = -8;
        for (int k = -8; k <= 12; k++)
          if (t >= 2.0 ** k) ex = k;
        scaled = t * (2.0 ** (TC_MANT_W - 1 - ex));
        m = longint'(scaled);
        if (m >= (64'sd1 <<< TC_MANT_W)) begin
          m  = m >>> 1;
          ex = ex + 1;
        end
        tbl[i] = {TC_EXP_W'(ex + 8), TC_MANT_W'(m)};
      end
    end
    return tbl;
  endfunction

  localparam rom_arr_t ROM = gen_rom();

  always_ff @(posedge clk)
    if (en) q <= tanc_t'(ROM[addr]);
endmodule
