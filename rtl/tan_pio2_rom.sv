// tan_pio2_rom: direct table of tan(x) for the 256 binary32 arguments that end at
// the float nearest pi/2 (0x3FC90EDC .. 0x3FC90FDB).
//
// Near pi/2 the denominator 1 - (tan(a)+b)tan(c) cancels heavily, so these
// arguments bypass the datapath and read their result here, as the published
// architecture does. Each word is the binary32 result rounded to nearest from a
// double-precision $tan evaluated at elaboration. The last entry, 0x3FC90FDB, lies
// just above pi/2 and so holds a large negative value. Where exactly the window
// starts and ends is this implementation's reading of "the final 256 ulp before
// pi/2". Timing: one registered read, data valid the cycle after `addr`; `en`
// holds the output when low.
module tan_pio2_rom
  import tan_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  logic [7:0]  addr,
  output logic [31:0] q
);
  typedef logic [31:0] rom_arr_t [PIO2_WIN];

  function automatic rom_arr_t gen_rom();
    rom_arr_t tbl;
    for (int i = 0; i < PIO2_WIN; i++) begin
      logic [WF-1:0] fb;
      real         arg, t;
      int          ex;
      longint      m;
      logic        s;
      fb  = WF'(PIO2_BITS - 32'(PIO2_WIN - 1) + 32'(i));
      // every word of the window has biased exponent 127, i.e. x in [1, 2)
      arg = 1.0 + real'(fb) * (2.0 ** -23);
      t   = $tan(arg);
      s   = (t < 0.0);
      if (s) t = -t;
      ex = 0;
      for (int k = 0; k <= 30; k++)
        if (t >= 2.0 ** k) ex = k;
      m = longint'(t * (2.0 ** (23 - ex)));
      if (m >= (64'sd1 <<< 24)) begin
        m  = m >>> 1;
        ex = ex + 1;
      end
      tbl[i] = {s, 8'(ex + 127), m[22:0]};
    end
    return tbl;
  endfunction

  localparam rom_arr_t ROM = gen_rom();

  always_ff @(posedge clk)
    if (en) q <= ROM[addr];
endmodule
