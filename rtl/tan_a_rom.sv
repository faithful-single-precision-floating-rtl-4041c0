// tan_a_rom: 512-word table of tan(a) for the middle fixed-point field
// a = X[26:18] (a in steps of 2^-17, so the argument is a * 2^-17).
//
// tan(a) spans only nine binades (2^-17 .. 2^-8), so it is kept in plain fixed
// point: 37 bits with LSB weight 2^-45, i.e. word = round(tan(a * 2^-17) * 2^45).
// That gives every nonzero entry at least 29 significant bits (1 + 23 + 5), the
// accuracy the published error budget asks for. The words are computed at
// elaboration from $tan. Timing: one registered read, data valid the cycle
// after `addr`; `en` holds the output when low.
module tan_a_rom
  import tan_pkg::*;
(
  input  logic            clk,
  input  logic            en,
  input  logic [A_W-1:0]  addr,
  output logic [TA_W-1:0] q
);
  typedef logic [TA_W-1:0] rom_arr_t [2**A_W];

  function automatic rom_arr_t gen_rom();
    rom_arr_t tbl;
    for (int i = 0; i < 2**A_W; i++)
      tbl[i] = TA_W'(longint'($tan(real'(i) * (2.0 ** -17)) * (2.0 ** TA_LSB)));
    return tbl;
  endfunction

  localparam rom_arr_t ROM = gen_rom();

  always_ff @(posedge clk)
    if (en) q <= ROM[addr];
endmodule
