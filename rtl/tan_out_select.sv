// tan_out_select: exception handling and the final result multiplexer.
//
// Picks the output word by input class: the rounded datapath magnitude
// (CLS_MAIN), the input itself (CLS_TINY, where tan(x) = x to working
// precision), the near-pi/2 table word (CLS_PIO2) or a quiet NaN (CLS_NAN).
// Tangent is odd, so the datapath works on |x| and the sign of x is applied
// here; the table word carries its own sign (negative only past pi/2) and is
// sign-flipped for negative x. The three data inputs of the multiplexer follow
// the published diagram; the NaN policy is this design's choice.
// Combinational; the caller registers it.
module tan_out_select
  import tan_pkg::*;
(
  input  tan_class_e  cls,
  input  logic        sign,       // sign of x
  input  logic [31:0] x,          // original input
  input  logic [30:0] main_mag,   // rounded |tan(x)| from the datapath
  input  logic [31:0] pio2_word,  // table result for |x|
  output logic [31:0] r
);
  always_comb begin
    unique case (cls)
      CLS_MAIN: r = {sign, main_mag};
      CLS_TINY: r = x;
      CLS_PIO2: r = {pio2_word[31] ^ sign, pio2_word[30:0]};
      default:  r = QNAN;
    endcase
  end
endmodule
