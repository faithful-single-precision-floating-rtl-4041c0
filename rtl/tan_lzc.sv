// tan_lzc: leading-zero counter used by the normalizers of the tangent datapath.
//
// Counts the zero bits above the most significant one of `din`; an all-zero
// word gives W. Purely combinational. It serves the numerator, the tan(a)+b
// and the denominator normalizers, which the published architecture draws as
// "LZC" boxes; the priority-scan form is this implementation's choice.
module tan_lzc #(
  parameter int unsigned W  = 36,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  din,
  output logic [CW-1:0] count
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++)
      if (din[i]) count = CW'(W - 1 - i);
  end
endmodule
