// tan_ref_pkg: reference helpers for the tangent testbenches.
//
// Converts between binary32 bit patterns and reals without relying on the
// simulator's shortreal support, and measures the distance between a binary32
// result and a double-precision reference in units of the binary32 ulp at the
// reference value. Testbench-only; not synthesizable.
package tan_ref_pkg;

  function automatic real f32_to_real(input logic [31:0] b);
    real m;
    int  e;
    e = int'(b[30:23]);
    if (e == 0) m = real'(b[22:0]) * (2.0 ** -149);
    else        m = (1.0 + real'(b[22:0]) * (2.0 ** -23)) * (2.0 ** (e - 127));
    return b[31] ? -m : m;
  endfunction

  // binary32 ulp at |t| (normal range only)
  function automatic real ulp32(input real t);
    real a;
    int  ex;
    a  = (t < 0.0) ? -t : t;
    ex = -126;
    for (int k = -126; k <= 127; k++)
      if (a >= 2.0 ** k) ex = k;
    return 2.0 ** (ex - 23);
  endfunction

  function automatic real ulp_err(input logic [31:0] got, input real ref_val);
    real d;
    d = f32_to_real(got) - ref_val;
    if (d < 0.0) d = -d;
    return d / ulp32(ref_val);
  endfunction

  function automatic logic [31:0] mk_f32(input logic s, input int e, input int f);
    return {s, 8'(e), 23'(f)};
  endfunction

endpackage
