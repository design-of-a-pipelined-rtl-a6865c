// tb_fp_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are carried as IEEE double (real). f2r widens a single-precision
// bit pattern exactly; r2f rounds a double to single precision, to nearest
// even, flushing results below the normal range to zero as the hardware
// does. Sums, differences and products of two singles computed in double and
// then rounded with r2f are correctly rounded single results.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else if (f[30:23] == 8'hff) d = {f[31], 11'h7ff, f[22:0], 29'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0) return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random single with exponent field in [emin, emax].
  function automatic logic [31:0] rand_f(input int emin, input int emax, input bit pos = 0);
    logic s;
    int   e;
    s = pos ? 1'b0 : 1'($urandom);
    e = emin + int'($urandom % 32'(emax - emin + 1));
    return {s, 8'(e), 23'($urandom)};
  endfunction

  // Distance in units of the last place between two singles of equal sign.
  function automatic int ulp_diff(input logic [31:0] a, input logic [31:0] b);
    int d;
    if (a[31] != b[31]) return (a[30:0] == 0 && b[30:0] == 0) ? 0 : 1 << 30;
    d = int'(a[30:0]) - int'(b[30:0]);
    return d < 0 ? -d : d;
  endfunction

endpackage
