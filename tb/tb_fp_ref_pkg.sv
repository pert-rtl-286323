// tb_fp_ref_pkg: reference arithmetic for the floating point testbenches.
//
// Converts IEEE-754 single precision bit patterns to and from SystemVerilog
// real (double) values by hand, truncating toward zero on the way back and
// flushing results below the normal range to zero, which is the rounding
// policy of the FPU under test. Sums, differences and products of the
// operands the testbenches draw are exact in double precision, so the
// truncated double result is the exact truncated single result.
package tb_fp_ref_pkg;

  function automatic real sp2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2sp(input real r);
    logic [63:0] d;
    int e;
    if (r == 0.0) return 32'd0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // random normal number with exponent in [lo, hi]
  function automatic logic [31:0] rnd_sp(input int lo, input int hi);
    logic [31:0] f;
    f[31]    = 1'($urandom_range(0, 1));
    f[30:23] = 8'($urandom_range(lo, hi));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

endpackage
