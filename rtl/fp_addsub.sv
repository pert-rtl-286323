// fp_addsub: combinational IEEE-754 single precision add / subtract.
//
// Computes a + b (sub=0) or a - b (sub=1). The smaller operand is aligned
// into a 50 bit window with a sticky bit, the magnitudes are added or
// subtracted, the sum is renormalised with a leading-zero count and the
// fraction is truncated (round toward zero). Denormal inputs are read as
// zero and results below the normal range flush to zero. NaN in, or
// inf - inf, gives the quiet NaN 0x7FC00000. Rounding mode and denormal
// handling are this design's choice; the floating point ALU it serves is
// only specified to add and subtract in single precision.
module fp_addsub
  import pert_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  input  logic      sub,
  output fp32_t     y,
  output fp_flags_t flags
);
  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [7:0]  d;
  logic [49:0] wx, wy, wy_sh;
  logic        sticky;
  logic [50:0] sum;
  logic [5:0]  lz;
  logic        found;
  logic [50:0] norm;
  logic signed [9:0] e_res;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_nan = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 23'd0);

    // x is the operand of larger magnitude
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    if (ex == 8'd0) ex = 8'd1;          // zero operands: keep exponent arithmetic sane
    if (ey == 8'd0) ey = ex;
    d  = ex - ey;
    wx = {mx, 26'd0};
    wy = {my, 26'd0};
    if (d >= 8'd50) begin
      wy_sh  = 50'd0;
      sticky = (my != 24'd0);
    end else begin
      wy_sh  = wy >> d;
      sticky = ((wy_sh << d) != wy);
    end
    wy_sh[0] = wy_sh[0] | sticky;

    if (sx == sy) sum = {1'b0, wx} + {1'b0, wy_sh};
    else          sum = {1'b0, wx} - {1'b0, wy_sh};

    lz    = 6'd0;
    found = 1'b0;
    for (int i = 50; i >= 0; i--) begin
      if (!found && sum[i]) begin
        found = 1'b1;
        lz    = 6'(50 - i);
      end
    end
    norm  = sum << lz;
    // sum bit 49 corresponds to 2^ex (hidden bit position); bit 50 is a carry
    e_res = $signed({2'b00, ex}) + 10'sd1 - $signed({4'b0000, lz});

    flags = '0;
    y     = {sx, 8'd0, 23'd0};
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP_QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (!found) begin
      y = 32'd0;                          // exact cancellation gives +0
    end else if (e_res >= 10'sd255) begin
      y = {sx, 8'hFF, 23'd0};
      flags.overflow = 1'b1;
    end else if (e_res <= 10'sd0) begin
      y = {sx, 31'd0};
      flags.underflow = 1'b1;
    end else begin
      y = {sx, e_res[7:0], norm[49:27]};
    end
  end
endmodule
