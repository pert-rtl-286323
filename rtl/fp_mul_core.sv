// fp_mul_core: combinational IEEE-754 single precision multiply.
//
// Multiplies the two 24 bit significands into a 48 bit product, normalises
// by at most one place and truncates the fraction (round toward zero).
// Denormal inputs count as zero; results below the normal range flush to
// zero, results above it become infinity. NaN in, or 0 * inf, gives the
// quiet NaN. The rounding and denormal policy are this design's choice.
module fp_mul_core
  import pert_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  output fp32_t     y,
  output fp_flags_t flags
);
  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic [47:0] p;
  logic signed [10:0] e;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 23'd0);
    p = ma * mb;
    e = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127 + (p[47] ? 11'sd1 : 11'sd0);

    flags = '0;
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
      flags.invalid = 1'b1;
    end else if (a_inf || b_inf) begin
      y = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 31'd0};
    end else if (e >= 11'sd255) begin
      y = {s, 8'hFF, 23'd0};
      flags.overflow = 1'b1;
    end else if (e <= 11'sd0) begin
      y = {s, 31'd0};
      flags.underflow = 1'b1;
    end else begin
      y = {s, e[7:0], p[47] ? p[46:24] : p[45:23]};
    end
  end
endmodule
