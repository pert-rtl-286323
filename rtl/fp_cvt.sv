// fp_cvt: combinational conversions between signed 32 bit integers and
// IEEE-754 single precision.
//
// to_float=1: y = float(signed int a), fraction truncated toward zero.
// to_float=0: y = int(a), truncated toward zero, saturated to the int32
// range (NaN gives 0 and sets invalid). The floating point ALU is said to
// "convert"; which conversions, and how they round, is this design's choice.
module fp_cvt
  import pert_pkg::*;
(
  input  fp32_t     a,
  input  logic      to_float,
  output fp32_t     y,
  output fp_flags_t flags
);
  logic        s;
  logic [31:0] mag;
  logic [5:0]  msb;
  logic [31:0] norm;
  logic [7:0]  e;
  logic [55:0] shifted;
  logic signed [9:0] sh;

  always_comb begin
    flags = '0;
    y     = 32'd0;
    s     = a[31];
    mag   = 32'd0;
    msb   = 6'd0;
    norm  = 32'd0;
    e     = a[30:23];
    shifted = 56'd0;
    sh    = 10'sd0;
    if (to_float) begin
      mag = s ? (~a + 32'd1) : a;
      for (int i = 0; i < 32; i++) if (mag[i]) msb = 6'(i);
      norm = mag << (6'd31 - msb);
      if (mag == 32'd0) y = 32'd0;
      else              y = {s, 8'(8'd127 + 8'(msb)), norm[30:8]};
    end else begin
      if (e == 8'hFF && a[22:0] != 23'd0) begin
        y = 32'd0;
        flags.invalid = 1'b1;
      end else if (e < 8'd127) begin
        y = 32'd0;
      end else if (e >= 8'd158) begin
        y = s ? 32'h8000_0000 : 32'h7FFF_FFFF;
        flags.overflow = 1'b1;
      end else begin
        // value = 1.f * 2^(e-127); integer part = {1,f} >> (150 - e)
        sh = 10'sd150 - $signed({2'b00, e});
        if (sh >= 0) shifted = {32'd0, 1'b1, a[22:0]} >> sh;
        else         shifted = {32'd0, 1'b1, a[22:0]} << (-sh);
        y = s ? (~shifted[31:0] + 32'd1) : shifted[31:0];
      end
    end
  end
endmodule
