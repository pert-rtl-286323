// fp_cmp: combinational IEEE-754 single precision comparison.
//
// Returns the code of a compared with b: CMP_EQ, CMP_LT, CMP_GT, or CMP_UN
// when either operand is a NaN. +0 and -0 compare equal. The three codes
// 0, 1, 2 for '=', '<', '>' follow the description of the FPU status
// register; the unordered code 3 is this design's addition.
module fp_cmp
  import pert_pkg::*;
(
  input  fp32_t     a,
  input  fp32_t     b,
  output cmp_code_e code
);
  logic a_nan, b_nan;
  logic [31:0] ka, kb;   // keys that order like the real numbers

  always_comb begin
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    ka = a[31] ? ~a : {1'b1, a[30:0]};
    kb = b[31] ? ~b : {1'b1, b[30:0]};
    if (a[30:0] == 31'd0) ka = 32'h8000_0000;
    if (b[30:0] == 31'd0) kb = 32'h8000_0000;
    if (a_nan || b_nan) code = CMP_UN;
    else if (ka == kb)  code = CMP_EQ;
    else if (ka < kb)   code = CMP_LT;
    else                code = CMP_GT;
  end
endmodule
