// fpu_alu: the floating point ALU subunit of a processor's FPU (the part
// built around a WTL1165 floating point ALU in the original design).
//
// A pulse on start with a function code latches the A and B operands. After
// LAT clock cycles (DIV_LAT for a divide) done pulses for one cycle with the
// result on y, the compare code on code and the exception flags. busy is
// high from the cycle after start until done. Functions: add, subtract,
// compare, divide, int->float and float->int (see pert_pkg::alu_func_e).
// The 360 ns add/subtract/convert/compare time and the 1.86 us divide time
// come from the description of the chip set; at the FPU's 60 ns clock they
// are 6 and 31 cycles. The function encoding and the truncating arithmetic
// are this design's choices. A start while busy is ignored.
module fpu_alu
  import pert_pkg::*;
#(
  parameter int unsigned LAT     = 6,   // add/sub/cmp/convert latency, cycles
  parameter int unsigned DIV_LAT = 31   // divide latency, cycles (>= 27)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  alu_func_e func,
  input  fp32_t     a,
  input  fp32_t     b,
  output logic      busy,
  output logic      done,
  output fp32_t     y,
  output cmp_code_e code,
  output fp_flags_t flags
);
  fp32_t     ra, rb;
  alu_func_e rf;
  logic [5:0] cnt;

  fp32_t     add_y, cvt_y, div_y;
  fp_flags_t add_f, cvt_f, div_f;
  cmp_code_e cmp_c;
  logic      div_done;

  fp_addsub u_add (.a(ra), .b(rb), .sub(rf == ALU_SUB), .y(add_y), .flags(add_f));
  fp_cvt    u_cvt (.a(ra), .to_float(rf == ALU_FLT), .y(cvt_y), .flags(cvt_f));
  fp_cmp    u_cmp (.a(ra), .b(rb), .code(cmp_c));
  fp_div_seq u_div (.clk(clk), .rst_n(rst_n), .start(start && !busy && func == ALU_DIV),
                    .a(a), .b(b), .done(div_done), .y(div_y), .flags(div_f));

  logic [5:0] lat_sel;
  always_comb lat_sel = (rf == ALU_DIV) ? 6'(DIV_LAT) : 6'(LAT);

  fp32_t div_hold;
  fp_flags_t div_hold_f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; rf <= ALU_NOP; cnt <= '0; busy <= 1'b0; done <= 1'b0;
      y <= '0; code <= CMP_EQ; flags <= '0; div_hold <= '0; div_hold_f <= '0;
    end else begin
      done <= 1'b0;
      if (div_done) begin
        div_hold   <= div_y;
        div_hold_f <= div_f;
      end
      if (start && !busy && func != ALU_NOP) begin
        ra   <= a;
        rb   <= b;
        rf   <= func;
        busy <= 1'b1;
        cnt  <= 6'd1;
      end else if (busy) begin
        cnt <= cnt + 6'd1;
        if (cnt == lat_sel) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          flags <= '0;
          unique case (rf)
            ALU_ADD, ALU_SUB: begin y <= add_y; flags <= add_f; end
            ALU_CMP:          begin code <= cmp_c; flags.invalid <= (cmp_c == CMP_UN); end
            ALU_DIV:          begin y <= div_hold; flags <= div_hold_f; end
            ALU_FLT, ALU_FIX: begin y <= cvt_y; flags <= cvt_f; end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
