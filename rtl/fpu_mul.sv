// fpu_mul: the floating point multiplier subunit of a processor's FPU (the
// part built around a WTL1164 multiplier in the original design).
//
// A pulse on start with func = MUL_MUL latches A and B; LAT cycles later done
// pulses for one cycle with y = A * B and the exception flags. busy is high
// in between. The 360 ns multiply time of the chip is 6 cycles of the FPU's
// 60 ns clock. Truncating arithmetic is this design's choice. A start while
// busy is ignored.
module fpu_mul
  import pert_pkg::*;
#(
  parameter int unsigned LAT = 6
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  mul_func_e func,
  input  fp32_t     a,
  input  fp32_t     b,
  output logic      busy,
  output logic      done,
  output fp32_t     y,
  output fp_flags_t flags
);
  fp32_t      ra, rb;
  logic [5:0] cnt;
  fp32_t      p;
  fp_flags_t  pf;

  fp_mul_core u_core (.a(ra), .b(rb), .y(p), .flags(pf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra <= '0; rb <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; y <= '0; flags <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy && func == MUL_MUL) begin
        ra   <= a;
        rb   <= b;
        busy <= 1'b1;
        cnt  <= 6'd1;
      end else if (busy) begin
        cnt <= cnt + 6'd1;
        if (cnt == 6'(LAT)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          y     <= p;
          flags <= pf;
        end
      end
    end
  end
endmodule
