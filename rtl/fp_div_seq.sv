// fp_div_seq: sequential IEEE-754 single precision divider, y = a / b.
//
// A restoring divider that produces one quotient bit per clock: a pulse on
// start latches the operands, 26 quotient bits follow in 26 cycles, and done
// pulses for one cycle, 27 cycles after start, with the result (fraction truncated toward zero).
// x/0 gives infinity with div_zero set, 0/0, inf/inf and NaN give the quiet
// NaN. The floating point ALU is described as dividing in 1.86 us (31 cycles
// of its 60 ns clock); the bit-serial method is this design's choice and fits
// in that time, the ALU pads the rest.
module fp_div_seq
  import pert_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  fp32_t     a,
  input  fp32_t     b,
  output logic      done,
  output fp32_t     y,
  output fp_flags_t flags
);
  logic [25:0] rem;      // partial remainder, < 2*divisor
  logic [23:0] dvs;
  logic [25:0] q;
  logic [4:0]  cnt;
  logic        busy;
  logic        fin;     // last quotient bit taken
  logic        s;
  logic signed [9:0] e0;
  logic        special;
  fp32_t       special_y;
  fp_flags_t   special_f;

  // special cases are decided from the operands at start
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  always_comb begin
    a_nan  = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    a_zero = (a[30:23] == 8'd0);
    b_zero = (b[30:23] == 8'd0);
  end

  logic [25:0] rem_sub;
  logic        ge;
  always_comb begin
    ge      = (rem >= {2'b00, dvs});
    rem_sub = ge ? rem - {2'b00, dvs} : rem;
  end

  logic signed [9:0] e_fin;
  always_comb e_fin = q[25] ? e0 : e0 - 10'sd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; fin <= 1'b0; cnt <= '0; rem <= '0; dvs <= '0; q <= '0;
      s <= 1'b0; e0 <= '0; special <= 1'b0; special_y <= '0; special_f <= '0;
      y <= '0; flags <= '0;
    end else begin
      fin  <= 1'b0;
      done <= fin;
      if (start) begin
        busy      <= 1'b1;
        cnt       <= 5'd0;
        s         <= a[31] ^ b[31];
        e0        <= $signed({2'b00, a[30:23]}) - $signed({2'b00, b[30:23]}) + 10'sd127;
        rem       <= {2'b00, 1'b1, a[22:0]};
        dvs       <= {1'b1, b[22:0]};
        q         <= '0;
        special_f <= '0;
        special   <= 1'b1;
        if (a_nan || b_nan || (a_inf && b_inf) || (a_zero && b_zero)) begin
          special_y <= FP_QNAN;
          special_f <= '{invalid: 1'b1, default: 1'b0};
        end else if (a_inf) begin
          special_y <= {a[31] ^ b[31], 8'hFF, 23'd0};
        end else if (b_zero) begin
          special_y <= {a[31] ^ b[31], 8'hFF, 23'd0};
          special_f <= '{div_zero: 1'b1, default: 1'b0};
        end else if (a_zero || b_inf) begin
          special_y <= {a[31] ^ b[31], 31'd0};
        end else begin
          special   <= 1'b0;
        end
      end else if (busy) begin
        q   <= {q[24:0], ge};
        rem <= {rem_sub[24:0], 1'b0};
        cnt <= cnt + 5'd1;
        if (cnt == 5'd25) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end
      end
      // result is formed one cycle after the last quotient bit
      if (fin) begin
        flags <= '0;
        if (special) begin
          y     <= special_y;
          flags <= special_f;
        end else if (e_fin >= 10'sd255) begin
          y <= {s, 8'hFF, 23'd0};
          flags.overflow <= 1'b1;
        end else if (e_fin <= 10'sd0) begin
          y <= {s, 31'd0};
          flags.underflow <= 1'b1;
        end else begin
          y <= {s, e_fin[7:0], q[25] ? q[24:2] : q[23:1]};
        end
      end
    end
  end
endmodule
