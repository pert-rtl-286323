// fpu: the floating point unit that sits on each processor's 16 bit SJBUS.
//
// Two subunits run concurrently: an ALU (add, subtract, compare, divide,
// convert) and a multiplier. Each has 32 bit A and B input registers that
// the bus loads 16 bits at a time, a C result register the bus reads 16 bits
// at a time, and an 8 bit command register. One 16 bit bus write loads both
// command registers at once (ALU command in bits 7:0, MUL command in bits
// 15:8); loading a non-zero function code starts that subunit.
// The two top bits of a command route the result, in the same cycle it
// lands in C, back into input registers:
//   ALU: bit6 C_ALU->A_ALU, bit7 C_ALU->B_MUL
//   MUL: bit6 C_MUL->A_MUL, bit7 C_MUL->B_ALU
// These are the four data paths of the unit; there is no C_MUL->A_ALU path.
// The status register holds the ALU compare code (0 '=', 1 '<', 2 '>') and
// the exception flags of both subunits; the extended status register derives
// =, <, >, !=, <=, >= from the compare code.
// Bus side: reg/we/wdata/rdata with a combinational ready. Reading C, the
// status registers, or an input register a running operation may write
// back into, or writing a command for a busy subunit (or for one whose
// operand register a pending transfer will still load), holds ready low
// until the subunit is done, so a program never reads or uses a stale value.
// Register map: pert_pkg FR_*. Taken from the description: register set,
// widths, the command byte layout and transfer encoding, the four paths and
// the compare codes. This design's own: function codes, flag bit positions,
// the bus interlock, and which transfer wins a same-cycle bus write (the
// transfer does).
module fpu
  import pert_pkg::*;
#(
  parameter int unsigned ALU_LAT = 6,
  parameter int unsigned DIV_LAT = 31,
  parameter int unsigned MUL_LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,      // bus cycle addressed to the FPU
  input  logic        we,
  input  logic [3:0]  regno,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ready,
  // observation of the feedback paths (for test and performance counting)
  output logic [3:0]  xfer_used
);
  fp32_t a_alu, b_alu, a_mul, b_mul, c_alu, c_mul;
  logic [7:0] cmd_alu, cmd_mul;
  logic [15:0] status;

  logic      alu_busy, alu_done, mul_busy, mul_done;
  fp32_t     alu_y, mul_y;
  cmp_code_e alu_code;
  fp_flags_t alu_f, mul_f;

  logic wr, cmd_wr;
  logic start_alu, start_mul;
  always_comb begin
    wr        = sel && we && ready;
    cmd_wr    = wr && (regno == FR_CMD);
    start_alu = cmd_wr && (wdata[5:0] != 6'd0);
    start_mul = cmd_wr && (wdata[13:8] != 6'd0);
  end

  fpu_alu #(.LAT(ALU_LAT), .DIV_LAT(DIV_LAT)) u_alu (
    .clk, .rst_n, .start(start_alu), .func(alu_func_e'(wdata[5:0])),
    .a(a_alu), .b(b_alu), .busy(alu_busy), .done(alu_done),
    .y(alu_y), .code(alu_code), .flags(alu_f));

  fpu_mul #(.LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .start(start_mul), .func(mul_func_e'(wdata[13:8])),
    .a(a_mul), .b(b_mul), .busy(mul_busy), .done(mul_done),
    .y(mul_y), .flags(mul_f));

  // a subunit's result is pending until the cycle after done
  logic alu_pend, mul_pend;
  always_comb begin
    alu_pend = alu_busy || alu_done;
    mul_pend = mul_busy || mul_done;
  end

  always_comb begin
    ready = 1'b1;
    if (sel) begin
      unique case (regno)
        FR_C_ALU_LO, FR_C_ALU_HI,
        FR_A_ALU_LO, FR_A_ALU_HI,
        FR_B_MUL_LO, FR_B_MUL_HI:  ready = we || !alu_pend;
        FR_C_MUL_LO, FR_C_MUL_HI,
        FR_A_MUL_LO, FR_A_MUL_HI,
        FR_B_ALU_LO, FR_B_ALU_HI:  ready = we || !mul_pend;
        FR_STATUS, FR_XSTATUS:     ready = !alu_pend && !mul_pend;
        // a start waits for its own subunit and for any transfer still
        // on its way into that subunit's operand registers
        FR_CMD: if (we)            ready = !(wdata[5:0] != 6'd0 &&
                                             (alu_busy || (alu_pend && cmd_alu[6]) ||
                                              (mul_pend && cmd_mul[7])))
                                        && !(wdata[13:8] != 6'd0 &&
                                             (mul_busy || (mul_pend && cmd_mul[6]) ||
                                              (alu_pend && cmd_alu[7])));
        default:                   ready = 1'b1;
      endcase
    end
  end

  // extended status from the compare code
  logic [15:0] xstatus;
  always_comb begin
    xstatus = '0;
    xstatus[0] = (status[1:0] == CMP_EQ);
    xstatus[1] = (status[1:0] == CMP_LT);
    xstatus[2] = (status[1:0] == CMP_GT);
    xstatus[3] = (status[1:0] != CMP_EQ);
    xstatus[4] = (status[1:0] == CMP_EQ) || (status[1:0] == CMP_LT);
    xstatus[5] = (status[1:0] == CMP_EQ) || (status[1:0] == CMP_GT);
  end

  always_comb begin
    unique case (regno)
      FR_A_ALU_LO: rdata = a_alu[15:0];
      FR_A_ALU_HI: rdata = a_alu[31:16];
      FR_B_ALU_LO: rdata = b_alu[15:0];
      FR_B_ALU_HI: rdata = b_alu[31:16];
      FR_A_MUL_LO: rdata = a_mul[15:0];
      FR_A_MUL_HI: rdata = a_mul[31:16];
      FR_B_MUL_LO: rdata = b_mul[15:0];
      FR_B_MUL_HI: rdata = b_mul[31:16];
      FR_C_ALU_LO: rdata = c_alu[15:0];
      FR_C_ALU_HI: rdata = c_alu[31:16];
      FR_C_MUL_LO: rdata = c_mul[15:0];
      FR_C_MUL_HI: rdata = c_mul[31:16];
      FR_CMD:      rdata = {14'd0, mul_pend, alu_pend};
      FR_STATUS:   rdata = status;
      FR_XSTATUS:  rdata = xstatus;
      default:     rdata = 16'd0;
    endcase
  end

  logic alu_writes_c;
  always_comb alu_writes_c = alu_done && (cmd_alu[5:0] != ALU_CMP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_alu <= '0; b_alu <= '0; a_mul <= '0; b_mul <= '0; c_alu <= '0; c_mul <= '0;
      cmd_alu <= '0; cmd_mul <= '0; status <= '0; xfer_used <= '0;
    end else begin
      xfer_used <= '0;
      // bus writes
      if (wr) begin
        unique case (regno)
          FR_A_ALU_LO: a_alu[15:0]  <= wdata;
          FR_A_ALU_HI: a_alu[31:16] <= wdata;
          FR_B_ALU_LO: b_alu[15:0]  <= wdata;
          FR_B_ALU_HI: b_alu[31:16] <= wdata;
          FR_A_MUL_LO: a_mul[15:0]  <= wdata;
          FR_A_MUL_HI: a_mul[31:16] <= wdata;
          FR_B_MUL_LO: b_mul[15:0]  <= wdata;
          FR_B_MUL_HI: b_mul[31:16] <= wdata;
          FR_CMD: begin
            if (wdata[5:0]  != 6'd0) cmd_alu <= wdata[7:0];
            if (wdata[13:8] != 6'd0) cmd_mul <= wdata[15:8];
          end
          default: ;
        endcase
      end
      // results and the feedback paths (override same-cycle bus writes)
      if (alu_done) begin
        status[1:0] <= (cmd_alu[5:0] == ALU_CMP) ? alu_code : status[1:0];
        status[7:4] <= alu_f;
        if (alu_writes_c) begin
          c_alu <= alu_y;
          if (cmd_alu[6]) begin a_alu <= alu_y; xfer_used[0] <= 1'b1; end
          if (cmd_alu[7]) begin b_mul <= alu_y; xfer_used[1] <= 1'b1; end
        end
      end
      if (mul_done) begin
        c_mul        <= mul_y;
        status[11:8] <= mul_f;
        if (cmd_mul[6]) begin a_mul <= mul_y; xfer_used[2] <= 1'b1; end
        if (cmd_mul[7]) begin b_alu <= mul_y; xfer_used[3] <= 1'b1; end
      end
    end
  end

  // a command is never accepted for a busy subunit
  a_no_restart_alu: assert property (@(posedge clk) disable iff (!rst_n)
                                     start_alu |-> !alu_busy);
  a_no_restart_mul: assert property (@(posedge clk) disable iff (!rst_n)
                                     start_mul |-> !mul_busy);
endmodule
