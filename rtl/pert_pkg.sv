// pert_pkg: types and constants shared by the PERT ray tracing engine.
//
// Holds the IEEE-754 single precision helpers used by the floating point
// unit, the FPU command encoding (2 transfer bits + 6 function bits per
// subunit), the I/O register map of a processor node on its 16 bit SJBUS,
// and the broadcast bus bundle of the multi-PERT configuration.
// The transfer-bit meanings come from the description of the FPU; the
// function codes, the I/O map and the broadcast bus signals are choices of
// this implementation.
package pert_pkg;

  // ---------------------------------------------------------------- FPU
  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_QNAN = 32'h7FC0_0000;

  // ALU (adder/converter/divider) function codes, low 6 bits of the ALU
  // command byte. Code 0 leaves the subunit idle.
  typedef enum logic [5:0] {
    ALU_NOP = 6'd0,
    ALU_ADD = 6'd1,   // C = A + B
    ALU_SUB = 6'd2,   // C = A - B
    ALU_CMP = 6'd3,   // status = compare(A, B), C unchanged
    ALU_DIV = 6'd4,   // C = A / B
    ALU_FLT = 6'd5,   // C = float(signed int32 A)
    ALU_FIX = 6'd6    // C = int32(A), truncated toward zero, saturated
  } alu_func_e;

  // Multiplier function codes, low 6 bits of the MUL command byte.
  typedef enum logic [5:0] {
    MUL_NOP = 6'd0,
    MUL_MUL = 6'd1    // C = A * B
  } mul_func_e;

  // Compare result codes held in the status register: 0 '=', 1 '<', 2 '>'.
  typedef enum logic [1:0] {
    CMP_EQ  = 2'd0,
    CMP_LT  = 2'd1,
    CMP_GT  = 2'd2,
    CMP_UN  = 2'd3    // unordered (a NaN operand)
  } cmp_code_e;

  // Exception flags of one subunit.
  typedef struct packed {
    logic underflow;
    logic overflow;
    logic div_zero;
    logic invalid;
  } fp_flags_t;

  // FPU register numbers as seen from SJBUS (16 bit halves of 32 bit regs).
  localparam logic [3:0] FR_A_ALU_LO = 4'd0,  FR_A_ALU_HI = 4'd1;
  localparam logic [3:0] FR_B_ALU_LO = 4'd2,  FR_B_ALU_HI = 4'd3;
  localparam logic [3:0] FR_A_MUL_LO = 4'd4,  FR_A_MUL_HI = 4'd5;
  localparam logic [3:0] FR_B_MUL_LO = 4'd6,  FR_B_MUL_HI = 4'd7;
  localparam logic [3:0] FR_C_ALU_LO = 4'd8,  FR_C_ALU_HI = 4'd9;
  localparam logic [3:0] FR_C_MUL_LO = 4'd10, FR_C_MUL_HI = 4'd11;
  localparam logic [3:0] FR_CMD      = 4'd12; // w: [7:0] ALU cmd, [15:8] MUL cmd; r: busy
  localparam logic [3:0] FR_STATUS   = 4'd13;
  localparam logic [3:0] FR_XSTATUS  = 4'd14;

  // ----------------------------------------------------- node I/O space
  // I/O addresses (SJBUS cycles with io=1). Memory cycles use io=0.
  localparam logic [15:0] IO_FPU_BASE   = 16'h0000; // 0x00..0x0F
  localparam logic [15:0] IO_OUT_DATA   = 16'h0010; // w: write word at out ptr, ptr++ ; r: read back
  localparam logic [15:0] IO_OUT_STATUS = 16'h0011; // r: bit0 = output can accept
  localparam logic [15:0] IO_OUT_COMMIT = 16'h0012; // w: hand the filled buffer over, ptr = 0
  localparam logic [15:0] IO_OUT_PTR    = 16'h0013; // w: set out ptr
  localparam logic [15:0] IO_IN_DATA    = 16'h0014; // r: read word at in ptr, ptr++ (FIFO: pop)
  localparam logic [15:0] IO_IN_STATUS  = 16'h0015; // r: bit0 = input has data
  localparam logic [15:0] IO_IN_RELEASE = 16'h0016; // w: give the input buffer back, ptr = 0
  localparam logic [15:0] IO_IN_PTR     = 16'h0017; // w: set in ptr
  localparam logic [15:0] IO_BIC_ID     = 16'h0020; // 0x20..0x27 w: ID register i (bit15 clear = free)
  localparam logic [15:0] IO_BIC_DATA   = 16'h0028; // r: pop one packet data word
  localparam logic [15:0] IO_BIC_STATUS = 16'h0029; // r: bit0 data ready, [15:8] words left
  localparam logic [15:0] IO_BIC_PKTID  = 16'h002A; // r: ID of the packet being read

  // ------------------------------------------------------ broadcast bus
  typedef struct packed {
    logic        sync;   // data carries a packet ID
    logic        valid;  // data carries a packet data word
    logic        eop;    // last data word of the packet
    logic [15:0] data;
  } bbus_t;

endpackage
