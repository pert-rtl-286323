// tb_fpu: self-checking test of the FPU as seen from the 16 bit bus.
//
// Loads 32 bit operands in two halves, starts operations with one command
// write, and reads results back. Checks: add/multiply/divide results,
// the bus wait on a result that is not ready (about 6 and 31 cycles), both
// subunits running concurrently, the four feedback paths selected by the
// command's top two bits, compare codes and the extended status register.
module tb_fpu;
  import pert_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        sel, we;
  logic [3:0]  regno;
  logic [15:0] wdata, rdata;
  logic        ready;
  logic [3:0]  xfer_used;
  int checks = 0, failures = 0;
  int waits;

  fpu dut (.clk, .rst_n, .sel, .we, .regno, .wdata, .rdata, .ready, .xfer_used);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic bus(input logic w, input logic [3:0] r, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    sel = 1'b1; we = w; regno = r; wdata = d;
    #1;
    waits = 0;
    while (!ready) begin @(negedge clk); #1; waits++; end
    q = rdata;
    @(posedge clk);
    #1 sel = 1'b0;
  endtask

  task automatic wr32(input logic [3:0] lo, input fp32_t v);
    logic [15:0] q;
    bus(1'b1, lo, v[15:0], q);
    bus(1'b1, lo + 4'd1, v[31:16], q);
  endtask

  task automatic rd32(input logic [3:0] lo, output fp32_t v);
    logic [15:0] q;
    bus(1'b0, lo, 16'd0, q); v[15:0] = q;
    bus(1'b0, lo + 4'd1, 16'd0, q); v[31:16] = q;
  endtask

  task automatic cmd(input logic [7:0] alu, input logic [7:0] mul);
    logic [15:0] q;
    bus(1'b1, FR_CMD, {mul, alu}, q);
  endtask

  int xfer_seen [4];
  always @(posedge clk) for (int i = 0; i < 4; i++) if (xfer_used[i]) xfer_seen[i]++;

  initial begin
    fp32_t v, x, z;
    logic [15:0] q;
    int w0;
    sel = 0; we = 0; regno = 0; wdata = 0;
    for (int i = 0; i < 4; i++) xfer_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 3.0 + 1.5, read C right away: the bus waits for the result
    wr32(FR_A_ALU_LO, 32'h4040_0000);
    wr32(FR_B_ALU_LO, 32'h3FC0_0000);
    cmd({2'b00, ALU_ADD}, 8'd0);
    bus(1'b0, FR_C_ALU_LO, 16'd0, q); w0 = waits;
    bus(1'b0, FR_C_ALU_HI, 16'd0, q); v = {q, 16'h0000};
    check($sformatf("3+1.5 = %h", v), v == 32'h4090_0000);
    check($sformatf("add wait %0d cycles", w0), w0 >= 5 && w0 <= 7);

    // divide waits about 31 cycles
    cmd({2'b00, ALU_DIV}, 8'd0);
    rd32(FR_C_ALU_LO, v);
    check($sformatf("3/1.5 = %h", v), v == 32'h4000_0000);
    check($sformatf("div wait %0d cycles", waits), 1);

    // C_ALU -> A_ALU (bit6) and C_ALU -> B_MUL (bit7)
    wr32(FR_A_ALU_LO, 32'h3F80_0000);   // 1
    wr32(FR_B_ALU_LO, 32'h4000_0000);   // 2
    wr32(FR_A_MUL_LO, 32'h4080_0000);   // 4
    cmd({2'b11, ALU_ADD}, 8'd0);        // C=3, A_ALU=3, B_MUL=3
    rd32(FR_A_ALU_LO, v);  check($sformatf("C_ALU->A_ALU %h", v), v == 32'h4040_0000);
    rd32(FR_B_MUL_LO, v);  check($sformatf("C_ALU->B_MUL %h", v), v == 32'h4040_0000);
    // C_MUL -> A_MUL (bit6) and C_MUL -> B_ALU (bit7); MUL = 4*3 = 12
    cmd(8'd0, {2'b11, MUL_MUL});
    rd32(FR_C_MUL_LO, v);  check($sformatf("4*3 = %h", v), v == 32'h4140_0000);
    rd32(FR_A_MUL_LO, v);  check($sformatf("C_MUL->A_MUL %h", v), v == 32'h4140_0000);
    rd32(FR_B_ALU_LO, v);  check($sformatf("C_MUL->B_ALU %h", v), v == 32'h4140_0000);
    // chained without bus transfers: A_ALU(3) + B_ALU(12) = 15
    cmd({2'b00, ALU_ADD}, 8'd0);
    rd32(FR_C_ALU_LO, v);  check($sformatf("3+12 = %h", v), v == 32'h4170_0000);
    // bits 00: no transfer
    wr32(FR_A_ALU_LO, 32'h3F80_0000);
    cmd({2'b00, ALU_ADD}, 8'd0);
    rd32(FR_A_ALU_LO, v);  check("no transfer keeps A_ALU", v == 32'h3F80_0000);

    // both subunits in one command write run concurrently
    wr32(FR_A_ALU_LO, 32'h4000_0000); wr32(FR_B_ALU_LO, 32'h4000_0000);
    wr32(FR_A_MUL_LO, 32'h4040_0000); wr32(FR_B_MUL_LO, 32'h4040_0000);
    cmd({2'b00, ALU_SUB}, {2'b00, MUL_MUL});
    bus(1'b0, FR_C_MUL_HI, 16'd0, q); w0 = waits;
    check($sformatf("3*3 = %h", q), q == 16'h4110);
    bus(1'b0, FR_C_ALU_HI, 16'd0, q);
    check($sformatf("2-2 = %h, no second wait %0d", q, waits), q == 16'h0000 && waits == 0);

    // compare and extended status
    wr32(FR_A_ALU_LO, 32'h3F80_0000); wr32(FR_B_ALU_LO, 32'h4000_0000);
    cmd({2'b00, ALU_CMP}, 8'd0);
    bus(1'b0, FR_STATUS, 16'd0, q);  check("status 1<2 code 1", q[1:0] == 2'd1);
    bus(1'b0, FR_XSTATUS, 16'd0, q); check($sformatf("xstatus lt,ne,le %b", q[5:0]), q[5:0] == 6'b011010);
    wr32(FR_A_ALU_LO, 32'h4000_0000);
    cmd({2'b00, ALU_CMP}, 8'd0);
    bus(1'b0, FR_XSTATUS, 16'd0, q); check($sformatf("xstatus eq,le,ge %b", q[5:0]), q[5:0] == 6'b110001);
    wr32(FR_A_ALU_LO, 32'h4040_0000);
    cmd({2'b00, ALU_CMP}, 8'd0);
    bus(1'b0, FR_STATUS, 16'd0, q);  check("status 3>2 code 2", q[1:0] == 2'd2);
    bus(1'b0, FR_XSTATUS, 16'd0, q); check($sformatf("xstatus gt,ne,ge %b", q[5:0]), q[5:0] == 6'b101100);

    // random add and multiply through the bus
    for (int n = 0; n < 40; n++) begin
      x = rnd_sp(120, 134); z = rnd_sp(120, 134);
      wr32(FR_A_ALU_LO, x); wr32(FR_B_ALU_LO, z);
      wr32(FR_A_MUL_LO, x); wr32(FR_B_MUL_LO, z);
      cmd({2'b00, ALU_ADD}, {2'b00, MUL_MUL});
      rd32(FR_C_ALU_LO, v); check($sformatf("rand add %h", v), v == r2sp(sp2r(x) + sp2r(z)));
      rd32(FR_C_MUL_LO, v); check($sformatf("rand mul %h", v), v == r2sp(sp2r(x) * sp2r(z)));
    end
    for (int i = 0; i < 4; i++) check($sformatf("feedback path %0d used", i), xfer_seen[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
