// tb_fpu_mul: self-checking test of the floating point multiplier subunit.
//
// Random products are compared with exact double precision products
// truncated to single precision; the 6-cycle latency, a start while busy,
// zero, overflow, underflow and inf*0 are checked.
module tb_fpu_mul;
  import pert_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      start;
  mul_func_e func;
  fp32_t     a, b, y;
  logic      busy, done;
  fp_flags_t flags;
  int checks = 0, failures = 0;

  fpu_mul dut (.clk, .rst_n, .start, .func, .a, .b, .busy, .done, .y, .flags);

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

  task automatic run(input fp32_t ia, input fp32_t ib, output int lat);
    @(negedge clk);
    func = MUL_MUL; a = ia; b = ib; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  initial begin
    int lat;
    fp32_t x, z, expv;
    start = 1'b0; func = MUL_NOP; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      x = rnd_sp(64, 190); z = rnd_sp(64, 190);
      run(x, z, lat);
      expv = r2sp(sp2r(x) * sp2r(z));
      check($sformatf("mul %h*%h got %h exp %h", x, z, y, expv), y == expv);
      check($sformatf("mul latency %0d", lat), lat == 6);
    end
    // a second start while busy is ignored: result stays that of the first
    @(negedge clk); a = 32'h4000_0000; b = 32'h4040_0000; func = MUL_MUL; start = 1'b1;
    @(negedge clk); a = 32'h4100_0000; b = 32'h4100_0000;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    check("start while busy ignored (2*3=6)", y == 32'h40C0_0000);
    run(32'h0000_0000, 32'h4000_0000, lat);   check("0*2 = 0", y == 32'd0);
    run(32'h7F00_0000, 32'h7F00_0000, lat);   check("overflow", y == 32'h7F80_0000 && flags.overflow);
    run(32'h0080_0000, 32'h0080_0000, lat);   check("underflow", y == 32'd0 && flags.underflow);
    run(32'h7F80_0000, 32'h0000_0000, lat);   check("inf*0 = NaN", y == FP_QNAN && flags.invalid);
    run(32'hC000_0000, 32'h4000_0000, lat);   check("-2*2 = -4", y == 32'hC080_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
