// tb_fpu_alu: self-checking test of the floating point ALU subunit.
//
// Random operands for add, subtract, compare, divide and both conversions
// are compared with double precision results truncated to single precision;
// every operation's latency (6 cycles, 31 for divide) is checked; special
// cases cover cancellation, division by zero and NaN compare.
module tb_fpu_alu;
  import pert_pkg::*;
  import tb_fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      start;
  alu_func_e func;
  fp32_t     a, b, y;
  logic      busy, done;
  cmp_code_e code;
  fp_flags_t flags;
  int checks = 0, failures = 0;

  fpu_alu dut (.clk, .rst_n, .start, .func, .a, .b, .busy, .done, .y, .code, .flags);

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input alu_func_e f, input fp32_t ia, input fp32_t ib, output int lat);
    @(negedge clk);
    func = f; a = ia; b = ib; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int lat;
    fp32_t x, z, expv;
    real rx, rz;
    int ix;
    cmp_code_e ec;
    start = 1'b0; func = ALU_NOP; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 150; n++) begin
      x = rnd_sp(120, 134); z = rnd_sp(120, 134);
      rx = sp2r(x); rz = sp2r(z);
      run(ALU_ADD, x, z, lat);
      expv = r2sp(rx + rz);
      check($sformatf("add %h+%h got %h exp %h", x, z, y, expv), y == expv);
      check($sformatf("add latency %0d", lat), lat == 6);
      run(ALU_SUB, x, z, lat);
      expv = r2sp(rx - rz);
      check($sformatf("sub %h-%h got %h exp %h", x, z, y, expv), y == expv);
      run(ALU_DIV, x, z, lat);
      expv = r2sp(rx / rz);
      check($sformatf("div %h/%h got %h exp %h", x, z, y, expv), y == expv);
      check($sformatf("div latency %0d", lat), lat == 31);
      run(ALU_CMP, x, (n % 5 == 0) ? x : z, lat);
      ec = (n % 5 == 0) ? CMP_EQ : (rx < rz) ? CMP_LT : (rx > rz) ? CMP_GT : CMP_EQ;
      check($sformatf("cmp %h ? %h got %0d exp %0d", x, z, code, ec), code == ec);
      ix = int'($urandom) >>> $urandom_range(0, 30);
      run(ALU_FLT, fp32_t'(ix), '0, lat);
      expv = r2sp(real'(ix));
      check($sformatf("float(%0d) got %h exp %h", ix, y, expv), y == expv);
      x = rnd_sp(100, 157);
      run(ALU_FIX, x, '0, lat);
      check($sformatf("fix(%h) got %0d exp %0d", x, $signed(y), $rtoi(sp2r(x))), $signed(y) == $rtoi(sp2r(x)));
    end
    // special cases
    run(ALU_SUB, 32'h3FC0_0000, 32'h3FC0_0000, lat);
    check("x-x = +0", y == 32'd0);
    run(ALU_DIV, 32'h3F80_0000, 32'h0000_0000, lat);
    check("1/0 = inf, div_zero", y == 32'h7F80_0000 && flags.div_zero);
    run(ALU_CMP, FP_QNAN, 32'h3F80_0000, lat);
    check("NaN compare unordered", code == CMP_UN && flags.invalid);
    run(ALU_ADD, 32'h7F7F_FFFF, 32'h7F7F_FFFF, lat);
    check("overflow to inf", y == 32'h7F80_0000 && flags.overflow);
    run(ALU_CMP, 32'h8000_0000, 32'h0000_0000, lat);
    check("-0 == +0", code == CMP_EQ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
