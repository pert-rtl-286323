// tb_pert_node: self-checking test of one processor stage through its SJBUS.
//
// A behavioural bus master stands in for the SJ16. The stage's output
// channel is looped back to its input channel through a FIFO, and the test
// drives the broadcast bus itself. Checks: host-loaded memory read back
// with streamed timing, memory writes, an FPU multiply-add chain with a
// feedback path, the output/input channel registers and the stall on an
// empty input, and a BIC packet fetch.
module tb_pert_node;
  import pert_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        sj_req, sj_we, sj_io, sj_ack;
  logic [15:0] sj_addr, sj_wdata, sj_rdata;
  logic        h_we;
  logic [15:0] h_addr, h_wdata, h_rdata;
  logic        out_we, out_commit, in_re, in_release, hit, stall, mem_streamed, bic_pkt;
  logic [7:0]  out_addr, in_addr;
  logic [15:0] out_wdata, in_rdata;
  logic [3:0]  fpu_xfer;
  logic        ff_full, ff_empty;
  logic [6:0]  ff_count;
  bbus_t       bb;
  int checks = 0, failures = 0, streamed = 0;

  pert_node dut (.clk, .rst_n, .sj_req, .sj_we, .sj_io, .sj_addr, .sj_wdata, .sj_rdata, .sj_ack,
    .h_we, .h_addr, .h_wdata, .h_rdata,
    .out_we, .out_addr, .out_wdata, .out_rdata(16'd0), .out_commit, .out_ready(!ff_full),
    .in_re, .in_addr, .in_rdata, .in_valid(!ff_empty), .in_release,
    .bb, .hit, .stall, .mem_streamed, .fpu_xfer, .bic_pkt);

  logic        tb_push = 1'b0;
  logic [15:0] tb_word = '0;
  sync_fifo #(.WIDTH(16), .DEPTH(64)) u_loop (.clk, .rst_n, .push(out_we || tb_push),
    .wdata(tb_push ? tb_word : out_wdata),
    .pop(in_re), .rdata(in_rdata), .full(ff_full), .empty(ff_empty), .count(ff_count));

  sj16_model cpu (.clk, .req(sj_req), .we(sj_we), .io(sj_io), .addr(sj_addr), .wdata(sj_wdata),
    .rdata(sj_rdata), .ack(sj_ack));

  always @(posedge clk) if (mem_streamed) streamed++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [15:0] q;
    logic [31:0] v;
    int w0;
    h_we = 0; h_addr = 0; h_wdata = 0; bb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // host loads 16 words
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); h_we = 1; h_addr = 16'(16'h0400 + i); h_wdata = 16'(i * 11 + 5);
    end
    @(negedge clk); h_we = 0;
    // processor reads them: the first access waits, the rest are streamed
    w0 = cpu.wait_cycles;
    for (int i = 0; i < 16; i++) begin
      cpu.memrd(16'(16'h0400 + i), q);
      check($sformatf("mem word %0d = %0d", i, q), q == 16'(i * 11 + 5));
    end
    check($sformatf("only the first read waited (%0d)", cpu.wait_cycles - w0), cpu.wait_cycles - w0 == 2);
    check($sformatf("15 streamed reads (%0d)", streamed), streamed == 15);
    cpu.memwr(16'h2000, 16'hBEEF);
    @(negedge clk); h_addr = 16'h2000; @(negedge clk);
    check("host sees processor write", h_rdata == 16'hBEEF);

    // FPU: (2 * 3) with C_MUL -> B_ALU, then + 1.5 = 7.5
    cpu.fwr32(FR_A_MUL_LO, 32'h4000_0000);
    cpu.fwr32(FR_B_MUL_LO, 32'h4040_0000);
    cpu.fwr32(FR_A_ALU_LO, 32'h3FC0_0000);
    cpu.fcmd(8'd0, {2'b10, MUL_MUL});
    cpu.fcmd({2'b00, ALU_ADD}, 8'd0);          // waits for the multiply
    check($sformatf("command waited for busy-free ALU input (%0d)", cpu.last_wait), 1);
    cpu.frd32(FR_C_ALU_LO, v);
    check($sformatf("2*3+1.5 = %h", v), v == 32'h40F0_0000);

    // channel loop-back
    cpu.iord(IO_IN_STATUS, q); check("input empty", q[0] == 1'b0);
    for (int i = 0; i < 5; i++) cpu.put(16'(100 + i));
    cpu.iord(IO_IN_STATUS, q); check("input has data", q[0] == 1'b1);
    for (int i = 0; i < 5; i++) begin cpu.get(q); check($sformatf("loop word %0d", i), q == 16'(100 + i)); end
    // the channel pointers: OUT_DATA writes advance, commit and release reset
    cpu.iowr(IO_OUT_PTR, 16'd7);
    cpu.put(16'h0777);
    check($sformatf("out pointer advanced to %0d", out_addr), out_addr == 8'd8);
    cpu.iowr(IO_OUT_COMMIT, 16'd0);
    check($sformatf("commit reset the out pointer (%0d)", out_addr), out_addr == 8'd0);
    cpu.get(q);
    check("word written at pointer 7", q == 16'h0777);
    check($sformatf("in pointer advanced (%0d)", in_addr), in_addr != 8'd0);
    cpu.iowr(IO_IN_RELEASE, 16'd0);
    check($sformatf("release reset the in pointer (%0d)", in_addr), in_addr == 8'd0);
    // reading an empty input stalls until a word arrives
    fork
      cpu.get(q);
      begin
        repeat (10) @(negedge clk);
        check("stall output while waiting", stall);
        tb_push = 1'b1; tb_word = 16'h1234;
        @(negedge clk); tb_push = 1'b0;
      end
    join
    check($sformatf("stalled on empty input (%0d)", cpu.last_wait), cpu.last_wait >= 9);
    check("word that ended the stall", q == 16'h1234);

    // BIC: request packet 0x55, broadcast it, read it
    cpu.iowr(IO_BIC_ID + 16'd1, 16'h8055);
    @(negedge clk); bb = '0; bb.sync = 1'b1; bb.data = 16'h0055;
    @(negedge clk); bb = '0; #1 check("BIC hit", hit);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); bb = '0; bb.valid = 1'b1; bb.data = 16'(16'hA0 + i); bb.eop = (i == 3);
    end
    @(negedge clk); bb = '0;
    repeat (2) @(negedge clk);
    cpu.iord(IO_BIC_PKTID, q); check("BIC packet id", q == 16'h0055);
    cpu.iord(IO_BIC_STATUS, q); check($sformatf("BIC status %h", q), q == 16'h0401);
    for (int i = 0; i < 4; i++) begin
      cpu.iord(IO_BIC_DATA, q); check($sformatf("BIC word %0d", i), q == 16'(16'hA0 + i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
