// tb_stream_mem: self-checking test of the streamed local memory.
//
// The host port fills the memory; the processor port then reads a block
// sequentially (one word per cycle after the first, which waits FIRST_LAT
// extra cycles), reads and writes at random addresses against a reference
// array, and the host port reads the processor's writes back (the frame
// buffer path). A small address width keeps the run short.
module tb_stream_mem;
  localparam int AW = 10;
  localparam int FL = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          req, we, ready, streamed;
  logic [AW-1:0] addr, h_addr;
  logic [15:0]   wdata, rdata, h_wdata, h_rdata;
  logic          h_we;
  logic [15:0]   model [2**AW];
  int checks = 0, failures = 0;

  stream_mem #(.AW(AW), .FIRST_LAT(FL)) dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata,
    .ready, .streamed, .h_we, .h_addr, .h_wdata, .h_rdata);

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

  // one access; returns the cycles it took (1 = single cycle)
  task automatic acc(input logic w, input logic [AW-1:0] ad, input logic [15:0] d,
                     output logic [15:0] q, output int cyc);
    @(negedge clk);
    req = 1'b1; we = w; addr = ad; wdata = d;
    #1; cyc = 1;
    while (!ready) begin @(negedge clk); #1; cyc++; end
    q = rdata;
    @(posedge clk);
    #1 req = 1'b0;
  endtask

  initial begin
    logic [15:0] q;
    int cyc, t0;
    logic [AW-1:0] ad;
    req = 0; we = 0; addr = 0; wdata = 0; h_we = 0; h_addr = 0; h_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); h_we = 1'b1; h_addr = AW'(i); h_wdata = 16'($urandom); model[i] = h_wdata;
    end
    @(negedge clk); h_we = 1'b0;

    // streamed block read: back-to-back requests, one word per clock
    @(negedge clk);
    req = 1'b1; we = 1'b0; addr = AW'(100);
    t0 = 0;
    for (int i = 0; i < 32; i++) begin
      #1;
      while (!ready) begin @(negedge clk); #1; t0++; end
      check($sformatf("stream read %0d", i), rdata == model[100 + i]);
      @(negedge clk); t0++;
      addr = addr + 1'b1;
    end
    req = 1'b0;
    check($sformatf("32 streamed words in %0d cycles (exp %0d)", t0, 32 + FL), t0 == 32 + FL);

    // random accesses
    for (int n = 0; n < 300; n++) begin
      ad = AW'($urandom);
      if ($urandom_range(0, 1)) begin
        acc(1'b1, ad, 16'($urandom), q, cyc);
        model[ad] = wdata;
      end else begin
        acc(1'b0, ad, 16'd0, q, cyc);
        check($sformatf("read %0d", ad), q == model[ad]);
      end
      check($sformatf("random access %0d cycles", cyc), cyc == FL + 1 || cyc == 1);
      // a following sequential read is single cycle
      acc(1'b0, ad + 1'b1, 16'd0, q, cyc);
      check($sformatf("seq read %0d", ad + 1), q == model[AW'(ad + 1'b1)] && cyc == 1);
    end
    // host reads back what the processor wrote
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); h_addr = AW'(i * 7);
      @(negedge clk);
      check($sformatf("host read %0d", i * 7), h_rdata == model[AW'(i * 7)]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
