// tb_sync_fifo: self-checking test of the inter-processor word FIFO.
//
// Random pushes and pops against a queue model; checks order, the full and
// empty flags, the count, pushes ignored when full, and simultaneous
// push/pop. Depth reduced to 8 so the full case occurs often.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        push, pop, full, empty;
  logic [15:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  logic [15:0] q [$];
  int checks = 0, failures = 0, fulls = 0, both = 0;

  sync_fifo #(.WIDTH(16), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count);

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

  initial begin
    push = 0; pop = 0; wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check($sformatf("count %0d vs %0d", count, q.size()), count == ($clog2(D+1))'(q.size()));
      check("empty flag", empty == (q.size() == 0));
      check("full flag", full == (q.size() == D));
      if (q.size() > 0) check($sformatf("head %h vs %h", rdata, q[0]), rdata == q[0]);
      push  = ($urandom_range(0, 99) < ((n / 500) % 2 ? 70 : 40));
      pop   = ($urandom_range(0, 99) < ((n / 500) % 2 ? 40 : 70));
      wdata = 16'($urandom);
      if (full && push) fulls++;
      if (push && pop && !full && !empty) both++;
      @(posedge clk);
      begin
        bit can_push;
        can_push = (q.size() < D);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && can_push) q.push_back(wdata);
      end
    end
    check($sformatf("full seen %0d times", fulls), fulls > 0);
    check($sformatf("push+pop seen %0d times", both), both > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
