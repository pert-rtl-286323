// tb_dual_buffer: self-checking test of the Shell->Prim dual buffer.
//
// A writer process builds records in its bank, sorts them in place with
// read-back, and commits; a reader process waits for a full bank, checks
// the record is sorted and intact, and releases it. The two run at random
// speeds so that the writer waits on a busy reader and the reader waits on
// an empty buffer; both cases are counted.
module tb_dual_buffer;
  localparam int DEPTH = 64;
  localparam int AW = $clog2(DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          w_en, w_commit, w_ready, r_valid, r_release;
  logic [AW-1:0] w_addr, r_addr;
  logic [15:0]   w_wdata, w_rdata, r_rdata;
  logic [1:0]    swaps;
  int checks = 0, failures = 0, writer_waits = 0, reader_waits = 0;
  int sent [$];   // record checksums in order

  dual_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .w_en, .w_addr, .w_wdata, .w_rdata, .w_commit,
    .w_ready, .r_addr, .r_rdata, .r_valid, .r_release, .swaps);

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int NREC = 40;

  task automatic wword(input int ad, input logic [15:0] d);
    @(negedge clk);
    w_en = 1'b1; w_addr = AW'(ad); w_wdata = d;
    @(posedge clk); #1 w_en = 1'b0;
  endtask
  task automatic rword(input int ad, output logic [15:0] d);
    @(negedge clk);
    w_addr = AW'(ad); #1 d = w_rdata;
  endtask

  // writer: record = [len][len values], values sorted ascending in place
  initial begin : writer
    logic [15:0] x, y;
    int len, sum;
    w_en = 0; w_commit = 0; w_addr = 0; w_wdata = 0;
    wait (rst_n);
    for (int r = 0; r < NREC; r++) begin
      @(negedge clk);
      while (!w_ready) begin writer_waits++; @(negedge clk); end
      len = $urandom_range(2, DEPTH - 1);
      sum = 0;
      wword(0, 16'(len));
      for (int i = 1; i <= len; i++) begin
        x = 16'($urandom); sum += x; wword(i, x);
      end
      // bubble sort in place through the read-back port
      for (int i = 1; i <= len; i++)
        for (int j = 1; j < len - i + 1; j++) begin
          rword(j, x); rword(j + 1, y);
          if (x > y) begin wword(j, y); wword(j + 1, x); end
        end
      sent.push_back(sum + len);
      @(negedge clk); w_commit = 1'b1;
      @(posedge clk); #1 w_commit = 1'b0;
    end
  end

  // reader
  initial begin : reader
    logic [15:0] prev;
    int len, sum, exp_sum;
    logic sorted;
    r_addr = 0; r_release = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NREC; r++) begin
      @(negedge clk);
      while (!r_valid) begin reader_waits++; @(negedge clk); end
      r_addr = '0; #1 len = int'(r_rdata);
      sum = len; sorted = 1'b1; prev = 16'd0;
      for (int i = 1; i <= len; i++) begin
        @(negedge clk); r_addr = AW'(i); #1;
        if (r_rdata < prev) sorted = 1'b0;
        prev = r_rdata; sum += int'(r_rdata);
        if ($urandom_range(0, 3) == 0) repeat (20) @(negedge clk);  // slow reader
      end
      exp_sum = sent.pop_front();
      check($sformatf("record %0d intact", r), sum == exp_sum);
      check($sformatf("record %0d sorted", r), sorted);
      @(negedge clk); r_release = 1'b1;
      @(posedge clk); #1 r_release = 1'b0;
    end
    check($sformatf("writer waited %0d", writer_waits), writer_waits > 0);
    check($sformatf("reader waited %0d", reader_waits), reader_waits > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
