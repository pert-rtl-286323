// tb_pert: self-checking test of one PERT engine (three stages in a ring).
//
// Three behavioural bus masters play the Shade, Shell and Prim processors.
// Checks: the Shade->Shell FIFO keeps order and stalls its writer when full;
// the Shell builds records in the dual buffer with random-access writes and
// read-back, commits them, and waits for a free bank when the Prim still
// holds both; the Prim reads each bank at any address and releases it; the
// Prim->Shade FIFO closes the ring; the three FPUs work at the same time
// without interfering; each BIC answers only on its own broadcast bus.
// The FIFOs and the dual buffer are shrunk to keep the run short.
module tb_pert;
  import pert_pkg::*;
  localparam int FD = 16, BD = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        sj_req [3], sj_we [3], sj_io [3], sj_ack [3];
  logic [15:0] sj_addr [3], sj_wdata [3], sj_rdata [3];
  logic        h_we [3];
  logic [11:0] h_addr [3];
  logic [15:0] h_wdata [3], h_rdata [3];
  bbus_t       bb [3];
  logic        hit [3], stall [3], mem_streamed [3], bic_pkt [3], fifo_full [2];
  logic [3:0]  fpu_xfer [3];
  logic [1:0]  dbuf_swaps;
  int checks = 0, failures = 0;

  pert #(.MEM_AW(12), .FIFO_DEPTH(FD), .DBUF_DEPTH(BD), .BIC_DEPTH(16)) dut (.clk, .rst_n,
    .sj_req, .sj_we, .sj_io, .sj_addr, .sj_wdata, .sj_rdata, .sj_ack, .h_we, .h_addr, .h_wdata,
    .h_rdata, .bb, .hit, .stall, .mem_streamed, .fpu_xfer, .bic_pkt, .fifo_full, .dbuf_swaps);

  sj16_model shade (.clk, .req(sj_req[0]), .we(sj_we[0]), .io(sj_io[0]), .addr(sj_addr[0]),
                    .wdata(sj_wdata[0]), .rdata(sj_rdata[0]), .ack(sj_ack[0]));
  sj16_model shell (.clk, .req(sj_req[1]), .we(sj_we[1]), .io(sj_io[1]), .addr(sj_addr[1]),
                    .wdata(sj_wdata[1]), .rdata(sj_rdata[1]), .ack(sj_ack[1]));
  sj16_model prim  (.clk, .req(sj_req[2]), .we(sj_we[2]), .io(sj_io[2]), .addr(sj_addr[2]),
                    .wdata(sj_wdata[2]), .rdata(sj_rdata[2]), .ack(sj_ack[2]));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Shell: record n is 10 words, value n*256 + word index, written backwards
  task automatic shell_record(input int n);
    logic [15:0] q;
    for (int i = 9; i >= 0; i--) begin
      shell.iowr(IO_OUT_PTR, 16'(i));
      shell.put(16'(n * 256 + i));
    end
    shell.iowr(IO_OUT_PTR, 16'd3);
    shell.iord(IO_OUT_DATA, q);
    check($sformatf("record %0d read back", n), q == 16'(n * 256 + 3));
    shell.iowr(IO_OUT_COMMIT, 16'd0);
  endtask

  initial begin
    logic [15:0] q;
    logic [31:0] v;
    int full_wait, held;
    for (int s = 0; s < 3; s++) begin h_we[s] = 1'b0; h_addr[s] = '0; h_wdata[s] = '0; bb[s] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Shade -> Shell FIFO: 20 words into 16 places; the writer waits
    fork
      begin
        for (int i = 0; i < 20; i++) begin
          shade.put(16'(16'h5000 + i));
          if (i == FD) full_wait = shade.last_wait;
        end
      end
      begin
        repeat (60) @(posedge clk);
        check("FIFO reports full", fifo_full[0]);
        for (int i = 0; i < 20; i++) begin
          shell.get(q);
          check($sformatf("Shade->Shell word %0d", i), q == 16'(16'h5000 + i));
        end
      end
    join
    check($sformatf("Shade waited on the full FIFO (%0d cycles)", full_wait), full_wait > 10);

    // 2. Shell -> Prim dual buffer: two records fill both banks; the third
    //    waits until the Prim releases one
    fork
      begin
        shell_record(1);
        shell_record(2);
        held = shell.wait_cycles;
        shell_record(3);
        held = shell.wait_cycles - held;
      end
      begin
        repeat (200) @(posedge clk);
        for (int n = 1; n <= 3; n++) begin
          for (int i = 9; i >= 0; i -= 3) begin
            prim.iowr(IO_IN_PTR, 16'(i));
            prim.get(q);
            check($sformatf("Prim record %0d word %0d", n, i), q == 16'(n * 256 + i));
          end
          prim.iowr(IO_IN_RELEASE, 16'd0);
        end
      end
    join
    check($sformatf("Shell waited for a free bank (%0d cycles)", held), held > 50);

    // 3. Prim -> Shade FIFO closes the ring
    for (int i = 0; i < 8; i++) prim.put(16'(16'h7000 + i));
    for (int i = 0; i < 8; i++) begin
      shade.get(q);
      check($sformatf("Prim->Shade word %0d", i), q == 16'(16'h7000 + i));
    end

    // 4. three FPUs at once: stage s computes (s+1) * 1.5
    fork
      begin : f0
        logic [31:0] r;
        shade.fwr32(FR_A_MUL_LO, 32'h3F80_0000); shade.fwr32(FR_B_MUL_LO, 32'h3FC0_0000);
        shade.fcmd(8'd0, 8'(MUL_MUL)); shade.frd32(FR_C_MUL_LO, r);
        check($sformatf("Shade FPU %h", r), r == 32'h3FC0_0000);
      end
      begin : f1
        logic [31:0] r;
        shell.fwr32(FR_A_MUL_LO, 32'h4000_0000); shell.fwr32(FR_B_MUL_LO, 32'h3FC0_0000);
        shell.fcmd(8'd0, 8'(MUL_MUL)); shell.frd32(FR_C_MUL_LO, r);
        check($sformatf("Shell FPU %h", r), r == 32'h4040_0000);
      end
      begin : f2
        logic [31:0] r;
        prim.fwr32(FR_A_MUL_LO, 32'h4040_0000); prim.fwr32(FR_B_MUL_LO, 32'h3FC0_0000);
        prim.fcmd(8'd0, 8'(MUL_MUL)); prim.frd32(FR_C_MUL_LO, r);
        check($sformatf("Prim FPU %h", r), r == 32'h4090_0000);
      end
    join

    // 5. BICs: only the Shell asks for ID 0x33; an ID on the other buses
    //    gets no hit, on the Shell's bus it does
    shell.iowr(IO_BIC_ID, 16'h8033);
    for (int s = 0; s < 3; s++) begin
      @(negedge clk); bb[s].sync = 1'b1; bb[s].data = 16'h0033;
      @(negedge clk); bb[s] = '0; #1;
      check($sformatf("hit on bus %0d", s), hit[s] == (s == 1));
      if (s == 1) begin
        @(negedge clk); bb[1].valid = 1'b1; bb[1].eop = 1'b1; bb[1].data = 16'hCAFE;
        @(negedge clk); bb[1] = '0;
      end
    end
    shell.iord(IO_BIC_DATA, q);
    check("Shell BIC data", q == 16'hCAFE);

    // 6. memory of each stage is separate
    for (int s = 0; s < 3; s++) begin
      @(negedge clk); h_we[s] = 1'b1; h_addr[s] = 12'h040; h_wdata[s] = 16'(16'hA0 + s);
      @(negedge clk); h_we[s] = 1'b0;
    end
    shade.memrd(16'h0040, q); check("Shade memory", q == 16'h00A0);
    shell.memrd(16'h0040, q); check("Shell memory", q == 16'h00A1);
    prim.memrd(16'h0040, q);  check("Prim memory", q == 16'h00A2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
