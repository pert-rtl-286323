// sj16_model: behavioural stand-in for a stage's SJ16 processor, used only
// by testbenches. It is not a model of the SJ16's internals: it only issues
// SJBUS cycles (req/we/io/addr/wdata held until ack, rdata taken in the ack
// cycle) from tasks that a testbench calls, the way a microprogram would.
// Cycles start at the falling clock edge and complete at the rising edge
// where ack is high, so back-to-back cycles run at one per clock.
// wait_cycles counts every clock a cycle spent waiting for ack.
module sj16_model (
  input  logic        clk,
  output logic        req,
  output logic        we,
  output logic        io,
  output logic [15:0] addr,
  output logic [15:0] wdata,
  input  logic [15:0] rdata,
  input  logic        ack
);
  import pert_pkg::*;

  int wait_cycles = 0;
  int last_wait = 0;

  initial begin req = 1'b0; we = 1'b0; io = 1'b0; addr = '0; wdata = '0; end

  task automatic cyc(input logic w, input logic i, input logic [15:0] a, input logic [15:0] d,
                     output logic [15:0] q);
    @(negedge clk);
    req = 1'b1; we = w; io = i; addr = a; wdata = d;
    #1;
    last_wait = 0;
    while (!ack) begin @(negedge clk); #1; wait_cycles++; last_wait++; end
    q = rdata;
    @(posedge clk);
    #1 req = 1'b0;
  endtask

  task automatic iowr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] q; cyc(1'b1, 1'b1, a, d, q);
  endtask
  task automatic iord(input logic [15:0] a, output logic [15:0] q);
    cyc(1'b0, 1'b1, a, 16'd0, q);
  endtask
  task automatic memwr(input logic [15:0] a, input logic [15:0] d);
    logic [15:0] q; cyc(1'b1, 1'b0, a, d, q);
  endtask
  task automatic memrd(input logic [15:0] a, output logic [15:0] q);
    cyc(1'b0, 1'b0, a, 16'd0, q);
  endtask
  task automatic memrd32(input logic [15:0] a, output logic [31:0] v);
    logic [15:0] q; memrd(a, q); v[15:0] = q; memrd(a + 16'd1, q); v[31:16] = q;
  endtask
  task automatic memwr32(input logic [15:0] a, input logic [31:0] v);
    memwr(a, v[15:0]); memwr(a + 16'd1, v[31:16]);
  endtask
  // FPU registers
  task automatic fwr32(input logic [3:0] r, input logic [31:0] v);
    iowr(16'(r), v[15:0]); iowr(16'(r) + 16'd1, v[31:16]);
  endtask
  task automatic frd32(input logic [3:0] r, output logic [31:0] v);
    logic [15:0] q; iord(16'(r), q); v[15:0] = q; iord(16'(r) + 16'd1, q); v[31:16] = q;
  endtask
  task automatic fcmd(input logic [7:0] alu, input logic [7:0] mul);
    iowr(16'(FR_CMD), {mul, alu});
  endtask
  // channel words
  task automatic put(input logic [15:0] d);  iowr(IO_OUT_DATA, d); endtask
  task automatic put32(input logic [31:0] v); put(v[15:0]); put(v[31:16]); endtask
  task automatic get(output logic [15:0] q); iord(IO_IN_DATA, q); endtask
  task automatic get32(output logic [31:0] v);
    logic [15:0] q; get(q); v[15:0] = q; get(q); v[31:16] = q;
  endtask
endmodule
