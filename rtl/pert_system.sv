// pert_system: the PERT machine, N_PERT engines sharing three broadcast
// buses.
//
// With N_PERT = 1 (the default) this is the single-PERT configuration: one
// three-stage engine whose stages read their data sets from local memory.
// With more engines it is the multi-PERT configuration: every engine's
// ShadeProcessor, ShellProcessor and PrimProcessor sit, through their BICs,
// on the ShadeBus, ShellBus and PrimBus driven by three broadcast
// processors, which send the scene data round and round; the hit lines of
// all BICs on a bus are ORed back to that bus's broadcast processor. Each
// engine keeps its own part of the frame buffer in its ShadeProcessor's
// memory and works on its own set of scan lines.
// Ports: the SJ16 buses and the host memory ports of every stage
// ([engine][stage], stage 0/1/2 = Shade/Shell/Prim), the load, enable and
// end-address inputs of the broadcast processors (the control unit's job,
// index 0/1/2 = ShadeBP/ShellBP/PrimBP), and activity outputs.
// The organisation follows the description of the multi-PERT machine; the
// single shared clock and all sizes are this design's.
module pert_system
  import pert_pkg::*;
#(
  parameter int unsigned N_PERT     = 1,
  parameter int unsigned MEM_AW     = 16,
  parameter int unsigned BP_AW      = 16,
  parameter int unsigned FIRST_LAT  = 2,
  parameter int unsigned ALU_LAT    = 6,
  parameter int unsigned DIV_LAT    = 31,
  parameter int unsigned MUL_LAT    = 6,
  parameter int unsigned N_ID       = 4,
  parameter int unsigned BIC_DEPTH  = 256,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned DBUF_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // SJ16 buses
  input  logic              sj_req   [N_PERT][3],
  input  logic              sj_we    [N_PERT][3],
  input  logic              sj_io    [N_PERT][3],
  input  logic [15:0]       sj_addr  [N_PERT][3],
  input  logic [15:0]       sj_wdata [N_PERT][3],
  output logic [15:0]       sj_rdata [N_PERT][3],
  output logic              sj_ack   [N_PERT][3],
  // host access to local memories (data sets, frame buffer)
  input  logic              h_we     [N_PERT][3],
  input  logic [MEM_AW-1:0] h_addr   [N_PERT][3],
  input  logic [15:0]       h_wdata  [N_PERT][3],
  output logic [15:0]       h_rdata  [N_PERT][3],
  // control of the broadcast processors
  input  logic              bp_enable   [3],
  input  logic [BP_AW-1:0]  bp_end_addr [3],
  input  logic              bp_ld_we    [3],
  input  logic [BP_AW-1:0]  bp_ld_addr  [3],
  input  logic [15:0]       bp_ld_data  [3],
  // activity
  output logic              bp_sent    [3],
  output logic              bp_skipped [3],
  output logic              bp_wrap    [3],
  output logic              stall        [N_PERT][3],
  output logic              mem_streamed [N_PERT][3],
  output logic [3:0]        fpu_xfer     [N_PERT][3],
  output logic              bic_pkt      [N_PERT][3],
  output logic              fifo_full    [N_PERT][2],
  output logic [1:0]        dbuf_swaps   [N_PERT]
);
  bbus_t bus [3];
  logic  hit [N_PERT][3];
  logic  hit_or [3];

  for (genvar b = 0; b < 3; b++) begin : g_bp
    broadcast_proc #(.AW(BP_AW)) u_bp (
      .clk, .rst_n, .enable(bp_enable[b]), .end_addr(bp_end_addr[b]),
      .ld_we(bp_ld_we[b]), .ld_addr(bp_ld_addr[b]), .ld_data(bp_ld_data[b]),
      .bb(bus[b]), .hit_in(hit_or[b]),
      .sent(bp_sent[b]), .skipped(bp_skipped[b]), .wrap(bp_wrap[b]));
  end

  // wired-OR of the hit flags on each bus
  always_comb begin
    for (int b = 0; b < 3; b++) begin
      hit_or[b] = 1'b0;
      for (int p = 0; p < N_PERT; p++) hit_or[b] = hit_or[b] | hit[p][b];
    end
  end

  for (genvar p = 0; p < N_PERT; p++) begin : g_pert
    pert #(
      .MEM_AW(MEM_AW), .FIRST_LAT(FIRST_LAT), .ALU_LAT(ALU_LAT), .DIV_LAT(DIV_LAT),
      .MUL_LAT(MUL_LAT), .N_ID(N_ID), .BIC_DEPTH(BIC_DEPTH), .FIFO_DEPTH(FIFO_DEPTH),
      .DBUF_DEPTH(DBUF_DEPTH)
    ) u_pert (
      .clk, .rst_n,
      .sj_req(sj_req[p]), .sj_we(sj_we[p]), .sj_io(sj_io[p]), .sj_addr(sj_addr[p]),
      .sj_wdata(sj_wdata[p]), .sj_rdata(sj_rdata[p]), .sj_ack(sj_ack[p]),
      .h_we(h_we[p]), .h_addr(h_addr[p]), .h_wdata(h_wdata[p]), .h_rdata(h_rdata[p]),
      .bb(bus), .hit(hit[p]),
      .stall(stall[p]), .mem_streamed(mem_streamed[p]), .fpu_xfer(fpu_xfer[p]),
      .bic_pkt(bic_pkt[p]), .fifo_full(fifo_full[p]), .dbuf_swaps(dbuf_swaps[p]));
  end
endmodule
