// pert: one Pipelined Engine for Ray Tracing, a ring of three processor
// stages.
//
// Stage 0, the ShadeProcessor, spawns rays and accumulates pixel values in
// its frame buffer; stage 1, the ShellProcessor, walks the bounding-volume
// tree and writes the sorted list of leaf shells a ray hits; stage 2, the
// PrimProcessor, intersects the primitives of those shells and reports the
// nearest hit back to the ShadeProcessor. The ring is
//   Shade --FIFO--> Shell --dual buffer--> Prim --FIFO--> Shade
// The FIFOs pass ray records word by word; the Shell->Prim link is a dual
// buffer because the ShellProcessor sorts its list in place before handing
// it over. Each stage has its own local memory holding its data set (shell
// tree, primitives, surface table plus frame buffer) and its own FPU and BIC.
// The SJ16 cores are outside this RTL: their buses are ports, index 0/1/2 =
// Shade/Shell/Prim, as are the host ports of the three memories and the
// three broadcast buses. The ring, the link types and the per-stage
// resources follow the description; the sizes are this design's.
module pert
  import pert_pkg::*;
#(
  parameter int unsigned MEM_AW     = 16,
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
  input  logic              sj_req   [3],
  input  logic              sj_we    [3],
  input  logic              sj_io    [3],
  input  logic [15:0]       sj_addr  [3],
  input  logic [15:0]       sj_wdata [3],
  output logic [15:0]       sj_rdata [3],
  output logic              sj_ack   [3],
  input  logic              h_we     [3],
  input  logic [MEM_AW-1:0] h_addr   [3],
  input  logic [15:0]       h_wdata  [3],
  output logic [15:0]       h_rdata  [3],
  input  bbus_t             bb       [3],
  output logic              hit      [3],
  output logic              stall    [3],
  output logic              mem_streamed [3],
  output logic [3:0]        fpu_xfer [3],
  output logic              bic_pkt  [3],
  output logic              fifo_full [2],   // 0: Shade->Shell, 1: Prim->Shade
  output logic [1:0]        dbuf_swaps       // [0] Shell commit, [1] Prim release
);
  localparam int unsigned CH_AW = $clog2(DBUF_DEPTH);
  localparam int SHADE = 0, SHELL = 1, PRIM = 2;

  logic             out_we [3], out_commit [3], out_ready [3];
  logic [CH_AW-1:0] out_addr [3], in_addr [3];
  logic [15:0]      out_wdata [3], out_rdata [3], in_rdata [3];
  logic             in_re [3], in_valid [3], in_release [3];

  for (genvar s = 0; s < 3; s++) begin : g_stage
    pert_node #(
      .MEM_AW(MEM_AW), .FIRST_LAT(FIRST_LAT), .ALU_LAT(ALU_LAT), .DIV_LAT(DIV_LAT),
      .MUL_LAT(MUL_LAT), .N_ID(N_ID), .BIC_DEPTH(BIC_DEPTH), .CH_AW(CH_AW)
    ) u_node (
      .clk, .rst_n,
      .sj_req(sj_req[s]), .sj_we(sj_we[s]), .sj_io(sj_io[s]), .sj_addr(sj_addr[s]),
      .sj_wdata(sj_wdata[s]), .sj_rdata(sj_rdata[s]), .sj_ack(sj_ack[s]),
      .h_we(h_we[s]), .h_addr(h_addr[s]), .h_wdata(h_wdata[s]), .h_rdata(h_rdata[s]),
      .out_we(out_we[s]), .out_addr(out_addr[s]), .out_wdata(out_wdata[s]),
      .out_rdata(out_rdata[s]), .out_commit(out_commit[s]), .out_ready(out_ready[s]),
      .in_re(in_re[s]), .in_addr(in_addr[s]), .in_rdata(in_rdata[s]),
      .in_valid(in_valid[s]), .in_release(in_release[s]),
      .bb(bb[s]), .hit(hit[s]),
      .stall(stall[s]), .mem_streamed(mem_streamed[s]), .fpu_xfer(fpu_xfer[s]),
      .bic_pkt(bic_pkt[s]));
  end

  // Shade -> Shell FIFO
  logic s2s_empty, p2s_empty;
  logic [$clog2(FIFO_DEPTH+1)-1:0] s2s_count, p2s_count;
  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_shade_shell (
    .clk, .rst_n,
    .push(out_we[SHADE]), .wdata(out_wdata[SHADE]),
    .pop(in_re[SHELL]), .rdata(in_rdata[SHELL]),
    .full(fifo_full[0]), .empty(s2s_empty), .count(s2s_count));

  // Prim -> Shade FIFO
  sync_fifo #(.WIDTH(16), .DEPTH(FIFO_DEPTH)) u_fifo_prim_shade (
    .clk, .rst_n,
    .push(out_we[PRIM]), .wdata(out_wdata[PRIM]),
    .pop(in_re[SHADE]), .rdata(in_rdata[SHADE]),
    .full(fifo_full[1]), .empty(p2s_empty), .count(p2s_count));

  // Shell -> Prim dual buffer
  dual_buffer #(.DEPTH(DBUF_DEPTH)) u_dbuf (
    .clk, .rst_n,
    .w_en(out_we[SHELL]), .w_addr(out_addr[SHELL]), .w_wdata(out_wdata[SHELL]),
    .w_rdata(out_rdata[SHELL]), .w_commit(out_commit[SHELL]), .w_ready(out_ready[SHELL]),
    .r_addr(in_addr[PRIM]), .r_rdata(in_rdata[PRIM]), .r_valid(in_valid[PRIM]),
    .r_release(in_release[PRIM]), .swaps(dbuf_swaps));

  always_comb begin
    out_ready[SHADE] = !fifo_full[0];
    out_ready[PRIM]  = !fifo_full[1];
    out_rdata[SHADE] = 16'd0;          // a FIFO cannot be read back
    out_rdata[PRIM]  = 16'd0;
    in_valid[SHELL]  = !s2s_empty;
    in_valid[SHADE]  = !p2s_empty;
  end
endmodule
