// pert_node: one processor stage of PERT without its CPU core, i.e. every
// block on the stage's 16 bit SJBUS except the SJ16 microprocessor itself.
//
// All three stages (Shade, Shell, Prim) are built the same way and differ
// only in the microcode their SJ16 runs; this module is that common stage.
// The SJ16 is not part of this RTL, so its bus comes out as ports: a bus
// cycle is req/we/io/addr/wdata held until ack, with rdata valid in the ack
// cycle. io=0 cycles go to the local memory (streamed, see stream_mem);
// io=1 cycles go to the FPU, to the stage's input and output channels, or to
// the BIC. A cycle that cannot complete (FPU result not ready, output full,
// input empty, BIC buffer empty, memory not yet open) simply waits, which is
// how a stage stalls on its neighbours.
// The channel ports are generic: to a FIFO (out_we pushes, in_re pops) or to
// the dual buffer (word addresses from the out/in pointers, commit hands the
// bank over, release gives it back); out_wdata is the bus write data
// itself. I/O addresses: pert_pkg IO_*.
// From the description: one SJBUS per stage carrying the SJ16, the local
// memory, the FPU and the (optional) BIC. This design's: the address map,
// the bus handshake, the pointer-based channel registers.
module pert_node
  import pert_pkg::*;
#(
  parameter int unsigned MEM_AW    = 16,
  parameter int unsigned FIRST_LAT = 2,
  parameter int unsigned ALU_LAT   = 6,
  parameter int unsigned DIV_LAT   = 31,
  parameter int unsigned MUL_LAT   = 6,
  parameter int unsigned N_ID      = 4,
  parameter int unsigned BIC_DEPTH = 256,
  parameter int unsigned CH_AW     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // SJBUS master port (the SJ16)
  input  logic              sj_req,
  input  logic              sj_we,
  input  logic              sj_io,
  input  logic [15:0]       sj_addr,
  input  logic [15:0]       sj_wdata,
  output logic [15:0]       sj_rdata,
  output logic              sj_ack,
  // host port of the local memory
  input  logic              h_we,
  input  logic [MEM_AW-1:0] h_addr,
  input  logic [15:0]       h_wdata,
  output logic [15:0]       h_rdata,
  // output channel
  output logic              out_we,
  output logic [CH_AW-1:0]  out_addr,
  output logic [15:0]       out_wdata,
  input  logic [15:0]       out_rdata,
  output logic              out_commit,
  input  logic              out_ready,
  // input channel
  output logic              in_re,
  output logic [CH_AW-1:0]  in_addr,
  input  logic [15:0]       in_rdata,
  input  logic              in_valid,
  output logic              in_release,
  // broadcast bus
  input  bbus_t             bb,
  output logic              hit,
  // activity, for performance counting
  output logic              stall,
  output logic              mem_streamed,
  output logic [3:0]        fpu_xfer,
  output logic              bic_pkt
);
  logic [CH_AW-1:0] out_ptr, in_ptr;

  // ---- decode
  logic fpu_sel, mem_req;
  always_comb begin
    fpu_sel = sj_req && sj_io && (sj_addr[15:4] == 12'd0);
    mem_req = sj_req && !sj_io;
  end

  logic [15:0] fpu_rdata, mem_rdata;
  logic        fpu_ready, mem_ready;

  fpu #(.ALU_LAT(ALU_LAT), .DIV_LAT(DIV_LAT), .MUL_LAT(MUL_LAT)) u_fpu (
    .clk, .rst_n, .sel(fpu_sel), .we(sj_we), .regno(sj_addr[3:0]), .wdata(sj_wdata),
    .rdata(fpu_rdata), .ready(fpu_ready), .xfer_used(fpu_xfer));

  stream_mem #(.AW(MEM_AW), .FIRST_LAT(FIRST_LAT)) u_mem (
    .clk, .rst_n, .req(mem_req), .we(sj_we), .addr(sj_addr[MEM_AW-1:0]), .wdata(sj_wdata),
    .rdata(mem_rdata), .ready(mem_ready), .streamed(mem_streamed),
    .h_we, .h_addr, .h_wdata, .h_rdata);

  logic        bic_id_we, bic_pop, bic_valid;
  logic [15:0] bic_data, bic_pktid;
  logic [7:0]  bic_left;

  bic #(.N_ID(N_ID), .BUF_DEPTH(BIC_DEPTH)) u_bic (
    .clk, .rst_n, .bb, .hit,
    .id_we(bic_id_we), .id_idx(sj_addr[$clog2(N_ID)-1:0]), .id_wdata(sj_wdata),
    .pop(bic_pop), .rd_data(bic_data), .rd_valid(bic_valid), .rd_left(bic_left),
    .rd_pktid(bic_pktid), .pkt_taken(bic_pkt));

  always_comb begin
    sj_ack     = 1'b1;
    sj_rdata   = 16'd0;
    out_we     = 1'b0;
    out_commit = 1'b0;
    in_re      = 1'b0;
    in_release = 1'b0;
    bic_id_we  = 1'b0;
    bic_pop    = 1'b0;
    out_addr   = out_ptr;
    out_wdata  = sj_wdata;
    in_addr    = in_ptr;
    if (!sj_req) begin
      sj_ack = 1'b0;
    end else if (!sj_io) begin
      sj_ack   = mem_ready;
      sj_rdata = mem_rdata;
    end else if (fpu_sel) begin
      sj_ack   = fpu_ready;
      sj_rdata = fpu_rdata;
    end else if (sj_addr >= IO_BIC_ID && sj_addr < IO_BIC_ID + 16'(N_ID)) begin
      bic_id_we = sj_we;
    end else begin
      unique case (sj_addr)
        IO_OUT_DATA: begin
          if (sj_we) begin out_we = 1'b1; sj_ack = out_ready; end
          sj_rdata = out_rdata;
        end
        IO_OUT_STATUS: sj_rdata = {15'd0, out_ready};
        IO_OUT_COMMIT: if (sj_we) begin out_commit = 1'b1; sj_ack = out_ready; end
        IO_IN_DATA: if (!sj_we) begin
          in_re    = 1'b1;
          sj_ack   = in_valid;
          sj_rdata = in_rdata;
        end
        IO_IN_STATUS:  sj_rdata = {15'd0, in_valid};
        IO_IN_RELEASE: in_release = sj_we;
        IO_BIC_DATA: if (!sj_we) begin
          bic_pop  = 1'b1;
          sj_ack   = bic_valid;
          sj_rdata = bic_data;
        end
        IO_BIC_STATUS: sj_rdata = {bic_left, 7'd0, bic_valid};
        IO_BIC_PKTID:  sj_rdata = bic_pktid;
        default: ;
      endcase
    end
    stall = sj_req && !sj_ack;
  end

  // channel pointers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ptr <= '0; in_ptr <= '0;
    end else if (sj_req && sj_ack && sj_io) begin
      unique case (sj_addr)
        IO_OUT_DATA:   if (sj_we) out_ptr <= out_ptr + 1'b1;
        IO_OUT_COMMIT: out_ptr <= '0;
        IO_OUT_PTR:    if (sj_we) out_ptr <= sj_wdata[CH_AW-1:0];
        IO_IN_DATA:    if (!sj_we) in_ptr <= in_ptr + 1'b1;
        IO_IN_RELEASE: in_ptr <= '0;
        IO_IN_PTR:     if (sj_we) in_ptr <= sj_wdata[CH_AW-1:0];
        default: ;
      endcase
    end
  end

  // the bus master holds a cycle until it is acknowledged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (sj_req && !sj_ack) |=> sj_req && $stable(sj_addr) && $stable(sj_we));
endmodule
