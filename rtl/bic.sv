// bic: Bus Interface Controller, the link between one processor and its
// broadcast bus in the multi-PERT configuration.
//
// The processor asks for data by writing packet IDs into free ID registers.
// A broadcast processor sends, in turn, the ID of every packet it holds;
// the BIC captures each ID in its ID latch when sync is high, and in the
// next cycle the comparator matches the latched ID against all armed ID
// registers at once. On a match the BIC raises hit (the hit lines of all
// BICs on a bus are ORed and tell the broadcast processor to send the data
// part of the packet), disarms the matched register, and copies the data
// words that follow into one half of a double buffer. When the packet ends
// (eop) and the processor has emptied the other half, the halves swap, so
// the BIC fills one buffer while the processor reads the other, one word per
// bus read.
// Interface, processor side: id_we/id_idx/id_wdata arm (bit 15 set, ID in
// bits 14:0) or free (bit 15 clear) an ID register; pop takes the next data
// word, valid while rd_valid; rd_left and rd_pktid describe the packet
// being read. Timing: hit is combinational in the cycle after the ID.
// From the description: ID registers, ID latch on SYNC, associative
// comparator, hit flag, hit-gated transmission, FIFO double buffer. This
// design's choices: 4 ID registers, 256-word buffers (a packet of 20 primitives), ID width, clearing a
// register when its packet is taken, and not raising hit while the fill
// buffer still holds a packet that has not been handed over.
module bic
  import pert_pkg::*;
#(
  parameter int unsigned N_ID      = 4,
  parameter int unsigned BUF_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // broadcast bus
  input  bbus_t       bb,
  output logic        hit,
  // processor side
  input  logic        id_we,
  input  logic [$clog2(N_ID)-1:0] id_idx,
  input  logic [15:0] id_wdata,
  input  logic        pop,
  output logic [15:0] rd_data,
  output logic        rd_valid,
  output logic [7:0]  rd_left,
  output logic [15:0] rd_pktid,
  output logic        pkt_taken   // pulses when a packet has been captured
);
  localparam int unsigned BW = $clog2(BUF_DEPTH + 1);

  logic [14:0] id_reg [N_ID];
  logic [N_ID-1:0] id_armed;
  logic [15:0] id_latch;
  logic        latch_v;

  logic [15:0] bank0 [BUF_DEPTH];
  logic [15:0] bank1 [BUF_DEPTH];
  logic        rsel;                 // bank the processor reads; BIC fills !rsel
  logic        cap, fill_done;
  logic [BW-1:0] fill_len, rd_len, rd_ptr;
  logic [15:0] fill_id;

  logic [N_ID-1:0] match;
  logic fill_free;
  always_comb begin
    for (int i = 0; i < N_ID; i++)
      match[i] = id_armed[i] && (id_reg[i] == id_latch[14:0]);
    fill_free = !cap && !fill_done;
    hit       = latch_v && (match != '0) && fill_free;
    rd_valid  = (rd_ptr != rd_len);
    rd_data   = rsel ? bank1[rd_ptr[$clog2(BUF_DEPTH)-1:0]] : bank0[rd_ptr[$clog2(BUF_DEPTH)-1:0]];
    rd_left   = (rd_len - rd_ptr > BW'(255)) ? 8'd255 : 8'(rd_len - rd_ptr);
  end

  logic wr_word;
  always_comb wr_word = cap && bb.valid && (fill_len < BW'(BUF_DEPTH));

  always_ff @(posedge clk) begin
    if (wr_word) begin
      if (rsel) bank0[fill_len[$clog2(BUF_DEPTH)-1:0]] <= bb.data;
      else      bank1[fill_len[$clog2(BUF_DEPTH)-1:0]] <= bb.data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ID; i++) id_reg[i] <= '0;
      id_armed <= '0; id_latch <= '0; latch_v <= 1'b0;
      rsel <= 1'b0; cap <= 1'b0; fill_done <= 1'b0; fill_len <= '0;
      rd_len <= '0; rd_ptr <= '0; fill_id <= '0; rd_pktid <= '0; pkt_taken <= 1'b0;
    end else begin
      pkt_taken <= 1'b0;
      // ID latch
      latch_v <= bb.sync;
      if (bb.sync) id_latch <= bb.data;
      // comparator hit: start capturing, disarm the matched registers
      if (hit) begin
        cap      <= 1'b1;
        fill_len <= '0;
        fill_id  <= id_latch;
        id_armed <= id_armed & ~match;
      end
      if (wr_word) fill_len <= fill_len + 1'b1;
      if (cap && bb.valid && bb.eop) begin
        cap       <= 1'b0;
        fill_done <= 1'b1;
        pkt_taken <= 1'b1;
      end
      // processor reads
      if (pop && rd_valid) rd_ptr <= rd_ptr + 1'b1;
      // hand a complete packet over once the read half is empty
      if (fill_done && !rd_valid) begin
        rsel      <= !rsel;
        rd_len    <= fill_len;
        rd_ptr    <= '0;
        rd_pktid  <= fill_id;
        fill_done <= 1'b0;
      end
      // processor arms or frees an ID register
      if (id_we) begin
        id_reg[id_idx]   <= id_wdata[14:0];
        id_armed[id_idx] <= id_wdata[15];
      end
    end
  end

  a_no_data_without_capture: assert property (@(posedge clk) disable iff (!rst_n)
                                              hit |-> !cap);
endmodule
