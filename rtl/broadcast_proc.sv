// broadcast_proc: a broadcast processor of the multi-PERT configuration
// (ShellBP, PrimBP or ShadeBP).
//
// It holds one data set in its global memory as a list of packets and sends
// them round and round on its broadcast bus, like a disk track passing under
// a head. For each packet it first sends the ID (sync high), then waits one
// cycle for the ORed hit line of the BICs; if some BIC asked for this packet
// it sends the data words (valid high, eop on the last), otherwise it skips
// straight to the next ID. Skipping unrequested data is what shortens the
// broadcast cycle.
// Memory layout (this design's): a packet is [ID][LEN][LEN data words],
// packets are stored back to back from address 0 up to end_addr; LEN >= 1.
// The control unit loads the memory through ld_*, sets end_addr and raises
// enable. Statistics: sent / skipped pulse per packet, wrap pulses at the
// end of each broadcast cycle.
// From the description: ID-then-data packets, cyclic transmission, data sent
// only on a raised hit. This design's: memory size and layout, the one-cycle
// hit window, bus timing.
module broadcast_proc
  import pert_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic [AW-1:0] end_addr,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [15:0]   ld_data,
  output bbus_t         bb,
  input  logic          hit_in,
  output logic          sent,
  output logic          skipped,
  output logic          wrap
);
  typedef enum logic [1:0] {S_ID, S_HIT, S_DATA} state_e;
  state_e state;

  logic [15:0]   mem [2**AW];
  logic [AW-1:0] ptr;        // header of the current packet
  logic [15:0]   len, idx;
  logic [AW-1:0] nxt;

  always_comb begin
    nxt = ptr + AW'(2) + AW'(len);
    if (nxt >= end_addr) nxt = '0;
  end

  always_comb begin
    bb = '0;
    unique case (state)
      S_ID:   if (enable) begin bb.sync = 1'b1; bb.data = mem[ptr]; end
      S_DATA: begin
        bb.valid = 1'b1;
        bb.data  = mem[ptr + AW'(2) + AW'(idx)];
        bb.eop   = (idx == len - 16'd1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ID; ptr <= '0; len <= '0; idx <= '0;
      sent <= 1'b0; skipped <= 1'b0; wrap <= 1'b0;
    end else begin
      sent <= 1'b0; skipped <= 1'b0; wrap <= 1'b0;
      unique case (state)
        S_ID: if (enable) begin
          len   <= mem[ptr + AW'(1)];
          state <= S_HIT;
        end
        S_HIT: begin
          idx <= '0;
          if (hit_in) begin
            state <= S_DATA;
          end else begin
            skipped <= 1'b1;
            wrap    <= (nxt == '0);
            ptr     <= nxt;
            state   <= S_ID;
          end
        end
        S_DATA: begin
          idx <= idx + 16'd1;
          if (idx == len - 16'd1) begin
            sent  <= 1'b1;
            wrap  <= (nxt == '0);
            ptr   <= nxt;
            state <= S_ID;
          end
        end
        default: state <= S_ID;
      endcase
    end
  end
endmodule
