// stream_mem: a processor's local memory module with its streaming
// controller (also used as the ShadeProcessor's frame buffer).
//
// The processor side is a request/ready port: a request is taken in the
// cycle ready is high. The controller keeps the word after the last one
// accessed prefetched in a buffer, so an access to the next sequential
// address completes in a single cycle; any other address waits FIRST_LAT
// extra cycles while the location is opened. Writes go to the array; a
// sequential write is also single cycle. A second port serves the host,
// which loads the data set before a frame and reads back the frame buffer;
// it reads with one cycle of latency and has no wait states.
// That sequential accesses after the first take a single cycle is the
// behaviour described for PERT's memory controller; the first-access time,
// the size (the full 16 bit SJBUS address space) and the host port are this
// design's choices.
module stream_mem #(
  parameter int unsigned AW        = 16,
  parameter int unsigned FIRST_LAT = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // processor side
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   wdata,
  output logic [15:0]   rdata,
  output logic          ready,
  output logic          streamed,  // the access completing now was sequential
  // host side
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [15:0]   h_wdata,
  output logic [15:0]   h_rdata
);
  logic [15:0]   mem [2**AW];
  logic [AW-1:0] next_addr;   // address expected next
  logic          next_ok;     // next_addr is open / prefetched
  logic [15:0]   pf_data;     // prefetched word at next_addr
  logic [3:0]    wait_cnt;
  logic          seq;

  always_comb begin
    seq      = next_ok && (addr == next_addr);
    ready    = req && (seq || (wait_cnt == 4'(FIRST_LAT)));
    rdata    = seq ? pf_data : mem[addr];
    streamed = ready && seq;
  end

  always_ff @(posedge clk) begin
    if (req && ready && we) mem[addr] <= wdata;
    if (h_we)               mem[h_addr] <= h_wdata;
    h_rdata <= mem[h_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_addr <= '0; next_ok <= 1'b0; pf_data <= '0; wait_cnt <= '0;
    end else begin
      if (req && ready) begin
        wait_cnt  <= '0;
        next_addr <= addr + 1'b1;
        next_ok   <= 1'b1;
        pf_data   <= mem[addr + 1'b1];
      end else if (req && !seq) begin
        wait_cnt  <= wait_cnt + 1'b1;
      end else if (!req) begin
        wait_cnt  <= '0;
      end
      // a host write to the prefetched word makes the buffer stale
      if (h_we && next_ok && h_addr == next_addr && !(req && ready)) next_ok <= 1'b0;
    end
  end
endmodule
