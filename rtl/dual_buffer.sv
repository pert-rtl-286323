// dual_buffer: the double buffer between the ShellProcessor and the
// PrimProcessor.
//
// The ShellProcessor builds a whole record (ray, then its list of leaf
// shells) in one bank and sorts the list in place, so it needs random read
// and write access; only when the record is complete does it commit the
// bank, which then belongs to the PrimProcessor. Meanwhile the writer fills
// the other bank. The reader reads its bank at any address and releases it
// when done. w_ready is low while the writer's bank still holds a record
// the reader has not released (the writer must wait); r_valid is high while
// the reader owns a full bank. Reads are combinational.
// The two-bank scheme and why it is needed follow the description of PERT's
// communication; the bank size is this design's: a record of up to 50 leaf
// shells of 3 words (shell index, 32 bit t-value) plus a 22 word ray
// header fits in 256 words.
module dual_buffer #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // writer (ShellProcessor)
  input  logic          w_en,
  input  logic [AW-1:0] w_addr,
  input  logic [15:0]   w_wdata,
  output logic [15:0]   w_rdata,
  input  logic          w_commit,
  output logic          w_ready,
  // reader (PrimProcessor)
  input  logic [AW-1:0] r_addr,
  output logic [15:0]   r_rdata,
  output logic          r_valid,
  input  logic          r_release,
  output logic [1:0]    swaps      // [0] pulses on commit, [1] on release
);
  logic [15:0] bank0 [DEPTH];
  logic [15:0] bank1 [DEPTH];
  logic        wsel, rsel;
  logic [1:0]  full;

  always_comb begin
    w_ready = !full[wsel];
    r_valid = full[rsel];
    w_rdata = wsel ? bank1[w_addr] : bank0[w_addr];
    r_rdata = rsel ? bank1[r_addr] : bank0[r_addr];
  end

  always_ff @(posedge clk) begin
    if (w_en && w_ready) begin
      if (wsel) bank1[w_addr] <= w_wdata;
      else      bank0[w_addr] <= w_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wsel <= 1'b0; rsel <= 1'b0; full <= 2'b00; swaps <= 2'b00;
    end else begin
      swaps <= 2'b00;
      if (w_commit && w_ready) begin
        full[wsel] <= 1'b1;
        wsel       <= !wsel;
        swaps[0]   <= 1'b1;
      end
      if (r_release && r_valid) begin
        full[rsel] <= 1'b0;
        rsel       <= !rsel;
        swaps[1]   <= 1'b1;
      end
    end
  end

  // the writer and the reader never own the same bank
  a_banks_apart: assert property (@(posedge clk) disable iff (!rst_n)
                                  (full[wsel] == 1'b0) |-> (wsel != rsel || !full[rsel]));
endmodule
