// tb_broadcast_proc: self-checking test of a broadcast processor.
//
// Loads a packet list into the global memory, enables transmission and
// watches the bus through several broadcast cycles. A requester model
// raises hit for a chosen set of IDs. Checks: IDs come round in memory
// order, data words follow only requested IDs, with eop on the last word,
// the data content, the hit-to-data timing, and that skipping unrequested
// packets shortens the broadcast cycle.
module tb_broadcast_proc;
  import pert_pkg::*;
  localparam int AW = 8;
  localparam int NP = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          enable, ld_we, hit_in, sent, skipped, wrap;
  logic [AW-1:0] end_addr, ld_addr;
  logic [15:0]   ld_data;
  bbus_t         bb;
  int checks = 0, failures = 0;
  int ids [NP] = '{11, 22, 33, 44, 55, 66};
  int lens [NP] = '{2, 5, 1, 3, 4, 2};
  logic want [int];

  broadcast_proc #(.AW(AW)) dut (.clk, .rst_n, .enable, .end_addr, .ld_we, .ld_addr, .ld_data,
    .bb, .hit_in, .sent, .skipped, .wrap);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // requester: hit in the cycle after an ID it wants
  logic [15:0] last_id;
  logic        last_sync;
  always_ff @(posedge clk) begin
    last_sync <= bb.sync;
    if (bb.sync) last_id <= bb.data;
  end
  always_comb hit_in = last_sync && want.exists(int'(last_id));

  // measure one broadcast cycle: list of (id, words) seen, and its length
  task automatic one_cycle(output int cyc, output int n_sent, output int n_skip);
    int pk, w, expect_words;
    cyc = 0; n_sent = 0; n_skip = 0; pk = 0;
    // start at the first packet's ID
    do @(negedge clk); while (!(bb.sync && bb.data == 16'(ids[0])));
    while (pk < NP) begin
      if (pk > 0) do begin @(negedge clk); cyc++; end while (!bb.sync);
      begin
        check($sformatf("ID %0d in order (exp %0d)", bb.data, ids[pk]), bb.data == 16'(ids[pk]));
        @(negedge clk); cyc++;
        check("bus idle in hit window", !bb.sync && !bb.valid);
        expect_words = want.exists(ids[pk]) ? lens[pk] : 0;
        w = 0;
        for (int i = 0; i < expect_words; i++) begin
          @(negedge clk); cyc++;
          check($sformatf("data %0d of %0d", i, ids[pk]), bb.valid && bb.data == 16'(ids[pk] * 100 + i));
          check("eop on last", bb.eop == (i == expect_words - 1));
          w++;
        end
        if (expect_words > 0) n_sent++; else n_skip++;
        pk++;
      end
    end
  endtask

  initial begin
    int a, c_all, c_some, ns, nk;
    enable = 0; ld_we = 0; ld_addr = 0; ld_data = 0; end_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    a = 0;
    for (int p = 0; p < NP; p++) begin
      @(negedge clk); ld_we = 1; ld_addr = AW'(a); ld_data = 16'(ids[p]); a++;
      @(negedge clk); ld_addr = AW'(a); ld_data = 16'(lens[p]); a++;
      for (int i = 0; i < lens[p]; i++) begin
        @(negedge clk); ld_addr = AW'(a); ld_data = 16'(ids[p] * 100 + i); a++;
      end
    end
    @(negedge clk); ld_we = 0; end_addr = AW'(a);
    // everybody wants everything
    foreach (ids[i]) want[ids[i]] = 1'b1;
    @(negedge clk); enable = 1;
    // wait for start of a cycle (first ID)
    one_cycle(c_all, ns, nk);
    check($sformatf("all sent %0d", ns), ns == NP && nk == 0);
    // only 22 and 55 wanted
    want.delete();
    want[22] = 1'b1; want[55] = 1'b1;
    one_cycle(c_some, ns, nk);
    check($sformatf("sent %0d skipped %0d", ns, nk), ns == 2 && nk == 4);
    check($sformatf("cycle shortened %0d < %0d", c_some, c_all), c_some < c_all);
    check($sformatf("cycle length %0d", c_some), c_some == 2 * NP - 1 + 5 + 4);
    // disabling stops transmission at the next ID
    @(negedge clk); enable = 0;
    repeat (20) begin @(negedge clk); check("quiet when disabled", !bb.sync); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
