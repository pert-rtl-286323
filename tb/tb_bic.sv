// tb_bic: self-checking test of the Bus Interface Controller.
//
// The testbench plays the broadcast processor: it sends packet IDs with
// sync, looks at hit in the following cycle and sends the data words only
// if hit is high. The processor side arms ID registers and reads packets.
// Checks: hit only for armed IDs and only once per request, hit one cycle
// after the ID, captured data and packet ID, filling one buffer while the
// other is being read, hit withheld while both buffers are occupied.
module tb_bic;
  import pert_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bbus_t       bb;
  logic        hit, id_we, pop, rd_valid, pkt_taken;
  logic [1:0]  id_idx;
  logic [15:0] id_wdata, rd_data, rd_pktid;
  logic [7:0]  rd_left;
  int checks = 0, failures = 0, withheld = 0, hits = 0;

  bic #(.N_ID(4), .BUF_DEPTH(16)) dut (.clk, .rst_n, .bb, .hit, .id_we, .id_idx, .id_wdata,
    .pop, .rd_data, .rd_valid, .rd_left, .rd_pktid, .pkt_taken);

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

  function automatic logic [15:0] pdata(input int id, input int i);
    return 16'(id * 256 + i * 3 + 1);
  endfunction
  function automatic int plen(input int id);
    return 3 + (id % 5);
  endfunction

  // send one packet; returns whether data was sent
  task automatic send(input int id, output logic took);
    @(negedge clk);
    bb = '0; bb.sync = 1'b1; bb.data = 16'(id);
    @(negedge clk);
    bb = '0;
    took = hit;
    if (took) begin
      for (int i = 0; i < plen(id); i++) begin
        @(negedge clk);
        bb.valid = 1'b1; bb.data = pdata(id, i); bb.eop = (i == plen(id) - 1);
      end
      @(negedge clk); bb = '0;
    end
  endtask

  task automatic arm(input int idx, input int id);
    @(negedge clk);
    id_we = 1'b1; id_idx = 2'(idx); id_wdata = 16'h8000 | 16'(id);
    @(negedge clk); id_we = 1'b0;
  endtask

  task automatic read_pkt(input int id);
    int n;
    n = 0;
    check($sformatf("pktid %0d got %0d", id, rd_pktid), rd_pktid == 16'(id));
    check($sformatf("left %0d", rd_left), rd_left == 8'(plen(id)));
    while (rd_valid) begin
      check($sformatf("pkt %0d word %0d", id, n), rd_data == pdata(id, n));
      pop = 1'b1; @(negedge clk); pop = 1'b0;
      n++;
    end
    check($sformatf("pkt %0d length %0d", id, n), n == plen(id));
  endtask

  initial begin
    logic took;
    bb = '0; id_we = 0; id_idx = 0; id_wdata = 0; pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // nothing armed: no hit
    for (int id = 1; id < 6; id++) begin send(id, took); check("no hit unarmed", !took); end
    // arm 7 and 9
    arm(0, 7); arm(2, 9);
    for (int id = 5; id < 12; id++) begin
      send(id, took);
      if (took) hits++;
      check($sformatf("hit for %0d = %0d", id, took), took == (id == 7 || id == 9));
    end
    // packet 7 is in the read half, packet 9 waits in the fill half
    repeat (2) @(negedge clk);
    check("packet ready", rd_valid);
    // a third request is withheld while both halves are occupied
    arm(1, 20);
    send(20, took);
    check("hit withheld with both buffers full", !took);
    if (!took) withheld++;
    // second request for 7 was disarmed: no hit on repeat
    read_pkt(7);
    repeat (2) @(negedge clk);
    read_pkt(9);
    send(7, took); check("request 7 satisfied once", !took);
    send(20, took); check("withheld request served later", took);
    repeat (2) @(negedge clk);
    read_pkt(20);
    // freeing a register stops matching
    arm(3, 30);
    @(negedge clk); id_we = 1'b1; id_idx = 2'd3; id_wdata = 16'd30; @(negedge clk); id_we = 1'b0;
    send(30, took); check("freed register no hit", !took);
    // hit is combinational in the cycle after sync, not during it
    arm(0, 41);
    @(negedge clk); bb = '0; bb.sync = 1'b1; bb.data = 16'd41;
    #1 check("no hit during ID cycle", !hit);
    @(negedge clk); bb = '0;
    #1 check("hit in the cycle after the ID", hit);
    check($sformatf("two hits earlier %0d, withheld %0d", hits, withheld), hits == 2 && withheld == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
