// tb_pert_system: end-to-end test of the PERT system at its full size.
//
// The top is instantiated with no parameter override (one PERT, 64K-word
// local memories, 64K-word broadcast memories, 256-word BIC buffers, 64-word FIFOs, 256-word dual
// buffer, document FPU latencies). Behavioural task programs (ray_programs)
// drive each stage's SJBUS. The host loads the data sets: leaf shells into
// the ShellProcessor memory, reflectances into the ShadeProcessor memory,
// and the primitives, one packet per leaf shell plus unrequested packets,
// into the PrimBP. The PERT then renders a W x H picture with primary and
// secondary rays, and the testbench compares every frame-buffer word with
// a picture it traces itself in real arithmetic (all values are exact in
// single precision). It also counts each hardware mechanism on the way and
// fails if any of them never happened: stalls on an empty ray FIFO and an
// empty dual buffer, the Shell waiting for a free buffer bank, bank swaps,
// streamed and non-streamed memory accesses, FPU interlock waits and every
// FPU transfer path, BIC packet captures and waits, broadcast packets sent
// and skipped and broadcast cycles completed, secondary rays, the adaptive
// depth cut, the sort moving entries and the PrimTask's early stop.
module tb_pert_system;
  import pert_pkg::*;
  localparam int NP = 1;
  localparam int W = 8, H = 6, NSH = 4, NPS = 8, NSURF = 4, NPRIM = NSH * NPS;
  localparam int MEM_AW = 16, BP_AW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              sj_req [NP][3], sj_we [NP][3], sj_io [NP][3], sj_ack [NP][3];
  logic [15:0]       sj_addr [NP][3], sj_wdata [NP][3], sj_rdata [NP][3];
  logic              h_we [NP][3];
  logic [MEM_AW-1:0] h_addr [NP][3];
  logic [15:0]       h_wdata [NP][3], h_rdata [NP][3];
  logic              bp_enable [3], bp_ld_we [3];
  logic [BP_AW-1:0]  bp_end_addr [3], bp_ld_addr [3];
  logic [15:0]       bp_ld_data [3];
  logic              bp_sent [3], bp_skipped [3], bp_wrap [3];
  logic              stall [NP][3], mem_streamed [NP][3], bic_pkt [NP][3], fifo_full [NP][2];
  logic [3:0]        fpu_xfer [NP][3];
  logic [1:0]        dbuf_swaps [NP];
  logic              go = 1'b0;
  logic              done [NP];
  int                st [NP][10];   // task program statistics per PERT

  pert_system dut (.clk, .rst_n, .sj_req, .sj_we, .sj_io, .sj_addr, .sj_wdata, .sj_rdata, .sj_ack,
    .h_we, .h_addr, .h_wdata, .h_rdata, .bp_enable, .bp_end_addr, .bp_ld_we, .bp_ld_addr,
    .bp_ld_data, .bp_sent, .bp_skipped, .bp_wrap, .stall, .mem_streamed, .fpu_xfer, .bic_pkt,
    .fifo_full, .dbuf_swaps);

  for (genvar p = 0; p < NP; p++) begin : g_sw
    ray_programs #(.P(p), .NP(NP), .W(W), .H(H), .K(4)) u_sw (.clk, .go, .done(done[p]),
      .req(sj_req[p]), .we(sj_we[p]), .io(sj_io[p]), .addr(sj_addr[p]), .wdata(sj_wdata[p]),
      .rdata(sj_rdata[p]), .ack(sj_ack[p]));
    always @(posedge clk) begin
      st[p][0] = u_sw.primaries;  st[p][1] = u_sw.secondaries; st[p][2] = u_sw.depth_cuts;
      st[p][3] = u_sw.misses;     st[p][4] = u_sw.sort_moves;  st[p][5] = u_sw.early_stops;
      st[p][6] = u_sw.shells_cut; st[p][7] = u_sw.fetched;     st[p][8] = u_sw.id_mismatch;
      st[p][9] = u_sw.shells_hit;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ mechanism counts
  int n_fifo_empty, n_buf_empty, n_buf_wait, n_swaps, n_streamed, n_nonseq, n_fpu_wait;
  int n_bic_wait, n_bic_pkt, n_sent, n_skipped, n_wraps, n_fifo_full, n_shared;
  int n_xfer [4];
  initial begin
    n_fifo_empty = 0; n_buf_empty = 0; n_buf_wait = 0; n_swaps = 0; n_streamed = 0; n_nonseq = 0;
    n_fpu_wait = 0; n_bic_wait = 0; n_bic_pkt = 0; n_sent = 0; n_skipped = 0; n_wraps = 0;
    n_fifo_full = 0; n_shared = 0;
    for (int i = 0; i < 4; i++) n_xfer[i] = 0;
  end
  logic [1:0] swaps_q [NP];
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      for (int s = 0; s < 3; s++) begin
        if (stall[p][s] && sj_io[p][s]) begin
          if (sj_addr[p][s] == IO_IN_DATA)    begin if (s == 2) n_buf_empty++; else n_fifo_empty++; end
          if (s == 1 && (sj_addr[p][s] == IO_OUT_DATA || sj_addr[p][s] == IO_OUT_COMMIT)) n_buf_wait++;
          if (s != 1 && sj_addr[p][s] == IO_OUT_DATA) n_fifo_full++;
          if (sj_addr[p][s] < 16'h0010)       n_fpu_wait++;
          if (sj_addr[p][s] == IO_BIC_DATA)   n_bic_wait++;
        end
        if (stall[p][s] && !sj_io[p][s]) n_nonseq++;
        if (mem_streamed[p][s]) n_streamed++;
        if (bic_pkt[p][s]) n_bic_pkt++;
        for (int i = 0; i < 4; i++) if (fpu_xfer[p][s][i]) n_xfer[i]++;
      end
      if (dbuf_swaps[p] != swaps_q[p]) n_swaps++;
      swaps_q[p] <= dbuf_swaps[p];
    end
    // one broadcast captured by more than one PERT (ORed hit lines)
    begin
      int c = 0;
      for (int p = 0; p < NP; p++) if (bic_pkt[p][2]) c++;
      if (c > 1) n_shared++;
    end
    if (bp_sent[2]) n_sent++;
    if (bp_skipped[2]) n_skipped++;
    if (bp_wrap[2]) n_wraps++;
  end

  // ---------------------------------------------------------------- scene
  real cx [NPRIM], cy [NPRIM], rr [NPRIM], cz [NPRIM], refl [NSURF];
  int  surf [NPRIM];
  real picture [W * H];

  function automatic logic [31:0] f32(input real r);
    return tb_fp_ref_pkg::r2sp(r);
  endfunction

  task automatic hwrite(input int p, input int s, input int a, input logic [15:0] d);
    @(negedge clk);
    h_we[p][s] = 1'b1; h_addr[p][s] = MEM_AW'(a); h_wdata[p][s] = d;
    @(negedge clk);
    h_we[p][s] = 1'b0;
  endtask

  task automatic hread(input int p, input int s, input int a, output logic [15:0] d);
    @(negedge clk);
    h_addr[p][s] = MEM_AW'(a);
    @(negedge clk);
    d = h_rdata[p][s];
  endtask

  task automatic bpwrite(input int a, input logic [15:0] d);
    @(negedge clk);
    bp_ld_we[2] = 1'b1; bp_ld_addr[2] = BP_AW'(a); bp_ld_data[2] = d;
    @(negedge clk);
    bp_ld_we[2] = 1'b0;
  endtask

  // reference: trace each pixel the same way the task programs do
  task automatic trace_reference();
    real oz, factor, best;
    int bi;
    for (int pix = 0; pix < W * H; pix++) begin
      picture[pix] = 0.0;
      oz = 0.0; factor = 1.0;
      forever begin
        bi = -1; best = 0.0;
        for (int i = 0; i < NPRIM; i++)
          if ((pix % W) + 0.5 - cx[i] <= rr[i] && (pix % W) + 0.5 - cx[i] >= -rr[i] &&
              (pix / W) + 0.5 - cy[i] <= rr[i] && (pix / W) + 0.5 - cy[i] >= -rr[i] &&
              cz[i] > oz && (bi < 0 || cz[i] < best)) begin
            bi = i; best = cz[i];
          end
        if (bi < 0) break;
        picture[pix] += 0.5 * factor * refl[surf[bi]];
        factor = factor * 0.5;
        if (factor < 0.2) break;
        oz = best;
      end
    end
  endtask

  initial begin
    int perm [NPRIM], order [NSH], a, tmp, base;
    real mnx, mxx, mny, mxy, mnz, mxz;
    logic [15:0] lo, hi;
    logic [31:0] v;
    for (int p = 0; p < NP; p++) for (int s = 0; s < 3; s++) begin
      h_we[p][s] = 1'b0; h_addr[p][s] = '0; h_wdata[p][s] = '0;
    end
    for (int b = 0; b < 3; b++) begin
      bp_enable[b] = 1'b0; bp_end_addr[b] = '0; bp_ld_we[b] = 1'b0; bp_ld_addr[b] = '0; bp_ld_data[b] = '0;
    end
    for (int p = 0; p < NP; p++) swaps_q[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // primitives: distinct depths, grouped into shells by depth
    for (int i = 0; i < NPRIM; i++) perm[i] = i;
    for (int i = NPRIM - 1; i > 0; i--) begin
      a = $urandom_range(0, i); tmp = perm[i]; perm[i] = perm[a]; perm[a] = tmp;
    end
    for (int i = 0; i < NPRIM; i++) begin
      cx[i] = $urandom_range(0, 4 * W) / 4.0;
      cy[i] = $urandom_range(0, 4 * H) / 4.0;
      rr[i] = (1 + $urandom_range(0, 9)) * 0.25;
      cz[i] = 2.0 + i + 0.5 * $urandom_range(0, 1);
      surf[i] = $urandom_range(0, NSURF - 1);
    end
    for (int s = 0; s < NSURF; s++) refl[s] = (1 + $urandom_range(0, 3)) * 0.25;
    trace_reference();

    // leaf shells, stored in shuffled order so the ShellTask's sort works
    for (int s = 0; s < NSH; s++) order[s] = s;
    for (int s = NSH - 1; s > 0; s--) begin
      a = $urandom_range(0, s); tmp = order[s]; order[s] = order[a]; order[a] = tmp;
    end
    for (int p = 0; p < NP; p++) begin
      hwrite(p, 1, 0, 16'(NSH));
      for (int k = 0; k < NSH; k++) begin
        int s;
        s = order[k];
        mnx = 1e9; mxx = -1e9; mny = 1e9; mxy = -1e9; mnz = 1e9; mxz = -1e9;
        for (int j = s * NPS; j < s * NPS + NPS; j++) begin
          if (cx[j] - rr[j] < mnx) mnx = cx[j] - rr[j];
          if (cx[j] + rr[j] > mxx) mxx = cx[j] + rr[j];
          if (cy[j] - rr[j] < mny) mny = cy[j] - rr[j];
          if (cy[j] + rr[j] > mxy) mxy = cy[j] + rr[j];
          if (cz[j] < mnz) mnz = cz[j];
          if (cz[j] > mxz) mxz = cz[j];
        end
        base = 16'h0100 + 16 * k;
        v = f32(mnx); hwrite(p, 1, base + 0, v[15:0]);  hwrite(p, 1, base + 1, v[31:16]);
        v = f32(mxx); hwrite(p, 1, base + 2, v[15:0]);  hwrite(p, 1, base + 3, v[31:16]);
        v = f32(mny); hwrite(p, 1, base + 4, v[15:0]);  hwrite(p, 1, base + 5, v[31:16]);
        v = f32(mxy); hwrite(p, 1, base + 6, v[15:0]);  hwrite(p, 1, base + 7, v[31:16]);
        v = f32(mnz); hwrite(p, 1, base + 8, v[15:0]);  hwrite(p, 1, base + 9, v[31:16]);
        v = f32(mxz); hwrite(p, 1, base + 10, v[15:0]); hwrite(p, 1, base + 11, v[31:16]);
        hwrite(p, 1, base + 12, 16'(16'h0100 + s));
        hwrite(p, 1, base + 13, 16'd0);        // a leaf shell
      end
      for (int s = 0; s < NSURF; s++) begin
        v = f32(refl[s]); hwrite(p, 0, 16'h0100 + 2 * s, v[15:0]); hwrite(p, 0, 16'h0101 + 2 * s, v[31:16]);
      end
      for (int i = 0; i < 2 * W * H; i++) hwrite(p, 0, 16'h1000 + i, 16'h0000);
    end

    // PrimBP: one packet per leaf shell, ID 0x100+s, then two packets
    // nobody asks for
    a = 0;
    for (int s = 0; s < NSH; s++) begin
      bpwrite(a, 16'(16'h0100 + s)); bpwrite(a + 1, 16'(1 + 9 * NPS)); bpwrite(a + 2, 16'(NPS));
      a += 3;
      for (int j = s * NPS; j < s * NPS + NPS; j++) begin
        v = f32(cx[j]); bpwrite(a, v[15:0]); bpwrite(a + 1, v[31:16]);
        v = f32(cy[j]); bpwrite(a + 2, v[15:0]); bpwrite(a + 3, v[31:16]);
        v = f32(rr[j]); bpwrite(a + 4, v[15:0]); bpwrite(a + 5, v[31:16]);
        v = f32(cz[j]); bpwrite(a + 6, v[15:0]); bpwrite(a + 7, v[31:16]);
        bpwrite(a + 8, 16'(surf[j]));
        a += 9;
      end
    end
    for (int d = 0; d < 2; d++) begin
      bpwrite(a, 16'(16'h7F00 + d)); bpwrite(a + 1, 16'd4);
      for (int w = 0; w < 4; w++) bpwrite(a + 2 + w, 16'(w));
      a += 6;
    end
    @(negedge clk);
    bp_end_addr[2] = BP_AW'(a);
    bp_enable[2] = 1'b1;

    go = 1'b1;
    for (int p = 0; p < NP; p++) wait (done[p]);
    repeat (4) @(negedge clk);

    // frame buffer against the reference picture
    for (int pix = 0; pix < W * H; pix++) begin
      hread((pix / W) % NP, 0, 16'h1000 + 2 * pix, lo);
      hread((pix / W) % NP, 0, 16'h1001 + 2 * pix, hi);
      check($sformatf("pixel %0d: %h, expected %h (%f)", pix, {hi, lo}, f32(picture[pix]), picture[pix]),
            {hi, lo} == f32(picture[pix]));
    end

    begin
      int prim = 0, sec = 0, cuts = 0, miss = 0, moves = 0, early = 0, cut = 0, fetch = 0, mism = 0, hits = 0;
      for (int p = 0; p < NP; p++) begin
        prim += st[p][0]; sec += st[p][1]; cuts += st[p][2]; miss += st[p][3]; moves += st[p][4];
        early += st[p][5]; cut += st[p][6]; fetch += st[p][7]; mism += st[p][8]; hits += st[p][9];
      end
      $display("rays: %0d primary, %0d secondary; %0d misses, %0d depth cuts", prim, sec, miss, cuts);
      $display("shells: %0d hit, %0d sort moves, %0d fetched, %0d early stops (%0d shells not searched)",
               hits, moves, fetch, early, cut);
      $display("stalls: fifo-empty %0d, buffer-empty %0d, buffer-wait %0d, fpu %0d, bic %0d, memory %0d",
               n_fifo_empty, n_buf_empty, n_buf_wait, n_fpu_wait, n_bic_wait, n_nonseq);
      $display("memory: %0d streamed; buffer swaps %0d; waits on a full FIFO %0d", n_streamed, n_swaps, n_fifo_full);
      $display("fpu transfers: C_ALU->A_ALU %0d, C_ALU->B_MUL %0d, C_MUL->A_MUL %0d, C_MUL->B_ALU %0d",
               n_xfer[0], n_xfer[1], n_xfer[2], n_xfer[3]);
      $display("broadcast: %0d sent, %0d skipped, %0d cycles; %0d packets captured, %0d cycles capturing in several PERTs",
               n_sent, n_skipped, n_wraps, n_bic_pkt, n_shared);
      check($sformatf("all pixels started (%0d)", prim), prim == W * H);
      check("packet IDs match requests", mism == 0);
      check("secondary rays", sec > 0);
      check("rays that miss", miss > 0);
      check("adaptive depth cut", cuts > 0);
      check("sort moved entries", moves > 0);
      check("early stop in PrimTask", early > 0);
      check("stall on empty ray FIFO", n_fifo_empty > 0);
      check("stall on empty dual buffer", n_buf_empty > 0);
      check("Shell waited for a free bank", n_buf_wait > 0);
      check("dual buffer swaps", n_swaps > 0);
      check("FPU interlock waits", n_fpu_wait > 0);
      check("BIC data waits", n_bic_wait > 0);
      check("non-streamed memory waits", n_nonseq > 0);
      check("streamed memory accesses", n_streamed > 0);
      for (int i = 0; i < 4; i++) check($sformatf("FPU transfer path %0d", i), n_xfer[i] > 0);
      check("BP packets sent", n_sent > 0);
      check("BP packets skipped", n_skipped > 0);
      check("BP cycles completed", n_wraps > 0);
      check("BIC packets captured", n_bic_pkt == fetch);
      if (NP > 1) check("one broadcast served several PERTs", n_shared > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
