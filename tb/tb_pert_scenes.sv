// tb_pert_scenes: the 512-primitive benchmark scenes on one PERT at its
// full default size.
//
// Three scenes of 512 primitives with 8 primitives per leaf shell, whose
// shell trees are binary, quad and oct trees (the 208/408/808 scenes of
// the original evaluation; the primitives here are viewer-facing squares
// instead of spheres, and the raster is W x H). For each scene the host
// loads the shell tree into the ShellProcessor's memory, the primitives
// (one packet per leaf shell) into the PrimBP and the reflectances into
// the ShadeProcessor's memory; the task programs (ray_programs) render the
// frame with primary and secondary rays; the testbench compares every
// frame-buffer word with its own trace and reports the frame time in
// clock cycles and how long each processor waited for input. The tree is built by recursive median splits, cycling
// through x, y and z, into ORDER equal parts until a part holds 8.
module tb_pert_scenes;
  import pert_pkg::*;
  localparam int W = 64, H = 48, NPRIM = 512, PPS = 8, NSURF = 4, MAXN = 160;
  localparam int MEM_AW = 16, BP_AW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              sj_req [1][3], sj_we [1][3], sj_io [1][3], sj_ack [1][3];
  logic [15:0]       sj_addr [1][3], sj_wdata [1][3], sj_rdata [1][3];
  logic              h_we [1][3];
  logic [MEM_AW-1:0] h_addr [1][3];
  logic [15:0]       h_wdata [1][3], h_rdata [1][3];
  logic              bp_enable [3], bp_ld_we [3];
  logic [BP_AW-1:0]  bp_end_addr [3], bp_ld_addr [3];
  logic [15:0]       bp_ld_data [3];
  logic              bp_sent [3], bp_skipped [3], bp_wrap [3];
  logic              stall [1][3], mem_streamed [1][3], bic_pkt [1][3], fifo_full [1][2];
  logic [3:0]        fpu_xfer [1][3];
  logic [1:0]        dbuf_swaps [1];
  logic              go = 1'b0;
  logic              done [1];

  pert_system dut (.clk, .rst_n, .sj_req, .sj_we, .sj_io, .sj_addr, .sj_wdata, .sj_rdata, .sj_ack,
    .h_we, .h_addr, .h_wdata, .h_rdata, .bp_enable, .bp_end_addr, .bp_ld_we, .bp_ld_addr,
    .bp_ld_data, .bp_sent, .bp_skipped, .bp_wrap, .stall, .mem_streamed, .fpu_xfer, .bic_pkt,
    .fifo_full, .dbuf_swaps);

  ray_programs #(.P(0), .NP(1), .W(W), .H(H), .K(4)) u_sw (.clk, .go, .done(done[0]),
    .req(sj_req[0]), .we(sj_we[0]), .io(sj_io[0]), .addr(sj_addr[0]), .wdata(sj_wdata[0]),
    .rdata(sj_rdata[0]), .ack(sj_ack[0]));

  int checks = 0, failures = 0;

  // cycles each processor spends waiting for input (its idle time), and
  // waiting on anything at all, while a frame is being rendered
  longint idle [3], waits [3];
  initial for (int s = 0; s < 3; s++) begin idle[s] = 0; waits[s] = 0; end
  always @(posedge clk) if (go && !done[0])
    for (int s = 0; s < 3; s++) begin
      if (stall[0][s]) waits[s]++;
      if (stall[0][s] && sj_io[0][s] && sj_addr[0][s] == IO_IN_DATA) idle[s]++;
    end
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  real cx [NPRIM], cy [NPRIM], rr [NPRIM], cz [NPRIM], refl [NSURF];
  int  surf [NPRIM], idx [NPRIM];
  real picture [W * H];
  // shell tree
  real nb [MAXN][6];              // min x, max x, min y, max y, min z, max z
  int  nchild [MAXN], nkids [MAXN], next_node, n_leaves;
  int  leaf_lo [NPRIM / PPS];

  function automatic logic [31:0] f32(input real r);
    return tb_fp_ref_pkg::r2sp(r);
  endfunction

  function automatic real key(input int i, input int axis);
    return axis == 0 ? cx[i] : (axis == 1 ? cy[i] : cz[i]);
  endfunction

  task automatic build(input int node, input int lo, input int hi, input int axis, input int order);
    int first, n, t, j;
    nb[node][0] = 1e9; nb[node][1] = -1e9; nb[node][2] = 1e9;
    nb[node][3] = -1e9; nb[node][4] = 1e9; nb[node][5] = -1e9;
    for (int k = lo; k < hi; k++) begin
      int i;
      i = idx[k];
      if (cx[i] - rr[i] < nb[node][0]) nb[node][0] = cx[i] - rr[i];
      if (cx[i] + rr[i] > nb[node][1]) nb[node][1] = cx[i] + rr[i];
      if (cy[i] - rr[i] < nb[node][2]) nb[node][2] = cy[i] - rr[i];
      if (cy[i] + rr[i] > nb[node][3]) nb[node][3] = cy[i] + rr[i];
      if (cz[i] < nb[node][4]) nb[node][4] = cz[i];
      if (cz[i] > nb[node][5]) nb[node][5] = cz[i];
    end
    n = hi - lo;
    if (n <= PPS) begin
      nchild[node] = 16'h0100 + n_leaves; nkids[node] = 0;
      leaf_lo[n_leaves] = lo;
      n_leaves++;
    end else begin
      // sort the range on this axis, then cut it into ORDER equal parts
      for (int a = lo + 1; a < hi; a++) begin
        t = idx[a]; j = a - 1;
        while (j >= lo && key(idx[j], axis) > key(t, axis)) begin idx[j + 1] = idx[j]; j--; end
        idx[j + 1] = t;
      end
      first = next_node; next_node += order;
      nchild[node] = first; nkids[node] = order;
      for (int k = 0; k < order; k++)
        build(first + k, lo + k * n / order, lo + (k + 1) * n / order, (axis + 1) % 3, order);
    end
  endtask

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

  task automatic hwrite(input int s, input int a, input logic [15:0] d);
    @(negedge clk);
    h_we[0][s] = 1'b1; h_addr[0][s] = MEM_AW'(a); h_wdata[0][s] = d;
    @(negedge clk);
    h_we[0][s] = 1'b0;
  endtask

  task automatic hwrite32(input int s, input int a, input real r);
    logic [31:0] v;
    v = f32(r); hwrite(s, a, v[15:0]); hwrite(s, a + 1, v[31:16]);
  endtask

  task automatic hread(input int s, input int a, output logic [15:0] d);
    @(negedge clk);
    h_addr[0][s] = MEM_AW'(a);
    @(negedge clk);
    d = h_rdata[0][s];
  endtask

  task automatic bpwrite(input int a, input logic [15:0] d);
    @(negedge clk);
    bp_ld_we[2] = 1'b1; bp_ld_addr[2] = BP_AW'(a); bp_ld_data[2] = d;
    @(negedge clk);
    bp_ld_we[2] = 1'b0;
  endtask

  task automatic bpwrite32(input int a, input real r);
    logic [31:0] v;
    v = f32(r); bpwrite(a, v[15:0]); bpwrite(a + 1, v[31:16]);
  endtask

  initial begin
    int perm [NPRIM], a, tmp, order, errs, shells0, rays0;
    longint t0, frame;
    logic [15:0] lo, hi;
    for (int s = 0; s < 3; s++) begin h_we[0][s] = 1'b0; h_addr[0][s] = '0; h_wdata[0][s] = '0; end
    for (int b = 0; b < 3; b++) begin
      bp_enable[b] = 1'b0; bp_end_addr[b] = '0; bp_ld_we[b] = 1'b0; bp_ld_addr[b] = '0; bp_ld_data[b] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int sc = 0; sc < 3; sc++) begin
      order = 2 << sc;
      // primitives with distinct depths
      for (int i = 0; i < NPRIM; i++) perm[i] = i;
      for (int i = NPRIM - 1; i > 0; i--) begin
        a = $urandom_range(0, i); tmp = perm[i]; perm[i] = perm[a]; perm[a] = tmp;
      end
      for (int i = 0; i < NPRIM; i++) begin
        cx[i] = $urandom_range(0, 4 * W) / 4.0;
        cy[i] = $urandom_range(0, 4 * H) / 4.0;
        rr[i] = (1 + $urandom_range(0, 3)) * 0.25;
        cz[i] = 2.0 + 0.5 * perm[i];
        surf[i] = $urandom_range(0, NSURF - 1);
        idx[i] = i;
      end
      for (int s = 0; s < NSURF; s++) refl[s] = (1 + $urandom_range(0, 3)) * 0.25;
      trace_reference();
      next_node = 1; n_leaves = 0;
      build(0, 0, NPRIM, 0, order);

      // ShellProcessor: one top-level shell, the root
      hwrite(1, 0, 16'd1);
      for (int n = 0; n < next_node; n++) begin
        for (int w = 0; w < 6; w++) hwrite32(1, 16'h0100 + 16 * n + 2 * w, nb[n][w]);
        hwrite(1, 16'h0100 + 16 * n + 12, 16'(nchild[n]));
        hwrite(1, 16'h0100 + 16 * n + 13, 16'(nkids[n]));
      end
      // ShadeProcessor: reflectances, cleared frame buffer
      for (int s = 0; s < NSURF; s++) hwrite32(0, 16'h0100 + 2 * s, refl[s]);
      for (int i = 0; i < 2 * W * H; i++) hwrite(0, 16'h1000 + i, 16'h0000);
      // PrimBP: one packet per leaf shell
      @(negedge clk); bp_enable[2] = 1'b0;
      a = 0;
      for (int l = 0; l < n_leaves; l++) begin
        bpwrite(a, 16'(16'h0100 + l)); bpwrite(a + 1, 16'(1 + 9 * PPS)); bpwrite(a + 2, 16'(PPS));
        a += 3;
        for (int k = leaf_lo[l]; k < leaf_lo[l] + PPS; k++) begin
          bpwrite32(a, cx[idx[k]]); bpwrite32(a + 2, cy[idx[k]]);
          bpwrite32(a + 4, rr[idx[k]]); bpwrite32(a + 6, cz[idx[k]]);
          bpwrite(a + 8, 16'(surf[idx[k]]));
          a += 9;
        end
      end
      @(negedge clk);
      bp_end_addr[2] = BP_AW'(a);
      bp_enable[2] = 1'b1;

      shells0 = u_sw.shells_tested; rays0 = u_sw.primaries + u_sw.secondaries;
      for (int s = 0; s < 3; s++) begin idle[s] = 0; waits[s] = 0; end
      t0 = longint'($time);
      go = 1'b1;
      wait (done[0]);
      frame = (longint'($time) - t0) / 10;
      go = 1'b0;
      wait (!done[0]);

      errs = 0;
      for (int pix = 0; pix < W * H; pix++) begin
        hread(0, 16'h1000 + 2 * pix, lo);
        hread(0, 16'h1001 + 2 * pix, hi);
        if ({hi, lo} != f32(picture[pix])) errs++;
        check($sformatf("scene %0d08 pixel %0d: %h, expected %h", order, pix, {hi, lo}, f32(picture[pix])),
              {hi, lo} == f32(picture[pix]));
      end
      $display("scene %0d08: %0d shells (%0d leaves), %0d rays, %0d shell tests, frame %0d cycles, %0d pixel errors",
               order, next_node, n_leaves, u_sw.primaries + u_sw.secondaries - rays0,
               u_sw.shells_tested - shells0, frame, errs);
      $display("  waiting for input (all waits): Shade %0d (%0d), Shell %0d (%0d), Prim %0d (%0d) cycles",
               idle[0], waits[0], idle[1], waits[1], idle[2], waits[2]);
      check($sformatf("scene %0d08 has %0d leaf shells", order, n_leaves), n_leaves == NPRIM / PPS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
