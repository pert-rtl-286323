// ray_programs: behavioural stand-ins for the three task programs of one
// PERT (ShadeTask, ShellTask, PrimTask), used by the end-to-end testbench.
//
// Each stage gets an sj16_model bus master; the programs below do the work
// a task microprogram would do, using only that stage's SJBUS: its local
// memory, its FPU, its channel registers and its BIC. The hardware does
// all the arithmetic; the programs only move words and branch on FPU
// status. The scene is deliberately simple so the testbench can compute
// the exact picture: every ray runs along +z from (ox, oy, oz), shells are
// axis-aligned boxes, primitives are squares facing the viewer
// (|x-cx| <= r, |y-cy| <= r at depth cz).
//   ShadeTask: makes a primary ray per pixel of its rows (P mod NP), keeps
//     at most K rays in flight, shades each hit (0.5*factor*reflectance
//     added to the frame buffer in its local memory) and spawns a secondary
//     ray from the hit point with half the factor until the factor would
//     fall below 0.2 (adaptive depth). A frame starts when go rises; done
//     is raised when every pixel is finished and dropped after go falls.
//   ShellTask: walks the shell tree in its memory depth first, descending
//     only into shells the ray enters; writes each leaf shell entered, with
//     its entry t, into the dual buffer, sorts them by t in place and
//     commits. Shell record (16 words at 0x100 + 16*n; word 0 of memory
//     holds the number of top-level shells, records 0..): min x, max x,
//     min y, max y, min z, max z, then the leaf's packet ID or an inner
//     shell's first child record, then the child count (0 = leaf).
//   PrimTask: walks the sorted list, fetches each shell's primitives
//     through its BIC from the PrimBP, keeps the nearest hit and stops as
//     soon as that hit is nearer than the next shell; returns the result.
// With BCAST set (the multi-PERT way of working) the ShadeTask fetches the
// reflectance table once per frame from the ShadeBP (packet 0x300: word
// count, then the table) and the ShellTask fetches the shell set for every
// ray from the ShellBP (packet 0x200: word count, number of top-level
// shells, then the records), each through its BIC into local memory.
// Records: ray (Shade->Shell, 12 words) type, pixel, factor, ox, oy, oz,
// 1/dz; Shell->Prim: the ray, shell count, then (shell id, t) triples from
// word 13; result (Prim->Shade, 12 words) type, hit, pixel, factor, ox,
// oy, hit z, surface. Floats are two words, low half first.
module ray_programs #(
  parameter int P  = 0,   // this PERT's number
  parameter int NP = 1,   // number of PERTs
  parameter int W  = 8,
  parameter int H  = 4,
  parameter int K  = 4,   // rays in flight per PERT
  parameter bit BCAST = 0 // 1: shell and shading data come over the broadcast buses
) (
  input  logic        clk,
  input  logic        go,
  output logic        done,
  output logic        req   [3],
  output logic        we    [3],
  output logic        io    [3],
  output logic [15:0] addr  [3],
  output logic [15:0] wdata [3],
  input  logic [15:0] rdata [3],
  input  logic        ack   [3]
);
  import pert_pkg::*;

  localparam logic [31:0] F_ZERO = 32'h0000_0000, F_HALF = 32'h3F00_0000,
                          F_ONE  = 32'h3F80_0000, F_CUT  = 32'h3E4C_CCCD;
  localparam logic [15:0] REFL_BASE = 16'h0100, FB_BASE = 16'h1000, SHELL_BASE = 16'h0100;
  localparam logic [7:0]  XFER_A = 8'h40, XFER_B = 8'h80;   // command transfer bits
  localparam int XS_GT = 2, XS_LE = 4, XS_GE = 5;             // extended status bits
  localparam logic [15:0] SHADE_PKT = 16'h0300, SHELL_PKT = 16'h0200;

  // statistics read by the testbench
  int primaries = 0, secondaries = 0, depth_cuts = 0, misses = 0;
  int shells_hit = 0, sort_moves = 0, early_stops = 0, shells_cut = 0, fetched = 0;
  int prim_tests = 0, id_mismatch = 0, shells_tested = 0, bcast_words = 0;

  sj16_model sh (.clk, .req(req[0]), .we(we[0]), .io(io[0]), .addr(addr[0]), .wdata(wdata[0]),
                 .rdata(rdata[0]), .ack(ack[0]));
  sj16_model sl (.clk, .req(req[1]), .we(we[1]), .io(io[1]), .addr(addr[1]), .wdata(wdata[1]),
                 .rdata(rdata[1]), .ack(ack[1]));
  sj16_model pr (.clk, .req(req[2]), .we(we[2]), .io(io[2]), .addr(addr[2]), .wdata(wdata[2]),
                 .rdata(rdata[2]), .ack(ack[2]));

  initial done = 1'b0;

  // ------------------------------------------------------------ ShadeTask
  task automatic spawn(input logic [15:0] kind, input int pix, input logic [31:0] factor,
                       input logic [31:0] ox, input logic [31:0] oy, input logic [31:0] oz,
                       input logic [31:0] invdz);
    sh.put(kind); sh.put(16'(pix)); sh.put32(factor);
    sh.put32(ox); sh.put32(oy); sh.put32(oz); sh.put32(invdz);
  endtask

  // pixel coordinate n + 0.5 as a float, computed by the FPU (int->float,
  // result fed back into A, then add)
  task automatic coord(input int n, output logic [31:0] f);
    sh.fwr32(FR_A_ALU_LO, 32'(n));
    sh.fcmd(XFER_A | 8'(ALU_FLT), 8'd0);
    sh.fwr32(FR_B_ALU_LO, F_HALF);
    sh.fcmd(8'(ALU_ADD), 8'd0);
    sh.frd32(FR_C_ALU_LO, f);
  endtask

  initial forever begin : shade_task
    int npix, next, inflight, finished, pix;
    logic [15:0] q, rec [12];
    logic [31:0] invdz, ox, oy, factor, refl, fb, nf;
    wait (go);
    npix = 0;
    for (int y = 0; y < H; y++) if (y % NP == P) npix += W;
    next = 0; inflight = 0; finished = 0;
    if (BCAST) begin
      // the reflectance table arrives from the ShadeBP: copy it to memory
      logic [15:0] n, w;
      sh.iowr(IO_BIC_ID, 16'h8000 | SHADE_PKT);
      sh.iord(IO_BIC_DATA, n);
      for (int i = 0; i < int'(n); i++) begin sh.iord(IO_BIC_DATA, w); sh.memwr(REFL_BASE + 16'(i), w); end
      bcast_words += int'(n);
    end
    // every ray runs along +z: 1/dz = 1/1, by the divider
    sh.fwr32(FR_A_ALU_LO, F_ONE);
    sh.fwr32(FR_B_ALU_LO, F_ONE);
    sh.fcmd(8'(ALU_DIV), 8'd0);
    sh.frd32(FR_C_ALU_LO, invdz);
    while (finished < npix) begin
      sh.iord(IO_IN_STATUS, q);
      if (!q[0] && inflight < K && next < npix) begin
        pix = ((next / W) * NP + P) * W + next % W;
        coord(pix % W, ox);
        coord(pix / W, oy);
        spawn(16'd0, pix, F_ONE, ox, oy, F_ZERO, invdz);
        next++; inflight++; primaries++;
      end else begin
        for (int i = 0; i < 12; i++) sh.get(rec[i]);
        inflight--;
        pix = int'(rec[2]);
        factor = {rec[4], rec[3]};
        if (rec[1] == 16'd0) begin
          finished++; misses++;
        end else begin
          // contribution = (factor * 0.5) * reflectance, chained through the
          // MUL->MUL and MUL->ALU paths, then added to the frame buffer
          sh.fwr32(FR_A_MUL_LO, factor);
          sh.fwr32(FR_B_MUL_LO, F_HALF);
          sh.fcmd(8'd0, XFER_A | 8'(MUL_MUL));
          sh.memrd32(REFL_BASE + 16'd2 * rec[11], refl);
          sh.fwr32(FR_B_MUL_LO, refl);
          sh.fcmd(8'd0, XFER_B | 8'(MUL_MUL));
          sh.memrd32(FB_BASE + 16'(2 * pix), fb);
          sh.fwr32(FR_A_ALU_LO, fb);
          sh.fcmd(8'(ALU_ADD), 8'd0);
          sh.frd32(FR_C_ALU_LO, fb);
          sh.memwr32(FB_BASE + 16'(2 * pix), fb);
          // next factor, and whether it is still worth a ray
          sh.fwr32(FR_A_MUL_LO, factor);
          sh.fwr32(FR_B_MUL_LO, F_HALF);
          sh.fcmd(8'd0, 8'(MUL_MUL));
          sh.frd32(FR_C_MUL_LO, nf);
          sh.fwr32(FR_A_ALU_LO, nf);
          sh.fwr32(FR_B_ALU_LO, F_CUT);
          sh.fcmd(8'(ALU_CMP), 8'd0);
          sh.iord(16'(FR_XSTATUS), q);
          if (q[XS_GE]) begin
            spawn(16'd1, pix, nf, {rec[6], rec[5]}, {rec[8], rec[7]}, {rec[10], rec[9]}, invdz);
            inflight++; secondaries++;
          end else begin
            finished++; depth_cuts++;
          end
        end
      end
    end
    done = 1'b1;
    wait (!go);
    done = 1'b0;
  end

  // ------------------------------------------------------------ ShellTask
  // compare a with b on the given FPU, return the extended status
  task automatic cmp_sl(input logic [31:0] a, input logic [31:0] b, output logic [15:0] xs);
    sl.fwr32(FR_A_ALU_LO, a); sl.fwr32(FR_B_ALU_LO, b);
    sl.fcmd(8'(ALU_CMP), 8'd0);
    sl.iord(16'(FR_XSTATUS), xs);
  endtask

  task automatic buf_rd(input int a, output logic [15:0] q);
    sl.iowr(IO_OUT_PTR, 16'(a)); sl.iord(IO_OUT_DATA, q);
  endtask

  initial begin : shell_task
    logic [15:0] hdr [12], q, nsh, child, nkids, kid, xs;
    logic [31:0] ox, oy, oz, invdz, v, t, kt, jt;
    int cnt, base, j;
    int stack [$];
    bit in_box;
    wait (go);
    forever begin
      for (int i = 0; i < 12; i++) sl.get(hdr[i]);
      ox = {hdr[5], hdr[4]}; oy = {hdr[7], hdr[6]}; oz = {hdr[9], hdr[8]}; invdz = {hdr[11], hdr[10]};
      sl.iowr(IO_OUT_PTR, 16'd0);
      for (int i = 0; i < 12; i++) sl.put(hdr[i]);
      // depth-first walk of the shell tree; the top-level shells are
      // records 0 .. nsh-1
      if (BCAST) begin
        // the shell set arrives from the ShellBP for every ray: the count of
        // top-level shells, then the records, copied to memory
        logic [15:0] n, w;
        sl.iowr(IO_BIC_ID, 16'h8000 | SHELL_PKT);
        sl.iord(IO_BIC_DATA, n);
        sl.iord(IO_BIC_DATA, nsh);
        for (int i = 0; i < int'(n) - 1; i++) begin sl.iord(IO_BIC_DATA, w); sl.memwr(SHELL_BASE + 16'(i), w); end
        bcast_words += int'(n);
      end else begin
        sl.memrd(16'd0, nsh);
      end
      for (int s = int'(nsh) - 1; s >= 0; s--) stack.push_back(s);
      cnt = 0;
      while (stack.size() > 0) begin
        base = int'(SHELL_BASE) + 16 * stack.pop_back();
        shells_tested++;
        in_box = 1'b1;
        sl.memrd32(16'(base + 0), v);  cmp_sl(ox, v, xs); in_box &= xs[XS_GE];
        if (in_box) begin sl.memrd32(16'(base + 2), v);  cmp_sl(ox, v, xs); in_box &= xs[XS_LE]; end
        if (in_box) begin sl.memrd32(16'(base + 4), v);  cmp_sl(oy, v, xs); in_box &= xs[XS_GE]; end
        if (in_box) begin sl.memrd32(16'(base + 6), v);  cmp_sl(oy, v, xs); in_box &= xs[XS_LE]; end
        if (in_box) begin sl.memrd32(16'(base + 10), v); cmp_sl(v, oz, xs); in_box &= xs[XS_GT]; end
        if (in_box) begin
          sl.memrd(16'(base + 12), child);
          sl.memrd(16'(base + 13), nkids);
          if (nkids != 16'd0) begin
            // inner shell: visit its children (records child .. child+nkids-1)
            for (int k = int'(nkids) - 1; k >= 0; k--) stack.push_back(int'(child) + k);
          end else begin
            // leaf shell: entry t = (minz - oz) * (1/dz), the ALU result
            // going straight to B_MUL
            sl.memrd32(16'(base + 8), v);
            sl.fwr32(FR_A_ALU_LO, v); sl.fwr32(FR_B_ALU_LO, oz);
            sl.fwr32(FR_A_MUL_LO, invdz);
            sl.fcmd(XFER_B | 8'(ALU_SUB), 8'd0);
            sl.fcmd(8'd0, 8'(MUL_MUL));
            sl.frd32(FR_C_MUL_LO, t);
            if (t[31]) t = F_ZERO;             // origin already inside the slab
            sl.iowr(IO_OUT_PTR, 16'(13 + 3 * cnt));
            sl.put(child); sl.put32(t);
            cnt++; shells_hit++;
          end
        end
      end
      // insertion sort of the (id, t) triples by t, in place in the buffer
      for (int i = 1; i < cnt; i++) begin
        buf_rd(13 + 3 * i, kid); buf_rd(14 + 3 * i, q); kt[15:0] = q; buf_rd(15 + 3 * i, q); kt[31:16] = q;
        j = i - 1;
        while (j >= 0) begin
          buf_rd(14 + 3 * j, q); jt[15:0] = q; buf_rd(15 + 3 * j, q); jt[31:16] = q;
          cmp_sl(jt, kt, xs);
          if (!xs[XS_GT]) break;
          buf_rd(13 + 3 * j, q);
          sl.iowr(IO_OUT_PTR, 16'(13 + 3 * (j + 1)));
          sl.put(q); sl.put32(jt);
          sort_moves++;
          j--;
        end
        sl.iowr(IO_OUT_PTR, 16'(13 + 3 * (j + 1)));
        sl.put(kid); sl.put32(kt);
      end
      sl.iowr(IO_OUT_PTR, 16'd12);
      sl.put(16'(cnt));
      sl.iowr(IO_OUT_COMMIT, 16'd0);
    end
  end

  // ------------------------------------------------------------- PrimTask
  task automatic cmp_pr(input logic [31:0] a, input logic [31:0] b, output logic [15:0] xs);
    pr.fwr32(FR_A_ALU_LO, a); pr.fwr32(FR_B_ALU_LO, b);
    pr.fcmd(8'(ALU_CMP), 8'd0);
    pr.iord(16'(FR_XSTATUS), xs);
  endtask

  // |o - c| <= r, with o - c fed back into A_ALU for both compares
  task automatic in_range(input logic [31:0] o, input logic [31:0] c, input logic [31:0] r,
                        output bit ok);
    logic [15:0] xs;
    pr.fwr32(FR_A_ALU_LO, o); pr.fwr32(FR_B_ALU_LO, c);
    pr.fcmd(XFER_A | 8'(ALU_SUB), 8'd0);
    pr.fwr32(FR_B_ALU_LO, r);
    pr.fcmd(8'(ALU_CMP), 8'd0);
    pr.iord(16'(FR_XSTATUS), xs);
    ok = xs[XS_LE];
    pr.fwr32(FR_B_ALU_LO, {~r[31], r[30:0]});
    pr.fcmd(8'(ALU_CMP), 8'd0);
    pr.iord(16'(FR_XSTATUS), xs);
    ok &= xs[XS_GE];
  endtask

  initial begin : prim_task
    logic [15:0] hdr [13], q, child, n, pid, xs, best_surf;
    logic [15:0] pw [9];
    logic [31:0] ox, oy, oz, t, tp, best_t, best_z, cz;
    int cnt;
    bit best_v, ok;
    wait (go);
    forever begin
      for (int i = 0; i < 13; i++) pr.get(hdr[i]);
      ox = {hdr[5], hdr[4]}; oy = {hdr[7], hdr[6]}; oz = {hdr[9], hdr[8]};
      cnt = int'(hdr[12]);
      best_v = 1'b0; best_t = '0; best_z = '0; best_surf = '0;
      for (int i = 0; i < cnt; i++) begin
        pr.iowr(IO_IN_PTR, 16'(13 + 3 * i));
        pr.get(child); pr.get32(t);
        if (best_v) begin
          cmp_pr(best_t, t, xs);
          if (xs[1]) begin early_stops++; shells_cut += cnt - i; break; end
        end
        pr.iowr(IO_BIC_ID, 16'h8000 | child);
        pr.iord(IO_BIC_DATA, n);
        pr.iord(IO_BIC_PKTID, pid);
        if (pid != child) id_mismatch++;
        fetched++;
        for (int k = 0; k < int'(n); k++) begin
          for (int w = 0; w < 9; w++) pr.iord(IO_BIC_DATA, pw[w]);
          prim_tests++;
          cz = {pw[7], pw[6]};
          in_range(ox, {pw[1], pw[0]}, {pw[5], pw[4]}, ok);
          if (ok) in_range(oy, {pw[3], pw[2]}, {pw[5], pw[4]}, ok);
          if (ok) begin cmp_pr(cz, oz, xs); ok = xs[XS_GT]; end
          if (ok) begin
            pr.fwr32(FR_A_ALU_LO, cz); pr.fwr32(FR_B_ALU_LO, oz);
            pr.fcmd(8'(ALU_SUB), 8'd0);
            pr.frd32(FR_C_ALU_LO, tp);
            if (best_v) begin cmp_pr(tp, best_t, xs); ok = xs[1]; end
            if (ok) begin best_v = 1'b1; best_t = tp; best_z = cz; best_surf = pw[8]; end
          end
        end
      end
      pr.iowr(IO_IN_RELEASE, 16'd0);
      pr.put(hdr[0]); pr.put(16'(best_v)); pr.put(hdr[1]);
      pr.put(hdr[2]); pr.put(hdr[3]);
      pr.put32(ox); pr.put32(oy); pr.put32(best_z); pr.put(best_surf);
    end
  end
endmodule
