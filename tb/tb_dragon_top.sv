// tb_dragon_top: end-to-end test of the DRAGON overlay at its default size
// (3 x 3 broadcast clusters, 12 x 12 = 144 PEs, 512-word buffers, 4096-line
// IM), running the two stencil kernels of the document on grids of
// 48 x 48, 96 x 96, 192 x 192 and 384 x 384 points.
//
// Mapping: the grid is cut into B x B blocks, one per PE (B = 4, 8, 16,
// 32). For B <= 8 a block lives in the register file, in two register
// sets X and Y. For B = 16 and 32 it does not fit: both copies of the
// block live in LM, rows are loaded (LD, memory slot) into four rotating
// register sets one row ahead of their first use, and the last FMACCA
// of a point writes it to LM and to a scratch register (mode RF+LM).
// One iteration computes every point of the block,
//     u' = c0*u_N + c1*u_S + c2*u + c3*u_W + c4*u_E
// as FMUL followed by a chain of FMACCA through the FPU accumulator (the
// c2 term is left out for Laplace: 4 FP instructions, 7 operations per
// point; 5 instructions, 9 operations for the 5-point Jacobi kernel).
// Neighbour points inside the block come from the register file; points
// of the neighbouring blocks are taken straight from the N/S/E/W input
// buffers as operands. The edge points of the block are computed first,
// in row-major order, and each is sent (NSG, memory slot) to the
// neighbours it borders as soon as it is written back, while the compute
// slot carries on; so sending overlaps computing and the receivers pop
// their buffers in the order the values were sent. The loop body holds two
// iterations (X -> Y, then Y -> X), closed by BNZ and its delay slot.
// Off the mesh, the boundary is modelled at the top's mesh edge ports: a
// word sent off the mesh is answered in the same cycle with the fixed
// boundary value of the matching grid position.
//
// One run, as the host sees it through AXI-Lite: program in the
// instruction GM bank, data of each cluster (points, coefficients) in its
// own GM bank at a per-cluster pointer; write size, pointers, start; wait
// for irq. The program: BFLUSH, RDGMEM in bursts that stay within 4 KB,
// LDBM from each PE's own bank (its points), LDBM broadcast from bank 5
// (coefficients), LD to registers, first sends, REPEAT/BNZ loop, STBM of
// the results and of the PE id (integer ADD with the PE-id operand),
// WRGMEM, STOP. Runs: Laplace 48^2 (boot), Jacobi 48^2 (boot of a new
// program), Jacobi 48^2 with the reuse flag (no boot, new data), Laplace
// 96^2, Jacobi 192^2 and Laplace 384^2 (boot each).
//
// Checks: every result against a reference computed here in double
// precision (tolerance 1e-9; the hardware truncates), every PE id, the
// error output, the efficiency of the loop (FLOP per cycle against the
// peak of 2 per PE per cycle; the document reports 87.4 % for Laplace and
// 89.9 % for Jacobi), and that each mechanism occurred: boot, reuse
// without boot, DMA reads/writes, stalls on the DMA, LDBM own-bank and
// broadcast, buffer flush, loop iterations, edge traffic, FMACCA,
// interrupt. The GM models insert random AXI stalls. Watchdog: 2M cycles.
module tb_dragon_top;
  import dragon_pkg::*;
  import dragon_asm_pkg::*;
  localparam int BR = 3, BCC = 3;           // the top's defaults
  localparam int NBC = BR * BCC;
  localparam int MR = 4 * BR, MC = 4 * BCC; // PE mesh rows / columns
  localparam int MAXB = 32;                 // largest block side tested
  localparam int XB = 16;                   // first register of set X
  localparam int IM_GM_LINES = 2048;
  localparam int RES_LINE = 2048;           // GM/BM line of the results

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t axil_req;
  axil_rsp_t axil_rsp;
  logic irq, error;
  axi_req_t im_req;
  axi_rsp_t im_rsp;
  axi_req_t [NBC-1:0] gm_req;
  axi_rsp_t [NBC-1:0] gm_rsp;
  logic  [MC-1:0] n_ov, s_ov, n_iv, s_iv;
  word_t [MC-1:0] n_od, s_od, n_id, s_id;
  logic  [MR-1:0] e_ov, w_ov, e_iv, w_iv;
  word_t [MR-1:0] e_od, w_od, e_id, w_id;

  dragon_top dut (
    .clk, .rst_n, .s_axil_req(axil_req), .s_axil_rsp(axil_rsp), .irq,
    .m_axi_im_req(im_req), .m_axi_im_rsp(im_rsp),
    .m_axi_gm_req(gm_req), .m_axi_gm_rsp(gm_rsp),
    .mesh_n_in_valid(n_iv), .mesh_s_in_valid(s_iv), .mesh_n_in_data(n_id), .mesh_s_in_data(s_id),
    .mesh_n_out_valid(n_ov), .mesh_s_out_valid(s_ov), .mesh_n_out_data(n_od), .mesh_s_out_data(s_od),
    .mesh_e_in_valid(e_iv), .mesh_w_in_valid(w_iv), .mesh_e_in_data(e_id), .mesh_w_in_data(w_id),
    .mesh_e_out_valid(e_ov), .mesh_w_out_valid(w_ov), .mesh_e_out_data(e_od), .mesh_w_out_data(w_od),
    .error
  );

  gm_model #(.LINES(IM_GM_LINES), .STALL(10)) im_gm (.clk, .rst_n, .req(im_req), .rsp(im_rsp));
  for (genvar b = 0; b < NBC; b++) begin : g_gm
    gm_model #(.LINES(32 * (NBC + 1) + RES_LINE + MAXB * MAXB + 32), .STALL(25)) gm (.clk, .rst_n, .req(gm_req[b]), .rsp(gm_rsp[b]));
  end

  `include "axil_host.svh"

  // ------------------------------------------------------ run settings
  int  B, NT, ITERS;                 // block side, FP terms per point, iterations
  real c [5];

  // ---------------------------------------------------- boundary values
  // The k-th word a PE sends off the mesh through one edge port belongs to
  // position k mod B along its block edge (edge points are sent in
  // row-major order), so the answer is the boundary value there.
  real   bn [MC*MAXB], bs [MC*MAXB], be [MR*MAXB], bw [MR*MAXB];
  word_t bnw [MC*MAXB], bsw [MC*MAXB], bew [MR*MAXB], bww [MR*MAXB];
  int    cn [MC], cs [MC], ce [MR], cw [MR];
  always_comb begin
    for (int i = 0; i < MC; i++) begin
      n_iv[i] = n_ov[i]; n_id[i] = bnw[i * B + cn[i] % B];
      s_iv[i] = s_ov[i]; s_id[i] = bsw[i * B + cs[i] % B];
    end
    for (int i = 0; i < MR; i++) begin
      e_iv[i] = e_ov[i]; e_id[i] = bew[i * B + ce[i] % B];
      w_iv[i] = w_ov[i]; w_id[i] = bww[i * B + cw[i] % B];
    end
  end
  always @(posedge clk) begin
    for (int i = 0; i < MC; i++) begin
      if (n_ov[i]) cn[i]++;
      if (s_ov[i]) cs[i]++;
    end
    for (int i = 0; i < MR; i++) begin
      if (e_ov[i]) ce[i]++;
      if (w_ov[i]) cw[i]++;
    end
  end

  // ---------------------------------------------------------- bookkeeping
  int checks = 0, failures = 0;
  int n_stall = 0, n_ldbm_own = 0, n_ldbm_bc = 0, n_fmul = 0, n_edge = 0;
  int n_fmacca = 0, n_irq = 0, n_flush = 0, cyc = 0, fp_first = -1, fp_last = 0;
  logic irq_q = 0;
  always @(posedge clk) begin
    cyc++;
    irq_q <= irq;
    if (irq && !irq_q) n_irq++;
    if (|dut.dbusy && dut.s1 == 0 && dut.s2 == 0) n_stall++;
    if (dut.s2[63:58] == OP_LDBM) begin
      if (dut.s2[48]) n_ldbm_bc++; else n_ldbm_own++;
    end
    if (dut.s2[63:58] == OP_BFLUSH) n_flush++;
    if (dut.s1[63:58] == OP_FMUL) n_fmul++;
    if (dut.s1[63:58] == OP_FMACCA) n_fmacca++;
    if (dut.s1[63:58] == OP_FMUL || dut.s1[63:58] == OP_FMACCA) begin
      if (fp_first < 0) fp_first = cyc;
      fp_last = cyc;
    end
    n_edge += $countones({n_ov, s_ov, e_ov, w_ov});
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // --------------------------------------------------------------- program
  logic [127:0] prog [$];
  localparam logic [127:0] NOPW = '0;
  task automatic emit(input logic [127:0] w, input int n = 1);
    for (int i = 0; i < n; i++) prog.push_back(w);
  endtask

  // edge points first (row-major), then the interior
  int order [$];
  function automatic bit is_edge(int k);
    return k / B == 0 || k / B == B - 1 || k % B == 0 || k % B == B - 1;
  endfunction
  function automatic logic [3:0] dirs(int k);
    logic [3:0] d;
    d = '0;
    if (k / B == 0)     d[DIR_N] = 1;
    if (k / B == B - 1) d[DIR_S] = 1;
    if (k % B == 0)     d[DIR_W] = 1;
    if (k % B == B - 1) d[DIR_E] = 1;
    return d;
  endfunction

  // one iteration: read set `src`, write set `dst`; L = NT * B^2 words
  task automatic phase(input int src, input int dst);
    logic [63:0] s1w [$], s2w [$];
    int ready [$];
    int t;
    for (int i = 0; i < order.size(); i++) begin
      int k, r, cc, n;
      opcode_e op;
      k = order[i]; r = k / B; cc = k % B; n = 0;
      for (int term = 0; term < 5; term++) begin
        int   src2;
        opsrc_e os;
        if (term == 2 && NT == 4) continue;
        src2 = 0; os = SRC_RF;
        case (term)
          0: if (r > 0)      src2 = src + k - B; else os = SRC_NFIFO;
          1: if (r < B - 1)  src2 = src + k + B; else os = SRC_SFIFO;
          2: src2 = src + k;
          3: if (cc > 0)     src2 = src + k - 1; else os = SRC_WFIFO;
          4: if (cc < B - 1) src2 = src + k + 1; else os = SRC_EFIFO;
        endcase
        op = (n == 0) ? OP_FMUL : OP_FMACCA;
        n++;
        s1w.push_back(rop(op, (n == NT) ? dst + k : 8, 1 + term, src2, os));
      end
      if (is_edge(k)) ready.push_back(s1w.size() - 1 + 6);
    end
    for (int i = 0; i < s1w.size(); i++) s2w.push_back(nop());
    t = 0;
    for (int i = 0; i < ready.size(); i++) begin
      if (t < ready[i]) t = ready[i];
      if (t >= s2w.size()) $fatal(1, "send schedule does not fit the phase");
      s2w[t] = ntype(OP_NSG, dirs(order[i]), 4'b0000, dst + order[i]);
      t++;
    end
    for (int i = 0; i < s1w.size(); i++) emit(vliw(s1w[i], s2w[i]));
  endtask

  task automatic gm_bursts(input logic wr, input int line0, input int n);
    // split at 32-beat (4 KB) boundaries of the line address
    int l;
    l = line0;
    while (l < line0 + n) begin
      int m;
      m = 32 - l % 32;
      if (m > line0 + n - l) m = line0 + n - l;
      emit(gmem(wr, m, l, 64'(l) * 128));
      l += m;
    end
  endtask

  task automatic build_program();
    int P;
    P = B * B;
    prog.delete();
    order.delete();
    for (int k = 0; k < P; k++) if (is_edge(k)) order.push_back(k);
    for (int k = 0; k < P; k++) if (!is_edge(k)) order.push_back(k);
    emit(vliw(nop(), ntype(OP_BFLUSH, 4'b0000, 4'b1111)));
    gm_bursts(0, 0, P + 5);                                   // GM -> BM
    emit(vliw(nop(), ldbm(0, 0, P)));                         // own bank
    emit(NOPW, P + 2);
    emit(vliw(nop(), ldbm(P, P, 5, 0, 0, 1, 5)));             // bank 5 to all
    emit(NOPW, 7);
    for (int k = 0; k < P; k++) emit(vliw(nop(), ld(XB + k, k)));
    for (int i = 0; i < 5; i++) emit(vliw(nop(), ld(1 + i, P + i)));
    emit(ldimm(0, 64'd0));
    emit(NOPW, 6);
    for (int i = 0; i < order.size() && is_edge(order[i]); i++)
      emit(vliw(nop(), ntype(OP_NSG, dirs(order[i]), 4'b0000, XB + order[i])));
    emit(vliw(ctl(FN_REPEAT, 20'(ITERS / 2)), nop()));
    phase(XB, XB + P);
    phase(XB + P, XB);
    emit(vliw(ctl(FN_BNZ), nop()));
    emit(NOPW);                                               // delay slot
    emit(vliw(rop(OP_ADD, 6, 0, 0, SRC_PEID), nop()));
    emit(NOPW, 6);
    for (int k = 0; k < P; k++) emit(vliw(nop(), stbm(RES_LINE + k, XB + k)));
    emit(vliw(nop(), stbm(RES_LINE + P, 6)));
    emit(NOPW, 6);
    gm_bursts(1, RES_LINE, P + 1);                            // BM -> GM
    emit(vliw(ctl(FN_STOP), nop()));
    for (int i = 0; i < IM_GM_LINES; i++) im_gm.mem[i] = '0;
    for (int i = 0; i < prog.size(); i++) im_gm.mem[i / 8][128 * (i % 8) +: 128] = prog[i];
  endtask

  // Program for blocks too large for the register file: both copies of the
  // block live in LM (P at 0, Q at B^2, coefficients at 2B^2). Rows are
  // brought into four rotating register sets by LD, row g+2 during row g
  // (global row g uses set g mod 4, g counting across both iterations of
  // the loop body, so B must be even); each result is written to LM and to
  // a scratch register by the last FMACCA (mode 1), and edge points are sent
  // from the scratch register.
  function automatic int rset(int g);
    return 16 + (g % 4) * B;
  endfunction
  function automatic int scr(int k);
    return 150 + k % 64;
  endfunction

  task automatic phase_lm(input int ain, input int aout, input int g0);
    logic [63:0] s1w [$], s2w [$];
    int L, t;
    L = NT * B * B;
    for (int i = 0; i < L + 16; i++) begin s1w.push_back(nop()); s2w.push_back(nop()); end
    t = 0;
    for (int r = 0; r < B; r++)
      for (int cc = 0; cc < B; cc++) begin
        int k, g, n;
        k = r * B + cc; g = g0 + r; n = 0;
        for (int term = 0; term < 5; term++) begin
          int src2;
          opsrc_e os;
          if (term == 2 && NT == 4) continue;
          src2 = 0; os = SRC_RF;
          case (term)
            0: if (r > 0)      src2 = rset(g - 1) + cc; else os = SRC_NFIFO;
            1: if (r < B - 1)  src2 = rset(g + 1) + cc; else os = SRC_SFIFO;
            2: src2 = rset(g) + cc;
            3: if (cc > 0)     src2 = rset(g) + cc - 1; else os = SRC_WFIFO;
            4: if (cc < B - 1) src2 = rset(g) + cc + 1; else os = SRC_EFIFO;
          endcase
          n++;
          if (n == NT)
            s1w[t] = rop(OP_FMACCA, scr(k), 1 + term, src2, os, MODE_RF_LM, aout + k);
          else
            s1w[t] = rop(n == 1 ? OP_FMUL : OP_FMACCA, 8, 1 + term, src2, os);
          t++;
        end
      end
    // sends, in point order, as soon as the value is written back
    t = 0;
    for (int k = 0; k < B * B; k++)
      if (is_edge(k)) begin
        int rdy;
        rdy = NT * k + NT - 1 + 6;
        if (t < rdy) t = rdy;
        s2w[t] = ntype(OP_NSG, dirs(k), 4'b0000, scr(k));
        t++;
      end
    // loads of global row g+2 in the free memory slots of row g's window;
    // rows past this iteration are rows 0 and 1 of the next one (from aout)
    for (int r = 0; r < B; r++) begin
      int rr, arr, last;
      rr = r + 2; arr = ain;
      if (rr >= B) begin rr = rr - B; arr = aout; end
      t = NT * B * r;
      last = NT * B * (r + 1) - 7;   // row r+2 is read from row r+1 on
      for (int cc = 0; cc < B; cc++) begin
        while (s2w[t] != nop()) t++;
        if (t > last || t >= L) $fatal(1, "row load does not fit");
        s2w[t] = ld(rset(g0 + r + 2) + cc, arr + rr * B + cc);
        t++;
      end
    end
    for (int i = 0; i < L; i++) emit(vliw(s1w[i], s2w[i]));
    t = L;
    for (int i = L; i < L + 16; i++) if (s2w[i] != nop()) t = i + 1;
    for (int i = L; i < t; i++) emit(vliw(nop(), s2w[i]));   // keep the spacing
  endtask

  task automatic build_program_lm();
    int P;
    P = B * B;
    prog.delete();
    emit(vliw(nop(), ntype(OP_BFLUSH, 4'b0000, 4'b1111)));
    gm_bursts(0, 0, P + 5);
    emit(vliw(nop(), ldbm(0, 0, P)));                         // P <- own bank
    emit(NOPW, P + 2);
    emit(vliw(nop(), ldbm(2 * P, P, 5, 0, 0, 1, 5)));         // coefficients
    emit(NOPW, 7);
    for (int i = 0; i < 5; i++) emit(vliw(nop(), ld(1 + i, 2 * P + i)));
    for (int cc = 0; cc < 2 * B; cc++) emit(vliw(nop(), ld(rset(cc / B) + cc % B, cc)));
    emit(ldimm(0, 64'd0));
    // first sends: the edge points of P, through scratch registers
    begin
      int e [$];
      for (int k = 0; k < P; k++) if (is_edge(k)) e.push_back(k);
      for (int i = 0; i < e.size(); i += 48) begin
        for (int j = i; j < i + 48 && j < e.size(); j++) emit(vliw(nop(), ld(scr(j - i), e[j])));
        emit(NOPW, 6);
        for (int j = i; j < i + 48 && j < e.size(); j++)
          emit(vliw(nop(), ntype(OP_NSG, dirs(e[j]), 4'b0000, scr(j - i))));
      end
    end
    emit(NOPW, 6);
    emit(vliw(ctl(FN_REPEAT, 20'(ITERS / 2)), nop()));
    phase_lm(0, P, 0);
    phase_lm(P, 0, B);
    emit(vliw(ctl(FN_BNZ), nop()));
    emit(NOPW);
    emit(vliw(rop(OP_ADD, 6, 0, 0, SRC_PEID), nop()));
    emit(NOPW, 6);
    for (int k = 0; k < P; k++) emit(vliw(nop(), stbm(RES_LINE + k, 0, 1, k)));
    emit(vliw(nop(), stbm(RES_LINE + P, 6)));
    emit(NOPW, 6);
    gm_bursts(1, RES_LINE, P + 1);
    emit(vliw(ctl(FN_STOP), nop()));
    if (prog.size() > IM_GM_LINES * 8) $fatal(1, "program too large for the model");
    for (int i = 0; i < IM_GM_LINES; i++) im_gm.mem[i] = '0;
    for (int i = 0; i < prog.size(); i++) im_gm.mem[i / 8][128 * (i % 8) +: 128] = prog[i];
  endtask

  // ---------------------------------------------------------- data / model
  real u [MR*MAXB][MC*MAXB], un [MR*MAXB][MC*MAXB];

  function automatic logic [63:0] gptr(int b);
    return 64'h1000 * (b + 1);
  endfunction
  // grid point -> cluster, bank, line
  function automatic int bc_of(int gr, int gc);
    return (gr / B / 4) * BCC + (gc / B) / 4;
  endfunction
  function automatic int bank_of(int gr, int gc);
    return ((gr / B) % 4) * 4 + (gc / B) % 4;
  endfunction
  function automatic int cell_of(int gr, int gc);
    return (gr % B) * B + gc % B;
  endfunction

  // generate-indexed memories need constant indices: dispatch
  task automatic gm_set(input int b, input int line, input int bank, input logic [63:0] v);
    case (b)
      0: g_gm[0].gm.mem[line][64*bank +: 64] = v;
      1: g_gm[1].gm.mem[line][64*bank +: 64] = v;
      2: g_gm[2].gm.mem[line][64*bank +: 64] = v;
      3: g_gm[3].gm.mem[line][64*bank +: 64] = v;
      4: g_gm[4].gm.mem[line][64*bank +: 64] = v;
      5: g_gm[5].gm.mem[line][64*bank +: 64] = v;
      6: g_gm[6].gm.mem[line][64*bank +: 64] = v;
      7: g_gm[7].gm.mem[line][64*bank +: 64] = v;
      8: g_gm[8].gm.mem[line][64*bank +: 64] = v;
      default: ;
    endcase
  endtask
  function automatic logic [63:0] gm_get(input int b, input int line, input int bank);
    case (b)
      0: return g_gm[0].gm.mem[line][64*bank +: 64];
      1: return g_gm[1].gm.mem[line][64*bank +: 64];
      2: return g_gm[2].gm.mem[line][64*bank +: 64];
      3: return g_gm[3].gm.mem[line][64*bank +: 64];
      4: return g_gm[4].gm.mem[line][64*bank +: 64];
      5: return g_gm[5].gm.mem[line][64*bank +: 64];
      6: return g_gm[6].gm.mem[line][64*bank +: 64];
      7: return g_gm[7].gm.mem[line][64*bank +: 64];
      8: return g_gm[8].gm.mem[line][64*bank +: 64];
      default: return '0;
    endcase
  endfunction
  function automatic int gm_reads_all();
    return g_gm[0].gm.reads + g_gm[1].gm.reads + g_gm[2].gm.reads + g_gm[3].gm.reads +
           g_gm[4].gm.reads + g_gm[5].gm.reads + g_gm[6].gm.reads + g_gm[7].gm.reads +
           g_gm[8].gm.reads;
  endfunction
  function automatic int gm_writes_all();
    return g_gm[0].gm.writes + g_gm[1].gm.writes + g_gm[2].gm.writes + g_gm[3].gm.writes +
           g_gm[4].gm.writes + g_gm[5].gm.writes + g_gm[6].gm.writes + g_gm[7].gm.writes +
           g_gm[8].gm.writes;
  endfunction

  task automatic load_data(input int seed_k);
    int G;
    G = MC * B;
    for (int i = 0; i < MC * B; i++) begin
      bn[i] = 1.0 + 0.03125 * i;  bs[i] = -0.5 + 0.015625 * i * seed_k;
      bnw[i] = $realtobits(bn[i]); bsw[i] = $realtobits(bs[i]);
    end
    for (int i = 0; i < MR * B; i++) begin
      be[i] = 0.75 - 0.025 * i; bw[i] = 0.3 * seed_k;
      bew[i] = $realtobits(be[i]); bww[i] = $realtobits(bw[i]);
    end
    for (int i = 0; i < MC; i++) begin cn[i] = 0; cs[i] = 0; end
    for (int i = 0; i < MR; i++) begin ce[i] = 0; cw[i] = 0; end
    for (int b = 0; b < NBC; b++)
      for (int l = 0; l < B * B + 5; l++)
        for (int k = 0; k < 16; k++) begin
          gm_set(b, int'(gptr(b) / 128) + l, k, {$urandom, $urandom});
          gm_set(b, int'(gptr(b) / 128) + RES_LINE + l, k, {$urandom, $urandom});
        end
    for (int gr = 0; gr < MR * B; gr++)
      for (int gc = 0; gc < G; gc++) begin
        u[gr][gc] = real'($urandom % 1000) / 500.0 - 1.0;
        gm_set(bc_of(gr, gc), int'(gptr(bc_of(gr, gc)) / 128) + cell_of(gr, gc),
               bank_of(gr, gc), $realtobits(u[gr][gc]));
      end
    for (int b = 0; b < NBC; b++)
      for (int i = 0; i < 5; i++)
        gm_set(b, int'(gptr(b) / 128) + B * B + i, 5, $realtobits(c[i]));
  endtask

  task automatic reference();
    int GR, GC;
    GR = MR * B; GC = MC * B;
    for (int it = 0; it < ITERS; it++) begin
      for (int r = 0; r < GR; r++)
        for (int cc = 0; cc < GC; cc++) begin
          real vn, vs, ve, vw, acc;
          vn = (r > 0)       ? u[r-1][cc] : bn[cc];
          vs = (r < GR - 1)  ? u[r+1][cc] : bs[cc];
          vw = (cc > 0)      ? u[r][cc-1] : bw[r];
          ve = (cc < GC - 1) ? u[r][cc+1] : be[r];
          acc = c[0] * vn + c[1] * vs;
          if (NT == 5) acc = acc + c[2] * u[r][cc];
          un[r][cc] = acc + c[3] * vw + c[4] * ve;
        end
      for (int r = 0; r < GR; r++)
        for (int cc = 0; cc < GC; cc++) u[r][cc] = un[r][cc];
    end
  endtask

  task automatic check_results(input string tag);
    for (int r = 0; r < MR * B; r++)
      for (int cc = 0; cc < MC * B; cc++) begin
        int b, l;
        real got;
        b = bc_of(r, cc);
        l = int'(gptr(b) / 128) + RES_LINE;
        got = $bitstoreal(gm_get(b, l + cell_of(r, cc), bank_of(r, cc)));
        chk(got - u[r][cc] < 1e-9 && u[r][cc] - got < 1e-9,
            $sformatf("%s u[%0d][%0d] got %f exp %f", tag, r, cc, got, u[r][cc]));
        if (cell_of(r, cc) == 0)
          chk(gm_get(b, l + B * B, bank_of(r, cc)) == 64'((r / B) * MC + cc / B),
              $sformatf("%s pe id of block [%0d][%0d]", tag, r / B, cc / B));
      end
  endtask

  task automatic run(input string tag, input int b, input int nt, input int iters,
                     input bit reuse, input real min_epr);
    logic [31:0] d;
    int  ims, fm0, fa0;
    real epr;
    B = b; NT = nt; ITERS = iters;
    if (nt == 4) c = '{0.25, 0.25, 0.0, 0.25, 0.25};
    else         c = '{0.15, 0.2, 0.3, 0.1, 0.25};
    if (!reuse) begin
      if (b <= 8) build_program();
      else        build_program_lm();
    end
    else for (int i = 0; i < IM_GM_LINES; i++) im_gm.mem[i] = '0;   // reuse must not need GM
    load_data(nt + b + int'(reuse));
    axil_write(REG_REUSE, 32'(reuse));
    axil_write(REG_PSIZE, prog.size() * 16);
    ims = im_gm.reads; fm0 = n_fmul; fa0 = n_fmacca;
    fp_first = -1;
    axil_write(REG_CTRL, 1);
    while (!irq) @(negedge clk);
    axil_read(REG_CTRL, d);
    chk(d[1] == 1'b1, {tag, " done bit"});
    axil_write(REG_ISR, 1);
    if (reuse) chk(im_gm.reads == ims, {tag, " reuse skipped boot"});
    else       chk(im_gm.reads > ims, {tag, " boot read the program"});
    chk(n_fmul - fm0 == ITERS * B * B, {tag, " one FMUL per point and iteration"});
    chk(n_fmacca - fa0 == ITERS * B * B * (NT - 1), {tag, " FMACCA count"});
    reference();
    check_results(tag);
    chk(error == 1'b0, {tag, " error flag"});
    epr = real'(ITERS) * B * B * (2 * NT - 1) / (2.0 * real'(fp_last - fp_first + 1));
    $display("%s: %0d x %0d grid, %0d iterations, %0d loop cycles, EPR %0.1f %%, %0.2f GFLOP/s at 130 MHz",
             tag, MR * B, MC * B, ITERS, fp_last - fp_first + 1, 100.0 * epr,
             epr * 2.0 * MR * MC * 0.130);
    chk(epr >= min_epr, $sformatf("%s efficiency %0.3f below %0.3f", tag, epr, min_epr));
  endtask

  initial begin
    axil_req = '0;
    for (int i = 0; i < IM_GM_LINES; i++) im_gm.mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    axil_write64(REG_IMPTR, 64'h0);
    for (int b = 0; b < NBC; b++) axil_write64(REG_GMPTR0 + 12'(8 * b), gptr(b));
    axil_write(REG_GIE, 1);
    axil_write(REG_IER, 1);
    run("laplace 48x48",        4, 4, 100, 0, 0.85);
    run("jacobi 48x48",         4, 5, 100, 0, 0.88);
    run("jacobi 48x48 (reuse)", 4, 5, 100, 1, 0.88);
    run("laplace 96x96",        8, 4, 20,  0, 0.87);
    run("jacobi 192x192",       16, 5, 10, 0, 0.88);
    run("laplace 384x384",      32, 4, 4,  0, 0.87);

    $display("mechanisms: stall=%0d ldbm_own=%0d ldbm_bcast=%0d flush=%0d fmul=%0d fmacca=%0d edge=%0d irq=%0d gm_rd=%0d gm_wr=%0d",
             n_stall, n_ldbm_own, n_ldbm_bc, n_flush, n_fmul, n_fmacca, n_edge, n_irq,
             gm_reads_all(), gm_writes_all());
    chk(n_stall > 0, "DMA stall seen");
    chk(n_ldbm_own == 6, "LDBM own bank");
    chk(n_ldbm_bc == 6, "LDBM broadcast");
    chk(n_flush == 6, "buffer flush");
    chk(n_edge > 0, "edge traffic");
    chk(n_irq == 6, "interrupts");
    chk(gm_reads_all() > 0 && gm_writes_all() > 0, "DMA reads and writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
