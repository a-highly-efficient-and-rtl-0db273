// pe: DRAGON processing element (PE), a 64-bit VLIW compute node.
//
// Every cycle the PE receives one VLIW word from the sequencer, the same
// word as all other PEs (SIMD): slot 1 goes to the dual compute slot (DCS:
// register file, 64-bit integer ALU, double-precision FPU), slot 2 to the
// memory slot (MS: local memory, four neighbour input buffers, the link to
// the broadcast memory). There is no stall and no hazard detection: the
// program is statically scheduled and NOPs fill the gaps.
//
// Pipeline (7 stages, a word enters Decode in cycle 0):
//   0 Decode  register-file and local-memory read addresses applied
//   1 EX1     operands valid: Src1 from the register file, the second
//             operand chosen by OPSrc (register, 16-bit immediate, broadcast
//             memory, N/E/W/S input buffer head, PE id); buffer heads are
//             popped here; integer ALU evaluates; FPU unpacks
//   2 EX2     FPU multiply
//   3 EX3     FPU add / accumulate
//   4 Mem1    slot results valid; local-memory write (R-type store modes,
//             ST, NST)
//   5 Mem2    scatter word on nb_out_* to the neighbours, STBM word on bm_*
//   6 WB      register-file write (R-type result, LD, LDimm)
// A result written in WB is visible to an instruction decoded in the same
// cycle, i.e. dependent instructions must be issued 6 cycles apart; FMACCA
// and FMACCS chain through the FPU accumulator back to back.
//
// Slot 1 (R-type): mode 0 writes RDst, 1 writes RDst and LM[Lmaddr],
// 2 scatters to the directions in NDst[3:0], 3 writes LM[Lmaddr] and
// scatters (the example in the document: FMUL with mode 3 stores the FPU
// result to LM and scatters it to the South PE). LDimm takes the upper 16
// bits from slot 1 (BrOffset/Bmaddr position) and the lower 48 from slot 2.
// Slot 2: LD, ST (LM-type), STBM (BM-type, mode 0 from the register file,
// mode 1 from LM[Lmaddr], mode 2 straight from the ALU/FPU result of the
// slot-1 instruction in the same VLIW word), NSG, NPASS, NST, BFLUSH (N-type; NSrc and NDst
// are one-hot N/E/W/S masks). LDBM is carried out by the broadcast memory
// controller, which writes LM through the lm_b_* port.
// Neighbour data sent towards a direction lands in the receiver's buffer
// of the opposite side (a word sent South arrives in the South PE's
// North buffer).
//
// Stages, slot split, operand sources and the store/scatter example follow
// the document; the stage in which each action happens, the mode and OPSrc
// codes other than immediate (1) and North buffer (3), the priority rules
// (slot 1 wins when both slots store to LM or both scatter in one cycle)
// and the sticky error flag are this design's choices.
module pe
  import dragon_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       pe_id,
  // SIMD VLIW stream, Decode stage
  input  logic [63:0]       slot1,
  input  logic [63:0]       slot2,
  // broadcast memory read data for the word in EX1
  input  word_t             bm_rdata,
  // LDBM writes from the broadcast memory controller
  input  logic              lm_b_we,
  input  logic [11:0]       lm_b_waddr,
  input  word_t             lm_b_wdata,
  // STBM to this PE's broadcast memory bank
  output logic              bm_we,
  output logic [11:0]       bm_waddr,
  output word_t             bm_wdata,
  // neighbour links, index = DIR_N/E/W/S
  input  logic [3:0]        nb_in_valid,
  input  word_t [3:0]       nb_in_data,
  output logic [3:0]        nb_out_valid,
  output word_t             nb_out_data,
  // status
  output logic              error
);
  // ------------------------------------------------------------ decode
  typedef enum logic [1:0] {K1_NONE, K1_INT, K1_FP, K1_LDIMM} k1_e;
  typedef enum logic [3:0] {K2_NONE, K2_LD, K2_ST, K2_STBM, K2_NSG,
                            K2_NPASS, K2_NST, K2_BFLUSH} k2_e;

  typedef struct packed {
    k1_e        k1;
    opcode_e    op1;
    logic [3:0] opsrc;
    logic [15:0] imm;
    logic [1:0] mode1;
    logic [11:0] lm1;
    logic [7:0] rdst1;
    k2_e        k2;
    logic [1:0] mode2;
    logic [11:0] lm2;
    logic [11:0] bm2;
    logic [7:0] rdst2;
    logic [3:0] ndst2;
    logic [3:0] nsrc2;
    logic [47:0] immlo;
  } dec_t;

  rtype_t r1;
  ntype_t n2;
  rtype_t r2;
  dec_t   dd;

  assign r1 = rtype_t'(slot1);
  assign r2 = rtype_t'(slot2);
  assign n2 = ntype_t'(slot2);

  always_comb begin
    dd        = '0;
    dd.op1    = opcode_e'(r1.opcode);
    dd.opsrc  = r1.opsrc;
    dd.imm    = {r1.broffset, r1.bmaddr};
    dd.mode1  = r1.mode;
    dd.lm1    = r1.lmaddr;
    dd.rdst1  = r1.rdst;
    dd.immlo  = slot2[47:0];
    unique case (opcode_e'(r1.opcode))
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_MUL:
        dd.k1 = K1_INT;
      OP_FADD, OP_FSUB, OP_FMUL, OP_FMACCA, OP_FMACCS:
        dd.k1 = K1_FP;
      OP_LDIMM:
        dd.k1 = K1_LDIMM;
      default:
        dd.k1 = K1_NONE;
    endcase
    dd.mode2 = r2.mode;
    dd.lm2   = r2.lmaddr;
    dd.bm2   = r2.bmaddr;
    dd.rdst2 = r2.rdst;
    dd.ndst2 = n2.ndst[3:0];
    dd.nsrc2 = n2.nsrc;
    if (dd.k1 == K1_LDIMM) dd.k2 = K2_NONE;   // slot 2 holds immediate bits
    else begin
      unique case (opcode_e'(r2.opcode))
        OP_LD:     dd.k2 = K2_LD;
        OP_ST:     dd.k2 = K2_ST;
        OP_STBM:   dd.k2 = K2_STBM;
        OP_NSG:    dd.k2 = K2_NSG;
        OP_NPASS:  dd.k2 = K2_NPASS;
        OP_NST:    dd.k2 = K2_NST;
        OP_BFLUSH: dd.k2 = K2_BFLUSH;
        default:   dd.k2 = K2_NONE;
      endcase
    end
  end

  // ------------------------------------------------ register file, LM
  logic  [2:0][7:0] rf_raddr;
  word_t [2:0]      rf_rdata;
  logic  [1:0]      rf_we;
  logic  [1:0][7:0] rf_waddr;
  word_t [1:0]      rf_wdata;

  assign rf_raddr[0] = r1.src1;
  assign rf_raddr[1] = r1.src2;
  assign rf_raddr[2] = r2.src2;

  regfile #(.DEPTH(RF_DEPTH), .NRD(3), .NWR(2)) u_rf (
    .clk, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  word_t       lm_rdata;
  logic        lm_we;
  logic [11:0] lm_waddr;
  word_t       lm_wdata;

  local_mem #(.DEPTH(LM_DEPTH)) u_lm (
    .clk,
    .a_raddr(r2.lmaddr), .a_rdata(lm_rdata),
    .a_we(lm_we), .a_waddr(lm_waddr), .a_wdata(lm_wdata),
    .b_we(lm_b_we), .b_waddr(lm_b_waddr), .b_wdata(lm_b_wdata)
  );

  // -------------------------------------------------- input buffers
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  word_t [3:0] fifo_head;
  logic  [3:0] fifo_pop, fifo_flush, fifo_ovf, fifo_unf, fifo_empty;

  for (genvar d = 0; d < 4; d++) begin : g_fifo
    logic [FAW:0] cnt;
    nbuf_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .flush(fifo_flush[d]),
      .in_valid(nb_in_valid[d]), .in_data(nb_in_data[d]),
      .pop(fifo_pop[d]), .head(fifo_head[d]), .empty(fifo_empty[d]),
      .count(cnt), .overflow(fifo_ovf[d]), .underflow(fifo_unf[d])
    );
  end

  // ---------------------------------------------------------------- EX1
  dec_t e1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) e1 <= '0;
    else        e1 <= dd;
  end

  function automatic logic [1:0] first_dir(input logic [3:0] m);
    if (m[0]) return 2'd0;
    if (m[1]) return 2'd1;
    if (m[2]) return 2'd2;
    return 2'd3;
  endfunction

  word_t opnd_a, opnd_b, alu_y, v1_e1, v2_e1;
  logic [3:0] pop1, pop2;

  always_comb begin
    opnd_a = rf_rdata[0];
    pop1   = '0;
    unique case (opsrc_e'(e1.opsrc))
      SRC_RF:    opnd_b = rf_rdata[1];
      SRC_IMM:   opnd_b = sext16(e1.imm);
      SRC_BM,
      SRC_BMBC:  opnd_b = bm_rdata;
      SRC_NFIFO: begin opnd_b = fifo_head[DIR_N]; pop1[DIR_N] = 1'b1; end
      SRC_EFIFO: begin opnd_b = fifo_head[DIR_E]; pop1[DIR_E] = 1'b1; end
      SRC_WFIFO: begin opnd_b = fifo_head[DIR_W]; pop1[DIR_W] = 1'b1; end
      SRC_SFIFO: begin opnd_b = fifo_head[DIR_S]; pop1[DIR_S] = 1'b1; end
      SRC_PEID:  opnd_b = 64'(pe_id);
      default:   opnd_b = rf_rdata[1];
    endcase
    if (e1.k1 != K1_INT && e1.k1 != K1_FP) pop1 = '0;
  end

  alu64 u_alu (.op(e1.op1), .a(opnd_a), .b(opnd_b), .y(alu_y));

  word_t fpu_y;
  logic  fpu_v;
  fpu_mac u_fpu (
    .clk, .rst_n, .in_valid(e1.k1 == K1_FP), .op(e1.op1),
    .a(opnd_a), .b(opnd_b), .out_valid(fpu_v), .y(fpu_y)
  );

  always_comb begin
    unique case (e1.k1)
      K1_INT:   v1_e1 = alu_y;
      K1_LDIMM: v1_e1 = {e1.imm, e1.immlo};
      default:  v1_e1 = '0;
    endcase
    pop2 = '0;
    unique case (e1.k2)
      K2_LD:    v2_e1 = lm_rdata;
      K2_ST,
      K2_NSG:   v2_e1 = rf_rdata[2];
      K2_STBM:  v2_e1 = e1.mode2[0] ? lm_rdata : rf_rdata[2];
      K2_NPASS,
      K2_NST: begin
        v2_e1 = fifo_head[first_dir(e1.nsrc2)];
        pop2[first_dir(e1.nsrc2)] = 1'b1;
      end
      default:  v2_e1 = '0;
    endcase
    fifo_pop   = pop1 | pop2;
    fifo_flush = (e1.k2 == K2_BFLUSH) ? e1.nsrc2 : 4'b0000;
  end

  // ---------------------------------------------- EX1 -> Mem1 delay line
  typedef struct packed {
    dec_t  d;
    word_t v1;
    word_t v2;
  } pipe_t;

  pipe_t e2, e3, m1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e2 <= '0; e3 <= '0; m1 <= '0;
    end else begin
      e2 <= '{d: e1, v1: v1_e1, v2: v2_e1};
      e3 <= e2;
      m1 <= e3;
    end
  end

  // --------------------------------------------------------------- Mem1
  word_t res1;
  logic  s1_rf, s1_lm, s1_sc, s2_lm, s2_sc;
  assign res1  = (m1.d.k1 == K1_FP) ? fpu_y : m1.v1;
  assign s1_rf = (m1.d.k1 != K1_NONE) && (m1.d.mode1 == MODE_RF || m1.d.mode1 == MODE_RF_LM);
  assign s1_lm = (m1.d.k1 != K1_NONE) && (m1.d.mode1 == MODE_RF_LM || m1.d.mode1 == MODE_LM_SCAT);
  assign s1_sc = (m1.d.k1 != K1_NONE) && (m1.d.mode1 == MODE_SCAT || m1.d.mode1 == MODE_LM_SCAT);
  assign s2_lm = (m1.d.k2 == K2_ST || m1.d.k2 == K2_NST);
  assign s2_sc = (m1.d.k2 == K2_NSG || m1.d.k2 == K2_NPASS);

  always_comb begin
    lm_we    = s1_lm || s2_lm;
    lm_waddr = s1_lm ? m1.d.lm1 : m1.d.lm2;
    lm_wdata = s1_lm ? res1 : m1.v2;
  end

  // --------------------------------------------------------------- Mem2
  typedef struct packed {
    logic [1:0]  rf_we;
    logic [7:0]  rd1;
    logic [7:0]  rd2;
    word_t       r1;
    word_t       r2;
  } wb_t;

  wb_t  m2wb, wb;
  logic conflict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nb_out_valid <= '0;
      nb_out_data  <= '0;
      bm_we        <= 1'b0;
      bm_waddr     <= '0;
      bm_wdata     <= '0;
      m2wb         <= '0;
      wb           <= '0;
    end else begin
      // Mem1 -> Mem2 registers
      if (s1_sc) begin
        nb_out_valid <= m1.d.rdst1[3:0];
        nb_out_data  <= res1;
      end else if (s2_sc) begin
        nb_out_valid <= m1.d.ndst2;
        nb_out_data  <= m1.v2;
      end else begin
        nb_out_valid <= '0;
      end
      bm_we    <= (m1.d.k2 == K2_STBM);
      bm_waddr <= m1.d.bm2;
      bm_wdata <= m1.d.mode2[1] ? res1 : m1.v2;   // mode bit 1: slot-1 result
      m2wb.rf_we <= {m1.d.k2 == K2_LD, s1_rf};
      m2wb.rd1   <= m1.d.rdst1;
      m2wb.rd2   <= m1.d.rdst2;
      m2wb.r1    <= res1;
      m2wb.r2    <= m1.v2;
      // Mem2 -> WB
      wb <= m2wb;
    end
  end

  assign rf_we       = wb.rf_we;
  assign rf_waddr[0] = wb.rd1;
  assign rf_waddr[1] = wb.rd2;
  assign rf_wdata[0] = wb.r1;
  assign rf_wdata[1] = wb.r2;

  assign conflict = (s1_lm && s2_lm) || (s1_sc && s2_sc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error <= 1'b0;
    else if (conflict || |fifo_ovf || |fifo_unf) error <= 1'b1;
  end

  // The FPU result must be there when a floating-point word reaches Mem1.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m1.d.k1 == K1_FP) |-> fpu_v);
endmodule
