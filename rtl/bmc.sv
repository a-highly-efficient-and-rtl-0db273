// bmc: broadcast memory controller of one broadcast cluster.
//
// Sits between the 16 broadcast memory (BM) banks and the 16 PEs of a
// cluster, one bank per PE. It reads the banks' accelerator ports and
// routes the data through a two-stage multiplexer:
//   stage 1 (offset mux)   picks one bank's word by a 4-bit offset;
//   stage 2 (16 muxes)     each PE gets either its own bank's word
//                          (parallel mode) or the offset mux output
//                          (broadcast mode, the same word on all wires).
// Two users share the bank read port:
//   * LDBM bursts (slot 2): data_count words from BM[Bmaddr...] are copied
//     to LM[Lmaddr...] of the PEs chosen by Mask_load (low nibble: first
//     PE, high nibble: number of PEs, 0 meaning 16), one word per cycle,
//     from each PE's own bank or, with mode bit 0 set, broadcast from bank
//     BrOffset. The burst runs on its own while the program goes on.
//   * R-type operands (slot 1, OPSrc = BM or BM-broadcast): BM[Bmaddr] is
//     read in the PE's Decode cycle and delivered on pe_rdata in EX1.
// An active burst has priority over operand reads; an LDBM that arrives
// while a burst runs replaces it. Both are programming errors that the
// static schedule must avoid.
// Timing: a burst starts reading the cycle after LDBM is decoded and
// writes LM one cycle after each read, so N words take N+1 cycles.
// The two-stage mux, the mask fields and the per-bank channels follow the
// document; timing, priority and the mask arithmetic are this design's.
module bmc
  import dragon_pkg::*;
#(
  parameter int unsigned NPE = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [63:0]          slot1,
  input  logic [63:0]          slot2,
  // bank accelerator-side read ports
  output logic                 b_ren,
  output logic [11:0]          b_raddr,
  input  word_t [NPE-1:0]      b_rdata,
  // to the PEs
  output word_t [NPE-1:0]      pe_rdata,
  output logic  [NPE-1:0]      lm_we,
  output logic  [11:0]         lm_waddr,
  output word_t [NPE-1:0]      lm_wdata,
  output logic                 busy
);
  rtype_t r1;
  ldbm_t  l2;
  assign r1 = rtype_t'(slot1);
  assign l2 = ldbm_t'(slot2);

  logic is_ldbm, op_rd;
  assign is_ldbm = (opcode_e'(l2.opcode) == OP_LDBM) && (opcode_e'(r1.opcode) != OP_LDIMM);
  assign op_rd   = (opsrc_e'(r1.opsrc) == SRC_BM || opsrc_e'(r1.opsrc) == SRC_BMBC) &&
                   (opcode_e'(r1.opcode) inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR,
                     OP_SLL, OP_SRL, OP_MUL, OP_FADD, OP_FSUB, OP_FMUL, OP_FMACCA, OP_FMACCS});

  // burst state
  logic          act;
  logic [11:0]   bm_a, lm_a, remain;
  logic [NPE-1:0] sel;
  logic          bc;
  logic [3:0]    off;

  function automatic logic [NPE-1:0] mask_sel(input logic [7:0] m);
    logic [NPE-1:0] s;
    int unsigned    first, num;
    first = 32'(m[3:0]);
    num   = (m[7:4] == 4'd0) ? 16 : int'(m[7:4]);
    for (int k = 0; k < int'(NPE); k++) s[k] = (k >= first) && (k < first + num);
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0; bm_a <= '0; lm_a <= '0; remain <= '0;
      sel <= '0; bc <= 1'b0; off <= '0;
    end else if (is_ldbm) begin
      act    <= (l2.count != '0);
      bm_a   <= l2.bmaddr;
      lm_a   <= l2.lmaddr;
      remain <= l2.count;
      sel    <= mask_sel(l2.mask);
      bc     <= l2.mode[0];
      off    <= l2.broffset;
    end else if (act) begin
      bm_a   <= bm_a + 1'b1;
      lm_a   <= lm_a + 1'b1;
      remain <= remain - 1'b1;
      if (remain == 12'd1) act <= 1'b0;
    end
  end

  assign busy    = act;
  assign b_ren   = act || op_rd;
  assign b_raddr = act ? bm_a : r1.bmaddr;

  // read stage
  logic          rd_burst_q, bc_q;
  logic [3:0]    off_q;
  logic [11:0]   lm_q;
  logic [NPE-1:0] sel_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_burst_q <= 1'b0; bc_q <= 1'b0; off_q <= '0; lm_q <= '0; sel_q <= '0;
    end else begin
      rd_burst_q <= act;
      lm_q       <= lm_a;
      sel_q      <= sel;
      if (act) begin
        bc_q  <= bc;
        off_q <= off;
      end else begin
        bc_q  <= (opsrc_e'(r1.opsrc) == SRC_BMBC);
        off_q <= r1.broffset;
      end
    end
  end

  // two-stage broadcast multiplexer
  word_t offset_mux;
  assign offset_mux = b_rdata[off_q];
  for (genvar k = 0; k < int'(NPE); k++) begin : g_mux
    assign pe_rdata[k] = bc_q ? offset_mux : b_rdata[k];
    assign lm_wdata[k] = pe_rdata[k];
    assign lm_we[k]    = rd_burst_q && sel_q[k];
  end
  assign lm_waddr = lm_q;
endmodule
