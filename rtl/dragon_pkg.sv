// dragon_pkg: types and constants shared by the DRAGON overlay.
//
// DRAGON is a SIMD/VLIW many-core overlay: one sequencer fetches 128-bit
// VLIW words (two 64-bit slots) and broadcasts them to every processing
// element (PE). This package holds the instruction encoding, the slot
// field layout, the AXI4/AXI-Lite channel structs and the sizes used
// across the design.
//
// Taken from the source architecture: the 64-bit instruction formats and
// their field widths (R, LM, BM, N and C types), the 28-instruction set,
// the C-type opcode 6'b111111, OPSrc = 1 for an immediate and OPSrc = 3
// for the North FIFO, 1024-bit global-memory data, 256 registers,
// 12-bit LM/BM addresses and 7 nesting levels of loops.
// Own choices: fields are packed most-significant first in the order the
// formats list them; the numeric values of all opcodes, C-type function
// codes, the remaining OPSrc codes, the R-type mode meanings and the
// one-hot neighbour direction encoding.
package dragon_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned XLEN      = 64;    // datapath width
  localparam int unsigned RF_DEPTH  = 256;   // registers per PE
  localparam int unsigned LM_DEPTH  = 4096;  // 12-bit Lmaddr
  localparam int unsigned BM_DEPTH  = 4096;  // 12-bit Bmaddr, per bank
  localparam int unsigned GM_DW     = 1024;  // GM AXI data width
  localparam int unsigned GM_AW     = 64;    // GM byte address width
  localparam int unsigned LOOP_LEVELS = 7;   // REPEAT nesting depth
  localparam int unsigned AXI_MAX_BEATS = 32; // 4 KB / 128 B per beat

  typedef logic [XLEN-1:0] word_t;

  // ------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_NOP    = 6'd0,
    OP_LDIMM  = 6'd1,
    OP_ADD    = 6'd2,
    OP_SUB    = 6'd3,
    OP_AND    = 6'd4,
    OP_OR     = 6'd5,
    OP_XOR    = 6'd6,
    OP_SLL    = 6'd7,
    OP_SRL    = 6'd8,
    OP_MUL    = 6'd9,
    OP_FADD   = 6'd10,
    OP_FSUB   = 6'd11,
    OP_FMUL   = 6'd12,
    OP_FMACCA = 6'd13,
    OP_FMACCS = 6'd14,
    OP_LDBM   = 6'd16,
    OP_STBM   = 6'd17,
    OP_LD     = 6'd18,
    OP_ST     = 6'd19,
    OP_NSG    = 6'd20,
    OP_BFLUSH = 6'd21,
    OP_NPASS  = 6'd22,
    OP_NST    = 6'd23,
    OP_CTRL   = 6'b111111
  } opcode_e;

  // C-type function codes
  typedef enum logic [5:0] {
    FN_REPEAT = 6'd1,
    FN_BNZ    = 6'd2,
    FN_RDGMEM = 6'd3,
    FN_WRGMEM = 6'd4,
    FN_STOP   = 6'd5
  } cfunc_e;

  // Second-operand source (OPSrc field)
  typedef enum logic [3:0] {
    SRC_RF    = 4'd0,   // Register File [Src2]
    SRC_IMM   = 4'd1,   // 16-bit immediate in BrOffset/Bmaddr, sign-extended
    SRC_BM    = 4'd2,   // own BM bank at Bmaddr
    SRC_NFIFO = 4'd3,
    SRC_EFIFO = 4'd4,
    SRC_WFIFO = 4'd5,
    SRC_SFIFO = 4'd6,
    SRC_PEID  = 4'd7,
    SRC_BMBC  = 4'd8    // BM broadcast: bank BrOffset at Bmaddr
  } opsrc_e;

  // R-type "mode": where the result goes
  localparam logic [1:0] MODE_RF      = 2'd0; // write RDst
  localparam logic [1:0] MODE_RF_LM   = 2'd1; // write RDst and LM[Lmaddr]
  localparam logic [1:0] MODE_SCAT    = 2'd2; // scatter to NDst
  localparam logic [1:0] MODE_LM_SCAT = 2'd3; // LM[Lmaddr] and scatter to NDst

  // Neighbour directions, one-hot bit index
  localparam int unsigned DIR_N = 0;
  localparam int unsigned DIR_E = 1;
  localparam int unsigned DIR_W = 2;
  localparam int unsigned DIR_S = 3;

  // ----------------------------------------------------- field layout
  // R-type: opcode|Src1|mode|Lmaddr|BrOffset|Bmaddr|Src2|RDst|OPSrc
  typedef struct packed {
    logic [5:0]  opcode;
    logic [7:0]  src1;
    logic [1:0]  mode;
    logic [11:0] lmaddr;
    logic [3:0]  broffset;
    logic [11:0] bmaddr;
    logic [7:0]  src2;
    logic [7:0]  rdst;      // NDst in scatter modes
    logic [3:0]  opsrc;
  } rtype_t;

  // LDBM: opcode|Mask_load|mode|Lmaddr|BrOffset|Bmaddr|unused|data_count
  typedef struct packed {
    logic [5:0]  opcode;
    logic [7:0]  mask;      // [3:0] first PE, [7:4] number of PEs (0 = 16)
    logic [1:0]  mode;      // bit0: broadcast from bank BrOffset
    logic [11:0] lmaddr;
    logic [3:0]  broffset;
    logic [11:0] bmaddr;
    logic [7:0]  unused;
    logic [11:0] count;
  } ldbm_t;

  // N-type: opcode|unused|mode|Lmaddr|unused|Src2|NDst|NSrc
  typedef struct packed {
    logic [5:0]  opcode;
    logic [7:0]  unused0;
    logic [1:0]  mode;
    logic [11:0] lmaddr;
    logic [15:0] unused1;
    logic [7:0]  src2;
    logic [7:0]  ndst;      // [3:0] one-hot N/E/W/S destinations
    logic [3:0]  nsrc;      // one-hot N/E/W/S source buffer(s)
  } ntype_t;

  // C-type (slot 1): opcode|Function|payload
  typedef struct packed {
    logic [5:0]  opcode;    // 6'b111111
    logic [5:0]  func;
    logic [7:0]  burst;     // RDGMEM/WRGMEM: beats - 1
    logic [11:0] bmoffset;  // RDGMEM/WRGMEM: BM word offset
    logic [31:0] gm_hi;     // RDGMEM/WRGMEM: GM offset [63:32]
  } ctype_t;

  // REPEAT iterations occupy the 20 bits after Function
  function automatic logic [19:0] c_iterations(input logic [63:0] s);
    return s[51:32];
  endfunction

  function automatic logic [63:0] sext16(input logic [15:0] v);
    return {{48{v[15]}}, v};
  endfunction

  // ------------------------------------------------ DMA command frame
  typedef struct packed {
    logic        write;     // 1: BM -> GM (WRGMEM), 0: GM -> BM (RDGMEM)
    logic [63:0] gm_off;    // byte offset within the BC's GM buffer
    logic [11:0] bm_off;    // BM word offset (same in all 16 banks)
    logic [8:0]  beats;     // 1..256
  } dma_cmd_t;

  // ------------------------------------------------------------- AXI4
  typedef struct packed {
    logic [GM_AW-1:0] addr;
    logic [7:0]       len;
    logic [2:0]       size;
    logic [1:0]       burst;
  } axi_ax_t;

  typedef struct packed {
    logic [GM_DW-1:0]   data;
    logic [GM_DW/8-1:0] strb;
    logic               last;
  } axi_w_t;

  typedef struct packed {
    logic [GM_DW-1:0] data;
    logic [1:0]       resp;
    logic             last;
  } axi_r_t;

  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    logic [1:0] b_resp;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_rsp_t;

  // ------------------------------------------------------ AXI-Lite
  typedef struct packed {
    logic [11:0] aw_addr;
    logic        aw_valid;
    logic [31:0] w_data;
    logic [3:0]  w_strb;
    logic        w_valid;
    logic        b_ready;
    logic [11:0] ar_addr;
    logic        ar_valid;
    logic        r_ready;
  } axil_req_t;

  typedef struct packed {
    logic        aw_ready;
    logic        w_ready;
    logic [1:0]  b_resp;
    logic        b_valid;
    logic        ar_ready;
    logic [31:0] r_data;
    logic [1:0]  r_resp;
    logic        r_valid;
  } axil_rsp_t;

  // AXI-Lite register map (byte addresses)
  localparam logic [11:0] REG_CTRL     = 12'h000; // [0] start [1] done [2] idle [3] ready
  localparam logic [11:0] REG_GIE      = 12'h004;
  localparam logic [11:0] REG_IER      = 12'h008;
  localparam logic [11:0] REG_ISR      = 12'h00C;
  localparam logic [11:0] REG_PSIZE    = 12'h010; // program size in bytes
  localparam logic [11:0] REG_REUSE    = 12'h018; // [0] skip boot, reuse IM
  localparam logic [11:0] REG_IMPTR    = 12'h020; // 64-bit program pointer
  localparam logic [11:0] REG_GMPTR0   = 12'h028; // 64-bit data pointer of BC k at +8k

endpackage
