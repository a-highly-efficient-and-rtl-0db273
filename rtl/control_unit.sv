// control_unit: the control unit of the DRAGON sequencer.
//
// Waits for the host's start bit, acknowledges it, runs the boot sequence
// (the instruction DMA copies the program into the IM) unless the reuse
// flag asks to keep the program already loaded, then executes the program.
// In the run state the program counter advances every cycle; the IM
// returns each 128-bit VLIW word one cycle later, and the word is decoded:
//   * accelerator words: slot 1 goes out on the dual-compute-slot stream,
//     slot 2 on the memory-slot stream (the broadcast memory controllers
//     see both), registered, to every PE of every cluster;
//   * C-type words (slot-1 opcode 6'b111111) are executed here and NOPs go
//     out instead: REPEAT pushes a loop on the hardware stack, BNZ
//     decrements it and branches back while iterations remain, RDGMEM and
//     WRGMEM send one command frame to all data DMAs (GM offset: upper 32
//     bits in slot 1, lower 32 bits in slot 2) and stall the program until
//     every DMA has finished, STOP ends the program and reports done.
// BNZ resolves in the cycle it is decoded, so the word after BNZ is always
// executed (one delay slot, which the program fills with a NOP, as the
// document prescribes). The PC is {line pointer, 3-bit offset pointer}.
// From the document: boot/bypass, the PC split, the streams, the C-type
// instructions, seven loop levels, the NOP output during C-type words and
// the delay slot after BNZ. Own choices: the blocking wait on DMAs (it
// keeps data movement and computation in order without queues), the
// count semantics of REPEAT (the body runs n times) and the state machine.
module control_unit
  import dragon_pkg::*;
#(
  parameter int unsigned PCW = 15
) (
  input  logic            clk,
  input  logic            rst_n,
  // AXI-Lite control interface
  input  logic            ap_start,
  input  logic            reuse,
  output logic            ap_ready,
  output logic            ap_done,
  output logic            ap_idle,
  // instruction DMA
  output logic            imdma_start,
  input  logic            imdma_done,
  // instruction memory read port
  output logic            im_re,
  output logic [PCW-4:0]  im_line,
  output logic [2:0]      im_offset,
  input  logic [63:0]     im_slot1,
  input  logic [63:0]     im_slot2,
  // streams
  output logic [63:0]     dc_slot_stream,
  output logic [63:0]     mem_slot_stream,
  output logic            dma_cmd_valid,
  output dma_cmd_t        dma_cmd,
  input  logic            dma_busy,
  output logic            loop_error
);
  typedef enum logic [2:0] {S_IDLE, S_BOOT, S_BOOTW, S_RUN, S_DMA, S_DMAW} st_e;
  st_e st;

  logic [PCW-1:0] pc, dpc;
  logic           fv;       // IM output holds a fetched word
  ctype_t         c1;
  logic           is_c;
  assign c1   = ctype_t'(im_slot1);
  assign is_c = fv && (opcode_e'(c1.opcode) == OP_CTRL);

  logic ls_push, ls_bnz, ls_taken, ls_clear;
  logic [PCW-1:0] ls_target;
  logic [2:0] ls_depth;

  loop_stack #(.LEVELS(LOOP_LEVELS), .CW(20), .PW(PCW)) u_stack (
    .clk, .rst_n, .clear(ls_clear),
    .push(ls_push), .push_cnt(c_iterations(im_slot1)), .push_pc(dpc + 1'b1),
    .bnz(ls_bnz), .taken(ls_taken), .target(ls_target),
    .depth(ls_depth), .error(loop_error)
  );

  logic fetch;
  assign fetch     = (st == S_RUN) && !(is_c && cfunc_e'(c1.func) inside {FN_RDGMEM, FN_WRGMEM, FN_STOP});
  assign im_re     = fetch;
  assign im_line   = pc[PCW-1:3];
  assign im_offset = pc[2:0];

  assign ls_clear = (st == S_IDLE);
  assign ls_push  = (st == S_RUN) && is_c && cfunc_e'(c1.func) == FN_REPEAT;
  assign ls_bnz   = (st == S_RUN) && is_c && cfunc_e'(c1.func) == FN_BNZ;
  assign ap_idle  = (st == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pc <= '0; dpc <= '0; fv <= 1'b0;
      ap_ready <= 1'b0; ap_done <= 1'b0; imdma_start <= 1'b0;
      dc_slot_stream <= '0; mem_slot_stream <= '0;
      dma_cmd_valid <= 1'b0; dma_cmd <= '0;
    end else begin
      ap_ready      <= 1'b0;
      ap_done       <= 1'b0;
      imdma_start   <= 1'b0;
      dma_cmd_valid <= 1'b0;
      dc_slot_stream  <= '0;     // NOP unless an accelerator word issues
      mem_slot_stream <= '0;
      unique case (st)
        S_IDLE: begin
          fv <= 1'b0;
          pc <= '0;
          if (ap_start) begin
            ap_ready <= 1'b1;
            if (reuse) st <= S_RUN;
            else begin
              imdma_start <= 1'b1;
              st          <= S_BOOT;
            end
          end
        end
        S_BOOT:  st <= S_BOOTW;
        S_BOOTW: if (imdma_done) st <= S_RUN;
        S_RUN: begin
          fv  <= fetch;
          dpc <= pc;
          if (fetch) pc <= pc + 1'b1;
          if (is_c) begin
            unique case (cfunc_e'(c1.func))
              FN_BNZ: if (ls_taken) pc <= ls_target;
              FN_RDGMEM, FN_WRGMEM: begin
                dma_cmd.write  <= (cfunc_e'(c1.func) == FN_WRGMEM);
                dma_cmd.gm_off <= {c1.gm_hi, im_slot2[31:0]};
                dma_cmd.bm_off <= c1.bmoffset;
                dma_cmd.beats  <= 9'(c1.burst) + 9'd1;
                pc             <= dpc + 1'b1;
                fv             <= 1'b0;
                st             <= S_DMA;
              end
              FN_STOP: begin
                ap_done <= 1'b1;
                fv      <= 1'b0;
                st      <= S_IDLE;
              end
              default: ;
            endcase
          end else if (fv) begin
            dc_slot_stream  <= im_slot1;
            mem_slot_stream <= im_slot2;
          end
        end
        S_DMA: begin
          dma_cmd_valid <= 1'b1;
          st            <= S_DMAW;
        end
        S_DMAW: if (!dma_cmd_valid && !dma_busy) st <= S_RUN;
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
