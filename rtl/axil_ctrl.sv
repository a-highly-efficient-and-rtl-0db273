// axil_ctrl: AXI-Lite control interface of the DRAGON sequencer.
//
// The host's view of the overlay: a small register file reached over
// AXI-Lite (32-bit data) holding the kernel handshake and the scalar and
// pointer arguments.
//   0x000 CTRL   [0] start (host writes 1; cleared when the overlay
//                acknowledges it), [1] done (set at the end of the program,
//                cleared when CTRL is read), [2] idle, [3] ready
//   0x004 GIE    global interrupt enable
//   0x008 IER    [0] enable the done interrupt
//   0x00C ISR    [0] done interrupt status, a written 1 toggles it
//   0x010 PSIZE  program size in bytes
//   0x018 REUSE  [0] skip the boot sequence and reuse the loaded program
//   0x020 IMPTR  64-bit GM pointer of the program (low word, then high)
//   0x028+8k     64-bit GM pointer of broadcast cluster k
// irq = GIE & IER[0] & ISR[0]. A write needs AW and W together; one
// transaction at a time in each direction. The start/done/idle handshake,
// the program size, the reuse flag, the pointers and the interrupt follow
// the document; the register map and the bit positions are this design's
// (modelled on the usual layout of host-controlled kernels).
module axil_ctrl
  import dragon_pkg::*;
#(
  parameter int unsigned NBC = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_req,
  output axil_rsp_t         s_rsp,
  // to / from the control unit
  output logic              ap_start,
  input  logic              ap_ready,   // start acknowledged (pulse)
  input  logic              ap_done,    // end of program (pulse)
  input  logic              ap_idle,
  output logic [31:0]       prog_size,
  output logic              reuse,
  output logic [63:0]       im_ptr,
  output logic [NBC-1:0][63:0] gm_ptr,
  output logic              irq
);
  logic done_q, gie, ier, isr, bv, rv;
  logic [31:0] rdat;

  logic wr_fire;
  assign wr_fire = s_req.aw_valid && s_req.w_valid && !bv;
  assign s_rsp.b_valid = bv;
  assign s_rsp.r_valid = rv;
  assign s_rsp.r_data  = rdat;

  assign s_rsp.aw_ready = wr_fire;
  assign s_rsp.w_ready  = wr_fire;
  assign s_rsp.b_resp   = 2'b00;
  assign s_rsp.r_resp   = 2'b00;
  assign s_rsp.ar_ready = !rv;

  function automatic logic [31:0] rd_reg(input logic [11:0] a);
    logic [31:0] v;
    v = '0;
    unique case (a)
      REG_CTRL:        v = {28'd0, ap_ready, ap_idle, done_q, ap_start};
      REG_GIE:         v = {31'd0, gie};
      REG_IER:         v = {31'd0, ier};
      REG_ISR:         v = {31'd0, isr};
      REG_PSIZE:       v = prog_size;
      REG_REUSE:       v = {31'd0, reuse};
      REG_IMPTR:       v = im_ptr[31:0];
      REG_IMPTR + 4:   v = im_ptr[63:32];
      default: begin
        for (int k = 0; k < int'(NBC); k++) begin
          if (a == REG_GMPTR0 + 12'(8*k))     v = gm_ptr[k][31:0];
          if (a == REG_GMPTR0 + 12'(8*k + 4)) v = gm_ptr[k][63:32];
        end
      end
    endcase
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start <= 1'b0; done_q <= 1'b0; gie <= 1'b0; ier <= 1'b0; isr <= 1'b0;
      prog_size <= '0; reuse <= 1'b0; im_ptr <= '0; gm_ptr <= '0;
      bv <= 1'b0; rv <= 1'b0; rdat <= '0;
    end else begin
      // handshake from the control unit
      if (ap_ready) ap_start <= 1'b0;
      if (ap_done) begin
        done_q <= 1'b1;
        isr    <= 1'b1;
      end
      // write channel
      if (bv && s_req.b_ready) bv <= 1'b0;
      if (wr_fire) begin
        bv <= 1'b1;
        unique case (s_req.aw_addr)
          REG_CTRL:      if (s_req.w_data[0]) ap_start <= 1'b1;
          REG_GIE:       gie <= s_req.w_data[0];
          REG_IER:       ier <= s_req.w_data[0];
          REG_ISR:       isr <= isr ^ s_req.w_data[0];
          REG_PSIZE:     prog_size <= s_req.w_data;
          REG_REUSE:     reuse <= s_req.w_data[0];
          REG_IMPTR:     im_ptr[31:0]  <= s_req.w_data;
          REG_IMPTR + 4: im_ptr[63:32] <= s_req.w_data;
          default: begin
            for (int k = 0; k < int'(NBC); k++) begin
              if (s_req.aw_addr == REG_GMPTR0 + 12'(8*k))     gm_ptr[k][31:0]  <= s_req.w_data;
              if (s_req.aw_addr == REG_GMPTR0 + 12'(8*k + 4)) gm_ptr[k][63:32] <= s_req.w_data;
            end
          end
        endcase
      end
      // read channel
      if (rv && s_req.r_ready) rv <= 1'b0;
      if (s_req.ar_valid && !rv) begin
        rv   <= 1'b1;
        rdat <= rd_reg(s_req.ar_addr);
        if (s_req.ar_addr == REG_CTRL && !ap_done) done_q <= 1'b0;
      end
    end
  end

  assign irq = gie && ier && isr;
endmodule
