// gm_model: behavioural model of one global-memory (HBM) bank for the
// testbenches. An AXI4 slave with 1024-bit data, INCR bursts only, one read
// and one write burst in flight at a time, and optional random stalls on
// every channel (STALL = percentage of cycles a ready/valid is held low).
// The memory is an array of 128-byte lines starting at byte address 0;
// testbenches fill and inspect mem[] directly.
module gm_model
  import dragon_pkg::*;
#(
  parameter int LINES = 1024,
  parameter int STALL = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t req,
  output axi_rsp_t rsp
);
  logic [GM_DW-1:0] mem [LINES];

  // read side
  logic        r_act;
  logic [63:0] r_line;
  logic [8:0]  r_left;
  // write side
  logic        w_act, b_pend;
  logic [63:0] w_line;
  logic        st_ar, st_r, st_aw, st_w;

  int reads = 0, writes = 0;

  always_ff @(posedge clk) begin
    st_ar <= ($urandom % 100) < STALL;
    st_r  <= ($urandom % 100) < STALL;
    st_aw <= ($urandom % 100) < STALL;
    st_w  <= ($urandom % 100) < STALL;
  end

  always_comb begin
    rsp          = '0;
    rsp.ar_ready = !r_act && !st_ar;
    rsp.r_valid  = r_act && !st_r;
    rsp.r.data   = mem[r_line % LINES];
    rsp.r.last   = (r_left == 9'd1);
    rsp.aw_ready = !w_act && !b_pend && !st_aw;
    rsp.w_ready  = w_act && !st_w;
    rsp.b_valid  = b_pend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_act <= 0; r_line <= 0; r_left <= 0; w_act <= 0; b_pend <= 0; w_line <= 0;
    end else begin
      if (req.ar_valid && rsp.ar_ready) begin
        r_act  <= 1;
        r_line <= req.ar.addr >> 7;
        r_left <= 9'(req.ar.len) + 9'd1;
        reads++;
      end
      if (rsp.r_valid && req.r_ready) begin
        r_line <= r_line + 1;
        r_left <= r_left - 1;
        if (r_left == 9'd1) r_act <= 0;
      end
      if (req.aw_valid && rsp.aw_ready) begin
        w_act  <= 1;
        w_line <= req.aw.addr >> 7;
        writes++;
      end
      if (rsp.w_ready && req.w_valid) begin
        mem[w_line % LINES] <= req.w.data;
        w_line <= w_line + 1;
        if (req.w.last) begin
          w_act  <= 0;
          b_pend <= 1;
        end
      end
      if (b_pend && req.b_ready) b_pend <= 0;
    end
  end
endmodule
