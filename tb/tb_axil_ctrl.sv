// tb_axil_ctrl: self-checking test of the AXI-Lite control interface.
// Writes and reads back the argument registers, runs the start/ready and
// done handshakes, and checks the done interrupt, its enables and the
// toggle-on-write clear.
module tb_axil_ctrl;
  import dragon_pkg::*;
  localparam int NBC = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  axil_req_t req;
  axil_rsp_t rsp;
  logic ap_start, ap_ready, ap_done, ap_idle, reuse, irq;
  logic [31:0] psize;
  logic [63:0] im_ptr;
  logic [NBC-1:0][63:0] gm_ptr;
  int checks = 0, failures = 0;

  axil_ctrl #(.NBC(NBC)) dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .ap_start, .ap_ready,
    .ap_done, .ap_idle, .prog_size(psize), .reuse, .im_ptr, .gm_ptr, .irq);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    req.aw_addr = a; req.aw_valid = 1; req.w_data = d; req.w_valid = 1; req.w_strb = '1;
    do @(posedge clk); while (!rsp.aw_ready);
    @(negedge clk); req.aw_valid = 0; req.w_valid = 0; req.b_ready = 1;
    while (!rsp.b_valid) @(negedge clk);
    @(negedge clk); req.b_ready = 0;
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    req.ar_addr = a; req.ar_valid = 1;
    do @(posedge clk); while (!rsp.ar_ready);
    @(negedge clk); req.ar_valid = 0; req.r_ready = 1;
    while (!rsp.r_valid) @(negedge clk);
    d = rsp.r_data;
    @(negedge clk); req.r_ready = 0;
  endtask

  initial begin
    logic [31:0] d;
    req = '0; ap_ready = 0; ap_done = 0; ap_idle = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    wr(REG_PSIZE, 32'd4096);       chk(psize, 4096, "psize");
    wr(REG_REUSE, 1);              chk(reuse, 1, "reuse");
    wr(REG_IMPTR, 32'h1000);       wr(REG_IMPTR + 4, 32'h2);
    chk(im_ptr, 64'h2_0000_1000, "im_ptr");
    for (int k = 0; k < NBC; k++) begin
      wr(REG_GMPTR0 + 12'(8*k), 32'h100 * (k + 1));
      wr(REG_GMPTR0 + 12'(8*k + 4), k);
    end
    for (int k = 0; k < NBC; k++) chk(gm_ptr[k], {32'(k), 32'h100 * (k + 1)}, "gm_ptr");
    rd(REG_GMPTR0 + 8, d);         chk(d, 32'h200, "read gm_ptr1");
    rd(REG_PSIZE, d);              chk(d, 4096, "read psize");
    rd(REG_CTRL, d);               chk(d, 32'h4, "idle");
    wr(REG_GIE, 1); wr(REG_IER, 1);
    wr(REG_CTRL, 1);               chk(ap_start, 1, "start set");
    @(negedge clk); ap_ready = 1; ap_idle = 0; @(negedge clk); ap_ready = 0;
    chk(ap_start, 0, "start cleared by ready");
    chk(irq, 0, "no irq yet");
    repeat (3) @(negedge clk); ap_done = 1; @(negedge clk); ap_done = 0; ap_idle = 1;
    chk(irq, 1, "irq on done");
    rd(REG_CTRL, d);               chk(d[1], 1, "done bit");
    rd(REG_CTRL, d);               chk(d[1], 0, "done clears on read");
    rd(REG_ISR, d);                chk(d, 1, "isr");
    wr(REG_ISR, 1);                chk(irq, 0, "isr toggled clear");
    wr(REG_IER, 0);
    @(negedge clk); ap_done = 1; @(negedge clk); ap_done = 0;
    chk(irq, 0, "irq masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
