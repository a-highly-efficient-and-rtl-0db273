// axil_host.svh: AXI-Lite host tasks shared by the testbenches.
// Expects clk, axil_req (axil_req_t) and axil_rsp (axil_rsp_t) in scope.
task automatic axil_write(input logic [11:0] a, input logic [31:0] d);
  @(negedge clk);
  axil_req.aw_addr = a; axil_req.aw_valid = 1; axil_req.w_data = d; axil_req.w_valid = 1;
  axil_req.w_strb = '1;
  do @(posedge clk); while (!axil_rsp.aw_ready);
  @(negedge clk); axil_req.aw_valid = 0; axil_req.w_valid = 0; axil_req.b_ready = 1;
  while (!axil_rsp.b_valid) @(negedge clk);
  @(negedge clk); axil_req.b_ready = 0;
endtask

task automatic axil_read(input logic [11:0] a, output logic [31:0] d);
  @(negedge clk);
  axil_req.ar_addr = a; axil_req.ar_valid = 1;
  do @(posedge clk); while (!axil_rsp.ar_ready);
  @(negedge clk); axil_req.ar_valid = 0; axil_req.r_ready = 1;
  while (!axil_rsp.r_valid) @(negedge clk);
  d = axil_rsp.r_data;
  @(negedge clk); axil_req.r_ready = 0;
endtask

task automatic axil_write64(input logic [11:0] a, input logic [63:0] d);
  axil_write(a, d[31:0]);
  axil_write(a + 12'd4, d[63:32]);
endtask
