// tb_fpu_mac: self-checking test of the double-precision MAC unit.
// 1) exact cases (small integers and binary fractions) compared bit for
//    bit: FADD, FSUB, FMUL, and a Laplace-style chain FMUL, FMACCA x3,
//    FMACCS issued back to back through the accumulator;
// 2) random operands compared with real arithmetic within a few units in
//    the last place (the unit truncates, the reference rounds);
// 3) the 3-cycle latency from in_valid to out_valid.
module tb_fpu_mac;
  import dragon_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  opcode_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  fpu_mac dut (.clk, .rst_n, .in_valid, .op, .a, .b, .out_valid, .y);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in issue order
  real    expq[$];
  logic   exactq[$];
  real    magq[$];
  int     lat_issue[$];
  int     cyc = 0;
  always @(posedge clk) cyc++;

  real acc_model = 0.0;

  task automatic issue(input opcode_e o, input real ra, input real rb, input logic exact);
    real r, m;
    @(negedge clk);
    in_valid = 1; op = o; a = $realtobits(ra); b = $realtobits(rb);
    case (o)
      OP_FADD:   begin r = ra + rb; m = (ra < 0 ? -ra : ra) + (rb < 0 ? -rb : rb); end
      OP_FSUB:   begin r = ra - rb; m = (ra < 0 ? -ra : ra) + (rb < 0 ? -rb : rb); end
      OP_FMUL:   begin r = ra * rb; m = r < 0 ? -r : r; end
      OP_FMACCA: begin r = acc_model + ra * rb;
                       m = (acc_model < 0 ? -acc_model : acc_model) + (ra*rb < 0 ? -ra*rb : ra*rb); end
      default:   begin r = acc_model - ra * rb;
                       m = (acc_model < 0 ? -acc_model : acc_model) + (ra*rb < 0 ? -ra*rb : ra*rb); end
    endcase
    acc_model = r;
    expq.push_back(r); exactq.push_back(exact); magq.push_back(m); lat_issue.push_back(cyc);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      real e, g, d, m;
      logic ex;
      int   t0;
      e = expq.pop_front(); ex = exactq.pop_front(); m = magq.pop_front(); t0 = lat_issue.pop_front();
      g = $bitstoreal(y);
      d = g - e; if (d < 0) d = -d;
      checks++;
      if (ex ? (y !== $realtobits(e)) : (d > m * 1.0e-15)) begin
        failures++;
        $display("FAIL got=%g exp=%g (%h)", g, e, y);
      end
      checks++;
      if (cyc - t0 != 3) begin
        failures++;
        $display("FAIL latency %0d", cyc - t0);
      end
    end
  end

  function automatic real rnd();
    real r;
    int  e;
    r = real'($urandom) / 4294967296.0 + 0.001;
    e = int'($urandom % 41) - 20;
    r = r * (2.0 ** e);
    if ($urandom % 2) r = -r;
    return r;
  endfunction

  initial begin
    in_valid = 0; op = OP_NOP; a = 0; b = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    issue(OP_FADD, 1.5, 2.25, 1);
    issue(OP_FSUB, 1.5, 2.25, 1);
    issue(OP_FMUL, -3.0, 0.125, 1);
    issue(OP_FADD, 7.0, -7.0, 1);
    issue(OP_FMUL, 0.0, 5.0, 1);
    // Laplace-like chain: 0.25*(n + s + e + w)
    issue(OP_FMUL,   0.25, 4.0, 1);
    issue(OP_FMACCA, 0.25, 8.0, 1);
    issue(OP_FMACCA, 0.25, 12.0, 1);
    issue(OP_FMACCA, 0.25, 16.0, 1);
    issue(OP_FMACCS, 0.5, 3.0, 1);
    issue(OP_FADD, 1.0e300, 1.0e300, 0);
    for (int i = 0; i < 2000; i++) begin
      opcode_e o;
      case ($urandom % 5)
        0: o = OP_FADD; 1: o = OP_FSUB; 2: o = OP_FMUL; 3: o = OP_FMACCA; default: o = OP_FMACCS;
      endcase
      issue(o, rnd(), rnd(), 0);
      if ($urandom % 4 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
