// fpu_mac: double-precision multiply-accumulate unit of the DRAGON PE.
//
// A floating-point multiplier chained to a floating-point adder, with the
// adder's result kept in an accumulator (ACC). Three pipeline stages, one
// per PE execute stage:
//   EX1  unpack both IEEE-754 binary64 operands (sign, exponent, mantissa
//        with hidden bit);
//   EX2  53x53 mantissa multiply and normalise;
//   EX3  input mux, add, normalise, pack; the result is registered as the
//        output C and as ACC.
// The EX3 input mux forms the adder's two inputs:
//   FADD   A + B            FSUB   A + (-B)
//   FMUL   A*B + 0          FMACCA ACC + A*B      FMACCS ACC + (-(A*B))
// Every floating-point operation loads its result into ACC, so a chain
// FMUL, FMACCA, FMACCA ... accumulates, back to back, one per cycle.
// Latency is 3 cycles from in_valid to out_valid, throughput one per cycle.
//
// From the document: the stage split (Unpack / Multiplier with Norm /
// Input mux, Adder with Norm), the zero and invert-sign inputs of the
// input mux, the accumulator feedback, the 3-cycle latency and truncation
// as the rounding mode for all operations. Own choices: subnormal inputs
// and results are flushed to zero, overflow gives infinity, NaNs are not
// generated (an infinite operand propagates as infinity), and the adder
// keeps three extra bits below the mantissa before truncating, so a
// subtraction can differ from exact truncation by one unit in the last
// place.
module fpu_mac
  import dragon_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  output logic    out_valid,
  output word_t   y
);
  typedef struct packed {
    logic               sign;
    logic               zero;
    logic               inf;
    logic signed [12:0] exp;
    logic [52:0]        mant;
  } unp_t;

  function automatic unp_t unpack(input word_t v);
    unp_t u;
    u.sign = v[63];
    u.zero = (v[62:52] == 11'd0);
    u.inf  = (v[62:52] == 11'h7FF);
    u.exp  = 13'(v[62:52]);
    u.mant = u.zero ? 53'd0 : {1'b1, v[51:0]};
    return u;
  endfunction

  function automatic word_t pack(input unp_t u);
    if (u.inf || u.exp >= 13'sd2047) return {u.sign, 11'h7FF, 52'd0};
    if (u.zero || u.exp <= 13'sd0)   return {u.sign, 63'd0};
    return {u.sign, u.exp[10:0], u.mant[51:0]};
  endfunction

  function automatic unp_t fmul(input unp_t x, input unp_t z);
    unp_t r;
    logic [105:0] p;
    p      = x.mant * z.mant;
    r.sign = x.sign ^ z.sign;
    r.inf  = x.inf | z.inf;
    r.zero = !r.inf && (x.zero | z.zero);
    if (p[105]) begin
      r.mant = p[105:53];
      r.exp  = x.exp + z.exp - 13'sd1022;
    end else begin
      r.mant = p[104:52];
      r.exp  = x.exp + z.exp - 13'sd1023;
    end
    if (!r.inf && !r.zero && r.exp <= 13'sd0) r.zero = 1'b1;
    if (!r.zero && r.exp >= 13'sd2047) r.inf = 1'b1;
    return r;
  endfunction

  function automatic unp_t fadd(input unp_t x, input unp_t z);
    unp_t  big, sml, r;
    logic [55:0] mb, ms, d56;
    logic [56:0] s;
    logic [12:0] d;
    int          lz;
    if (x.inf) return x;
    if (z.inf) return z;
    if (x.zero) return z;
    if (z.zero) return x;
    if ({x.exp, x.mant} >= {z.exp, z.mant}) begin big = x; sml = z; end
    else begin big = z; sml = x; end
    d  = 13'(big.exp - sml.exp);
    mb = {big.mant, 3'b000};
    ms = (d > 13'd55) ? 56'd0 : ({sml.mant, 3'b000} >> d);
    r       = big;
    r.inf   = 1'b0;
    r.zero  = 1'b0;
    if (big.sign == sml.sign) begin
      s = {1'b0, mb} + {1'b0, ms};
      if (s[56]) begin
        r.mant = s[56:4];
        r.exp  = big.exp + 13'sd1;
      end else begin
        r.mant = s[55:3];
      end
    end else begin
      d56 = mb - ms;
      if (d56 == '0) begin
        r.zero = 1'b1;
        r.sign = 1'b0;
        r.mant = '0;
      end else begin
        lz = 0;
        for (int i = 55; i >= 0; i--) begin
          if (d56[i]) break;
          lz++;
        end
        d56    = d56 << lz;
        r.mant = d56[55:3];
        r.exp  = big.exp - 13'(lz);
      end
    end
    if (!r.zero && r.exp <= 13'sd0) r.zero = 1'b1;
    if (!r.zero && r.exp >= 13'sd2047) r.inf = 1'b1;
    return r;
  endfunction

  // ---------------------------------------------------------------- EX1
  logic    v1;
  opcode_e op1;
  unp_t    ua1, ub1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      op1 <= OP_NOP;
      ua1 <= '0;
      ub1 <= '0;
    end else begin
      v1  <= in_valid;
      op1 <= op;
      ua1 <= unpack(a);
      ub1 <= unpack(b);
    end
  end

  // ---------------------------------------------------------------- EX2
  logic    v2;
  opcode_e op2;
  unp_t    ua2, ub2, m2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2  <= 1'b0;
      op2 <= OP_NOP;
      ua2 <= '0;
      ub2 <= '0;
      m2  <= '0;
    end else begin
      v2  <= v1;
      op2 <= op1;
      ua2 <= ua1;
      ub2 <= ub1;
      m2  <= fmul(ua1, ub1);
    end
  end

  // ---------------------------------------------------------------- EX3
  unp_t acc_u, in_x, in_z, zero_u;

  always_comb begin
    zero_u      = '0;
    zero_u.zero = 1'b1;
    acc_u       = unpack(y);
    unique case (op2)
      OP_FADD:   begin in_x = ua2;   in_z = ub2; end
      OP_FSUB:   begin in_x = ua2;   in_z = ub2; in_z.sign = ~ub2.sign; end
      OP_FMUL:   begin in_x = m2;    in_z = zero_u; end
      OP_FMACCA: begin in_x = acc_u; in_z = m2; end
      OP_FMACCS: begin in_x = acc_u; in_z = m2;  in_z.sign = ~m2.sign; end
      default:   begin in_x = zero_u; in_z = zero_u; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= v2;
      if (v2) y <= pack(fadd(in_x, in_z));
    end
  end
endmodule
