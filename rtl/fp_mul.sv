// fp_mul: IEEE 754 single-precision multiplier, three-stage pipeline.
//
// Because the format is sign-magnitude, the sign is the XOR of the input signs and the
// rest is an unsigned 24 x 24-bit multiply of the significands plus an exponent sum:
//   stage 1: unpack, XOR the signs, add the exponents, multiply the significands;
//   stage 2: normalise the 48-bit product (it lies in [1,4)), round to nearest even;
//   stage 3: range check and pack.
// A new operand pair is accepted every clock and the result appears 3 clocks later with
// `out_valid`. Simplifications of this design: subnormal inputs count as zero, results
// below the normal range flush to signed zero, overflow gives infinity, and NaN inputs
// are not treated specially.
module fp_mul (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  // stage 1 registers
  logic        s1_v, s1_sign, s1_zero;
  logic signed [10:0] s1_exp;
  logic [47:0] s1_prod;
  // stage 2 registers
  logic        s2_v, s2_sign, s2_zero;
  logic signed [10:0] s2_exp;
  logic [23:0] s2_mant;

  logic        a_zero, b_zero;
  assign a_zero = (a[30:23] == 8'd0);
  assign b_zero = (b[30:23] == 8'd0);

  // stage 2 combinational: normalise and round
  logic        hi;
  logic [23:0] m_trunc;
  logic        g, st, rnd;
  logic [24:0] m_rnd;
  always_comb begin
    hi      = s1_prod[47];
    m_trunc = hi ? s1_prod[47:24] : s1_prod[46:23];
    g       = hi ? s1_prod[23] : s1_prod[22];
    st      = hi ? (|s1_prod[22:0]) : (|s1_prod[21:0]);
    rnd     = g & (st | m_trunc[0]);
    m_rnd   = {1'b0, m_trunc} + 25'(rnd);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; out_valid <= 1'b0;
      s1_sign <= 1'b0; s1_zero <= 1'b1; s1_exp <= '0; s1_prod <= '0;
      s2_sign <= 1'b0; s2_zero <= 1'b1; s2_exp <= '0; s2_mant <= '0;
      y <= '0;
    end else begin
      // stage 1
      s1_v    <= in_valid;
      s1_sign <= a[31] ^ b[31];
      s1_zero <= a_zero | b_zero;
      s1_exp  <= $signed({3'b0, a[30:23]}) + $signed({3'b0, b[30:23]}) - 11'sd127;
      s1_prod <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
      // stage 2
      s2_v    <= s1_v;
      s2_sign <= s1_sign;
      s2_zero <= s1_zero;
      if (m_rnd[24]) begin
        s2_mant <= m_rnd[24:1];
        s2_exp  <= s1_exp + 11'sd1 + 11'(hi);
      end else begin
        s2_mant <= m_rnd[23:0];
        s2_exp  <= s1_exp + 11'(hi);
      end
      // stage 3
      out_valid <= s2_v;
      if (s2_zero || s2_exp < 11'sd1)
        y <= {s2_sign, 31'd0};
      else if (s2_exp > 11'sd254)
        y <= {s2_sign, 8'hff, 23'd0};
      else
        y <= {s2_sign, s2_exp[7:0], s2_mant[22:0]};
    end
  end
endmodule
