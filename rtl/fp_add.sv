// fp_add: IEEE 754 single-precision adder/subtractor, three-stage pipeline.
//
//   stage 1: unpack, order the operands by magnitude, align the smaller significand by
//            the exponent difference (keeping guard, round and sticky bits);
//   stage 2: add or subtract the aligned significands;
//   stage 3: normalise (one place right, or left by the leading-zero count), round to
//            nearest even, range check and pack.
// `sub` = 1 computes a - b. One operation per clock; the result appears 3 clocks later with
// `out_valid`, the same latency as fp_mul so the two can share one ALU schedule.
// Simplifications of this design: subnormal inputs count as zero, results below the normal
// range flush to zero, overflow gives infinity, NaN is not treated specially.
module fp_add (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        sub,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] y
);
  // ---------------- stage 1 (combinational part) ----------------
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_big;
  logic [7:0]  e_big, e_diff;
  logic [23:0] m_big, m_small;
  logic        s_big, eff_sub;
  logic [26:0] small_ext, small_sh;
  logic        sticky;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_big   = {ea, ma} >= {eb, mb};
    e_big   = a_big ? ea : eb;
    e_diff  = a_big ? (ea - eb) : (eb - ea);
    m_big   = a_big ? ma : mb;
    m_small = a_big ? mb : ma;
    s_big   = a_big ? sa : sb;
    eff_sub = sa ^ sb;
    small_ext = {m_small, 3'b000};
    if (e_diff >= 8'd27) begin
      small_sh = '0;
      sticky   = |m_small;
    end else begin
      small_sh = small_ext >> e_diff;
      sticky   = |(small_ext & ~(27'h7ffffff << e_diff));
    end
  end

  logic        s1_v, s1_sign, s1_sub;
  logic [7:0]  s1_exp;
  logic [26:0] s1_big, s1_small;

  // ---------------- stage 2 registers ----------------
  logic        s2_v, s2_sign;
  logic [7:0]  s2_exp;
  logic [27:0] s2_sum;

  // ---------------- stage 3 (combinational part) ----------------
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [9:0] e_norm;
  logic        g, st, rnd;
  logic [24:0] m_rnd;
  logic signed [9:0] e_fin;

  always_comb begin
    lz = 5'd0;
    for (int i = 0; i < 27; i++)
      if (s2_sum[i]) lz = 5'(26 - i);
    if (s2_sum[27]) begin
      norm   = {s2_sum[27:2], s2_sum[1] | s2_sum[0]};
      e_norm = $signed({2'b0, s2_exp}) + 10'sd1;
    end else begin
      norm   = s2_sum[26:0] << lz;
      e_norm = $signed({2'b0, s2_exp}) - $signed({5'b0, lz});
    end
    g     = norm[2];
    st    = |norm[1:0];
    rnd   = g & (st | norm[3]);
    m_rnd = {1'b0, norm[26:3]} + 25'(rnd);
    e_fin = m_rnd[24] ? e_norm + 10'sd1 : e_norm;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; out_valid <= 1'b0;
      s1_sign <= 1'b0; s1_sub <= 1'b0; s1_exp <= '0; s1_big <= '0; s1_small <= '0;
      s2_sign <= 1'b0; s2_exp <= '0; s2_sum <= '0;
      y <= '0;
    end else begin
      // stage 1
      s1_v     <= in_valid;
      s1_sign  <= s_big;
      s1_sub   <= eff_sub;
      s1_exp   <= e_big;
      s1_big   <= {m_big, 3'b000};
      s1_small <= {small_sh[26:1], small_sh[0] | sticky};
      // stage 2
      s2_v    <= s1_v;
      s2_sign <= s1_sign;
      s2_exp  <= s1_exp;
      s2_sum  <= s1_sub ? ({1'b0, s1_big} - {1'b0, s1_small})
                        : ({1'b0, s1_big} + {1'b0, s1_small});
      // stage 3
      out_valid <= s2_v;
      if (s2_sum == '0 || e_fin < 10'sd1)
        y <= '0;
      else if (e_fin > 10'sd254)
        y <= {s2_sign, 8'hff, 23'd0};
      else if (m_rnd[24])
        y <= {s2_sign, e_fin[7:0], m_rnd[23:1]};
      else
        y <= {s2_sign, e_fin[7:0], m_rnd[22:0]};
    end
  end
endmodule
