// firing_time: turns the requested voltage-time (dT_alpha, dT_beta) and its sector into the
// on-time of each inverter leg for one PWM period.
//
// With b3 = dT_beta/sqrt(3), p = dT_alpha + b3 and m = dT_alpha - b3, the two active vectors of
// the sector are applied for
//   sector 1: t1 = m,     t2 = 2 b3      sector 4: t1 = -2 b3, t2 = -m
//   sector 2: t1 = -m,    t2 = p         sector 5: t1 = -p,    t2 = m
//   sector 3: t1 = 2 b3,  t2 = -p        sector 6: t1 = p,     t2 = -2 b3
// where t1 belongs to the first vector of the firing order (Va) and t2 to the second (Vb):
//   sector 1: V1/V2, 2: V3/V2, 3: V3/V4, 4: V5/V4, 5: V5/V6, 6: V1/V6,
//   V1 = 100, V2 = 110, V3 = 010, V4 = 011, V5 = 001, V6 = 101 (phase u, v, w).
// The 3/2 factor between these and the true vector times is folded into the deadbeat gain.
// A leg is on while either of its vectors that has it set is applied, so its on-time is
// Va[x] t1 + Vb[x] t2, clamped to 0 .. PERIOD. The zero vectors fill the rest of the period,
// which the centre-aligned PWM splits evenly at both ends.
// Float: one multiplier for b3, three adders for p, m and 2 b3, two float-to-integer converters;
// the on-time sums are integer. Latency 8 clocks from in_valid to out_valid.
module firing_time
  import sd_pkg::*;
#(
  parameter int unsigned PERIOD = 500   // PWM period in clocks
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] sector,
  input  fp32_t      alpha,
  input  fp32_t      beta,
  output logic       out_valid,
  output logic [9:0] on_u,
  output logic [9:0] on_v,
  output logic [9:0] on_w
);
  localparam fp32_t INV_SQRT3 = real_to_fp(0.5773502691896258);

  fp32_t b3, p, m, b2;
  logic  v_b3, v_add, u_p, u_2, v_int, u_int;
  fp32_t a_d [3];
  logic [2:0] sec_d [7];

  fp_mul u_b3 (.clk, .rst_n, .in_valid, .a(beta), .b(INV_SQRT3), .out_valid(v_b3), .y(b3));
  fp_add i_p  (.clk, .rst_n, .in_valid(v_b3), .sub(1'b0), .a(a_d[2]), .b(b3), .out_valid(u_p),   .y(p));
  fp_add i_m  (.clk, .rst_n, .in_valid(v_b3), .sub(1'b1), .a(a_d[2]), .b(b3), .out_valid(v_add), .y(m));
  fp_add i_2b (.clk, .rst_n, .in_valid(v_b3), .sub(1'b0), .a(b3),     .b(b3), .out_valid(u_2),   .y(b2));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_d   <= '{default: '0};
      sec_d <= '{default: 3'd1};
    end else begin
      a_d[0] <= alpha;
      a_d[1] <= a_d[0];
      a_d[2] <= a_d[1];
      sec_d[0] <= sector;
      for (int i = 1; i < 7; i++) sec_d[i] <= sec_d[i-1];
    end
  end

  function automatic fp32_t neg(fp32_t x);
    return {~x[31], x[30:0]};
  endfunction

  // select t1, t2 for the sector (combinational, on the adder outputs)
  fp32_t t1_f, t2_f;
  always_comb begin
    unique case (sec_d[5])
      3'd1:    begin t1_f = m;       t2_f = b2;      end
      3'd2:    begin t1_f = neg(m);  t2_f = p;       end
      3'd3:    begin t1_f = b2;      t2_f = neg(p);  end
      3'd4:    begin t1_f = neg(b2); t2_f = neg(m);  end
      3'd5:    begin t1_f = neg(p);  t2_f = m;       end
      default: begin t1_f = p;       t2_f = neg(b2); end
    endcase
  end

  logic signed [31:0] t1_i, t2_i;
  fp_to_int #(.W(32)) u_t1 (.clk, .rst_n, .in_valid(v_add), .x(t1_f), .out_valid(v_int), .y(t1_i));
  fp_to_int #(.W(32)) u_t2 (.clk, .rst_n, .in_valid(v_add), .x(t2_f), .out_valid(u_int), .y(t2_i));

  // firing-order vectors (bit 2 = u, bit 1 = v, bit 0 = w)
  logic [2:0] va, vb;
  always_comb begin
    unique case (sec_d[6])
      3'd1:    begin va = 3'b100; vb = 3'b110; end
      3'd2:    begin va = 3'b010; vb = 3'b110; end
      3'd3:    begin va = 3'b010; vb = 3'b011; end
      3'd4:    begin va = 3'b001; vb = 3'b011; end
      3'd5:    begin va = 3'b001; vb = 3'b101; end
      default: begin va = 3'b100; vb = 3'b101; end
    endcase
  end

  function automatic logic [9:0] clamp(logic signed [33:0] x);
    if (x < 0) return '0;
    if (x > $signed({24'd0, PERIOD[9:0]})) return PERIOD[9:0];
    return x[9:0];
  endfunction

  logic signed [33:0] s_u, s_v, s_w;
  always_comb begin
    s_u = (va[2] ? 34'(t1_i) : 34'sd0) + (vb[2] ? 34'(t2_i) : 34'sd0);
    s_v = (va[1] ? 34'(t1_i) : 34'sd0) + (vb[1] ? 34'(t2_i) : 34'sd0);
    s_w = (va[0] ? 34'(t1_i) : 34'sd0) + (vb[0] ? 34'(t2_i) : 34'sd0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      on_u <= '0; on_v <= '0; on_w <= '0;
    end else begin
      out_valid <= v_int;
      if (v_int) begin
        on_u <= clamp(s_u);
        on_v <= clamp(s_v);
        on_w <= clamp(s_w);
      end
    end
  end

  always @(posedge clk) if (rst_n) assert (u_p == v_add && u_2 == v_add && u_int == v_int);
endmodule
