// svm_sector: selects which of the six 60-degree sectors of the space-vector hexagon the
// requested voltage (dT_alpha, dT_beta) lies in.
//
// As the document describes, this takes one float multiplier (sqrt(3)|dT_alpha|), an absolute
// value, a comparator and a six-to-one selection. With a = dT_alpha, b = dT_beta:
//   |b| >= sqrt(3)|a| : sector 2 if b >= 0, sector 5 if b < 0 (the 60..120 and 240..300 cones)
//   otherwise          : a > 0, b >= 0 -> 1;  a > 0, b < 0 -> 6;  a <= 0, b >= 0 -> 3;  else 4.
// The sector boundaries follow the geometry of the hexagon (sector k spans
// (k-1)*60 .. k*60 degrees).
// Magnitude comparison of two non-negative IEEE values is an unsigned compare of their bit
// patterns, so no float comparator is needed. -0 is treated as 0.
// Latency: 4 clocks from in_valid to out_valid (3 in the multiplier, 1 in the selection).
module svm_sector
  import sd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  fp32_t      alpha,
  input  fp32_t      beta,
  output logic       out_valid,
  output logic [2:0] sector     // 1..6
);
  localparam fp32_t SQRT3 = real_to_fp(1.7320508075688772);

  fp32_t a_abs, prod;
  logic  m_valid;
  fp32_t a_d [3];
  fp32_t b_d [3];

  assign a_abs = {1'b0, alpha[30:0]};
  fp_mul u_mul (.clk, .rst_n, .in_valid, .a(a_abs), .b(SQRT3), .out_valid(m_valid), .y(prod));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_d <= '{default: '0};
      b_d <= '{default: '0};
    end else begin
      a_d[0] <= alpha; b_d[0] <= beta;
      for (int i = 1; i < 3; i++) begin a_d[i] <= a_d[i-1]; b_d[i] <= b_d[i-1]; end
    end
  end

  logic       a_pos, b_neg, steep;
  logic [2:0] sel;
  always_comb begin
    a_pos = !a_d[2][31] && (a_d[2][30:0] != '0);
    b_neg = b_d[2][31] && (b_d[2][30:0] != '0);
    steep = (b_d[2][30:0] >= prod[30:0]);
    if (steep)      sel = b_neg ? 3'd5 : 3'd2;
    else if (a_pos) sel = b_neg ? 3'd6 : 3'd1;
    else            sel = b_neg ? 3'd4 : 3'd3;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sector    <= 3'd1;
    end else begin
      out_valid <= m_valid;
      if (m_valid) sector <= sel;
    end
  end
endmodule
