// fp_to_int: IEEE 754 single precision to signed integer, one register stage.
//
// The right shift that brings the binary point of the significand to bit 0 is computed
// from the exponent, the significand (with its hidden bit) is shifted right by it, and
// the result is rounded to nearest (halves away from zero) before the sign is applied.
// Values outside the W-bit range saturate. Result one clock after `in_valid`.
module fp_to_int #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [31:0]         x,
  output logic                out_valid,
  output logic signed [W-1:0] y
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  logic [7:0]  e;
  logic [23:0] m;
  logic signed [9:0] rsh;     // right shift of m, may be negative (left shift)
  logic [W+23:0] ext, sh;
  logic [W:0]  mag;
  logic        ovf;

  always_comb begin
    e   = x[30:23];
    m   = {1'b1, x[22:0]};
    // value = m * 2^(e-150); keep one extra fraction bit for rounding
    rsh = 10'sd150 - $signed({2'b0, e}) - 10'sd1;
    ext = {{W{1'b0}}, m};
    ovf = 1'b0;
    if (e == 8'd0) begin
      sh = '0;
    end else if (rsh >= 10'sd0) begin
      sh = (rsh > 10'sd40) ? '0 : ext >> rsh;
    end else begin
      ovf = (-rsh > 10'(W));
      sh  = ovf ? '0 : ext << (-rsh);
    end
    mag = sh[W+1:1] + (W+1)'(sh[0]);
    ovf = ovf | (|sh[W+23:W+1]) | (mag > (W+1)'(MAXV));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (ovf)        y <= x[31] ? -MAXV : MAXV;
      else if (x[31]) y <= -W'(mag);
      else            y <= W'(mag);
    end
  end
endmodule
