// int_to_fp: signed integer to IEEE 754 single precision, one register stage.
//
// The magnitude of the input is separated from its sign, the position of its leading one
// gives the exponent, and the magnitude is shifted so that the leading one becomes the
// hidden bit; the bits shifted out round the 23-bit fraction to nearest even (which may
// bump the exponent). Zero gives +0. Result one clock after `in_valid`.
module int_to_fp #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic [31:0]         y
);
  logic [W-1:0]   mag;
  logic [7:0]     msb;
  logic [W+23:0]  shifted;   // leading one lands on bit W+23
  logic [22:0]    frac;
  logic           g, st, rnd;
  logic [23:0]    f_rnd;
  logic [7:0]     e;

  always_comb begin
    mag = x[W-1] ? W'(-x) : W'(x);
    msb = 8'd0;
    for (int i = 0; i < W; i++)
      if (mag[i]) msb = 8'(i);
    shifted = {mag, 24'd0} << (8'(W - 1) - msb);
    frac  = shifted[W+22:W];
    g     = shifted[W-1];
    st    = |shifted[W-2:0];
    rnd   = g & (st | frac[0]);
    f_rnd = {1'b0, frac} + 24'(rnd);
    e     = 8'd127 + msb + 8'(f_rnd[23]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (mag == '0) y <= '0;
      else           y <= {x[W-1], e, f_rnd[22:0]};
    end
  end
endmodule
