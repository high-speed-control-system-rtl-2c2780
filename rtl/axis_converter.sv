// axis_converter: integer coordinate transformation of the phase currents into d-q axes.
//
// Stage 1 (Clarke): i_alpha = ia, i_beta = (ia + 2 ib)/sqrt(3), with 1/sqrt(3) as the
// constant 2365/4096 (rounded). Stage 2 (Park, with the ROM's sine and cosine, amplitude
// 511): id = i_alpha cos + i_beta sin, iq = -i_alpha sin + i_beta cos. The results are in
// units of (converter code x 511); the float stage that follows takes the scale into its
// coefficients. Latency: `out_valid` two clocks after `in_valid`; sin/cos must be valid
// with `in_valid`. The third phase current is taken as -(ia + ib) (balanced load).
module axis_converter (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [7:0]  ia,
  input  logic signed [7:0]  ib,
  input  logic signed [9:0]  sin_t,
  input  logic signed [9:0]  cos_t,
  output logic               out_valid,
  output logic signed [21:0] id,
  output logic signed [21:0] iq
);
  localparam logic signed [12:0] INV_SQRT3 = 13'sd2365;   // round(4096/sqrt(3))
  logic               v1;
  logic signed [9:0]  i_al, i_be;
  logic signed [9:0]  s1, c1;
  logic signed [23:0] be_full;

  assign be_full = (24'(ia) + 24'(ib) + 24'(ib)) * 24'(INV_SQRT3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; out_valid <= 1'b0;
      i_al <= '0; i_be <= '0; s1 <= '0; c1 <= '0;
      id <= '0; iq <= '0;
    end else begin
      v1   <= in_valid;
      i_al <= 10'(ia);
      i_be <= 10'((be_full + 24'sd2048) >>> 12);
      s1   <= sin_t;
      c1   <= cos_t;
      out_valid <= v1;
      id <= 22'(i_al) * 22'(c1) + 22'(i_be) * 22'(s1);
      iq <= 22'(i_be) * 22'(c1) - 22'(i_al) * 22'(s1);
    end
  end
endmodule
