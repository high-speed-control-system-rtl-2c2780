// position_controller: two-degrees-of-freedom position controller, u = C1(z) r + C2(z) y,
// computed in IEEE 754 single precision.
//
// C1 shapes the command response and C2 is the type-1 servo feedback part that also
// estimates and cancels the equivalent input disturbance caused by channel noise. Both are
// realised together as one discrete state-space system with NS states and the two inputs
// v = (r, y):
//     u(k)   = C x(k) + D v(k)                      (output computing unit)
//     x(k+1) = x(k) + E x(k) + B v(k),  E = Ad - I  (state variable computing unit)
// Storing E = Ad - I instead of Ad keeps the small per-sample increments exact enough in
// single precision even though the poles sit very close to z = 1 at a 10 us period.
// The integer/float transform units convert the reference and the position (encoder
// counts) to float and the output to an integer current-reference code.
//
// Datapath: every row (NS state rows and the output row) has its own multiplier/adder pair
// (fp_dot), so all rows are computed in parallel. Timing: `done` and `u_code` arrive 23
// clocks after `start` (460 ns at 50 MHz); x is updated at the same time. `start` must
// not repeat before `done`.
//
// Default coefficients: the controller of the design, C1 = G/(Pn(1-Q)) and C2 = Q/(Pn(1-Q))
// with Pn = KT/((J s + B) s), G = 1/(tau^2 s^2 + 2 xi tau s + 1),
// Q = (2 wc s + wc^2) wc / ((s^2 + wc s + wc^2)(s + wc)), for KT = 0.157 N m/A,
// J = 4.96e-6 kg m^2, B = 3.543e-3 N m s, tau = 0.05 s, xi = 0.9, wc = 80 rad/s; these
// are expanded in partial fractions (poles 0, -2wc and the complex pair of G), made
// discrete by zero-order hold at T = 10 us, and scaled for inputs in encoder counts
// (pi/4096 rad) and an output in current codes (8/256 A). The modal realisation, the
// discretisation method and the delta form are this design's choices.
module position_controller
  import sd_pkg::*;
#(
  parameter int unsigned NS = 4,
  parameter real E_COEF [NS][NS] = '{
    '{0.0, 0.0, 0.0, 0.0},
    '{0.0, -1.598720682e-03, 0.0, 0.0},
    '{0.0, 0.0, -1.999760013e-08, 9.998200149e-06},
    '{0.0, 0.0, -3.999280060e-03, -3.599552030e-04}},
  parameter real B_COEF [NS][2] = '{
    '{5.538745408e-07, -5.538745408e-07},
    '{2.546252847e-08, -1.288403941e-06},
    '{3.834491804e-14, 0.0},
    '{7.668523471e-09, 0.0}},
  parameter real C_COEF [NS] = '{3.2e+01, 3.2e+01, -6.499270588e+04, -2.142868646e+03},
  parameter real D_COEF [2]  = '{3.101572365e-04, -9.925031568e-03}
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [31:0] r_cnt,     // position reference, encoder counts
  input  logic signed [31:0] y_cnt,     // measured position, encoder counts
  output logic               done,
  output logic signed [31:0] u_code,    // current reference, units of 8/256 A
  output fp32_t              u_float
);
  localparam int unsigned K = NS + 2;

  // integer -> float transform of the two inputs
  logic  cv_r, cv_y;
  fp32_t r_f, y_f;
  int_to_fp u_cr (.clk, .rst_n, .in_valid(start), .x(r_cnt), .out_valid(cv_r), .y(r_f));
  int_to_fp u_cy (.clk, .rst_n, .in_valid(start), .x(y_cnt), .out_valid(cv_y), .y(y_f));

  fp32_t x [NS];
  fp32_t vec [K];        // (x, r, y)
  always_comb begin
    for (int j = 0; j < NS; j++) vec[j] = x[j];
    vec[NS]     = r_f;
    vec[NS + 1] = y_f;
  end

  // coefficient rows as float constants
  fp32_t row_c [NS + 1][K];
  for (genvar i = 0; i < NS; i++) begin : g_state_rows
    for (genvar j = 0; j < NS; j++) begin : g_e
      assign row_c[i][j] = real_to_fp(E_COEF[i][j]);
    end
    assign row_c[i][NS]     = real_to_fp(B_COEF[i][0]);
    assign row_c[i][NS + 1] = real_to_fp(B_COEF[i][1]);
  end
  for (genvar j = 0; j < NS; j++) begin : g_c
    assign row_c[NS][j] = real_to_fp(C_COEF[j]);
  end
  assign row_c[NS][NS]     = real_to_fp(D_COEF[0]);
  assign row_c[NS][NS + 1] = real_to_fp(D_COEF[1]);

  logic  [NS:0] row_done;
  fp32_t        row_y [NS + 1];
  for (genvar i = 0; i < NS; i++) begin : g_rows
    fp_dot #(.K(K)) u_row (.clk, .rst_n, .start(cv_r), .coef(row_c[i]), .val(vec),
                           .addend(x[i]), .done(row_done[i]), .y(row_y[i]));
  end
  fp_dot #(.K(K)) u_out (.clk, .rst_n, .start(cv_r), .coef(row_c[NS]), .val(vec),
                         .addend(32'h0), .done(row_done[NS]), .y(row_y[NS]));

  // float -> integer transform of the output
  logic f2i_v;
  fp_to_int u_cu (.clk, .rst_n, .in_valid(row_done[NS]), .x(row_y[NS]), .out_valid(f2i_v),
                  .y(u_code));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < NS; j++) x[j] <= '0;
      u_float <= '0;
      done    <= 1'b0;
    end else begin
      done <= f2i_v;
      if (row_done[NS]) u_float <= row_y[NS];
      for (int j = 0; j < NS; j++)
        if (row_done[j]) x[j] <= row_y[j];
    end
  end

  // every row finishes in the same clock
  always @(posedge clk) if (rst_n && row_done[NS]) assert (&row_done);
  // unused: cv_y has the same timing as cv_r
  logic unused;
  assign unused = cv_y;
endmodule
