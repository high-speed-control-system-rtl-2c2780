// deadbeat_unit: deadbeat current controller and rotation of its result into the
// stationary frame.
//
// The discrete q-axis current model i_q(k+1) = F11 i_q(k) + F12 th(k) + F13 w(k) + G1 dT_q(k)
// is solved for the switch firing time that makes the next current equal to the reference:
//     dT_q = (i_qref - (F11 i_q + F12 th + F13 w)) / G1
// and likewise on the d axis with reference 0 (dT_d = -F11 i_d / G1, speed coupling into
// the d axis neglected). The firing times are then rotated with the rotor angle:
//     dT_alpha = cos dT_d - sin dT_q,   dT_beta = sin dT_d + cos dT_q.
// Everything is single-precision float on a pipeline of multipliers and adders:
//   mul (KREF i_qref, F11 i_q, F12 th, F13 w, F11 i_d) -> add/sub -> sub -> mul 1/G1
//   -> mul (cos, sin) -> add/sub.
// Latency 18 clocks from `start` to `done`; a new `start` may come every clock.
//
// Units: i_q/i_d arrive in the axis converter's units (converter code x 511), the
// reference in current codes, th in ROM steps, w in mechanical rad/s; firing times leave in
// clocks. Coefficients are given as physical parameters and the unit scales are folded in
// at elaboration. F11 = exp(-R T/L), F13 = -PHI (1 - F11)/R, and
// G1 = exp(-R T/(2L)) (2/3) (E/L) T_clk: the current change per clock of firing time, where
// 2/3 E is the length of an active space vector in the alpha-beta frame (the firing-time
// unit downstream expresses vector times in these units). The plant state model behind these (a PM motor's
// q axis with R, L and back-EMF constant PHI) and these closed forms are this design's own
// derivation of the discretised model. The result acts in the PWM period in which it is
// computed (see pwm_gen), so the law needs no compensation for a period of delay.
module deadbeat_unit
  import sd_pkg::*;
#(
  parameter real R_A       = 2.8,         // winding resistance [ohm]
  parameter real L_A       = 0.0011,      // winding inductance [H]
  parameter real PHI       = 0.157,       // back-EMF constant [V s/rad]
  parameter real E_DC      = 30.0,        // inverter DC supply [V]
  parameter real T_S       = 10.0e-6,     // control period [s]
  parameter real T_CLK     = 20.0e-9,     // clock period [s]
  parameter real A_PER_ADC = 2.0 / 128.0, // phase current per converter code [A]
  parameter real A_PER_REF = 8.0 / 256.0, // current per reference code [A]
  parameter real F12       = 0.0,         // angle coupling (none in this model)
  parameter real SC_AMP    = 511.0        // amplitude of the sine/cosine inputs
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  fp32_t iq_ref,    // reference, current codes
  input  fp32_t id_m,      // measured d current, converter code x 511
  input  fp32_t iq_m,      // measured q current, converter code x 511
  input  fp32_t theta,     // electrical angle, ROM steps
  input  fp32_t omega,     // speed, rad/s
  input  fp32_t sin_f,     // sine of the angle, amplitude SC_AMP
  input  fp32_t cos_f,
  output logic  done,
  output fp32_t dt_alpha,  // firing times, clocks
  output fp32_t dt_beta
);
  localparam real F11     = $exp(-R_A * T_S / L_A);
  localparam real G1      = $exp(-R_A * T_S / (2.0 * L_A)) * (2.0 / 3.0) * (E_DC / L_A) * T_CLK;
  localparam real F13     = -PHI * (1.0 - F11) / R_A;
  localparam fp32_t C_REF = real_to_fp(A_PER_REF);
  localparam fp32_t C_F11 = real_to_fp(F11 * A_PER_ADC / 511.0);
  localparam fp32_t C_F12 = real_to_fp(F12);
  localparam fp32_t C_F13 = real_to_fp(F13);
  // sine and cosine arrive in ROM units (x SC_AMP), so 1/SC_AMP is folded in here
  localparam fp32_t C_G1I = real_to_fp(1.0 / (G1 * SC_AMP));

  logic  v1, v2, v3, v4, v5, v6;
  fp32_t m_ref, m_q, m_th, m_w, m_d;
  fp32_t a1, a2, a4, dtq, dtd;
  fp32_t r_cd, r_sq, r_sd, r_cq;
  logic  u0, u1, u2, u3, u4, u5, u6, u7, u8, u9;

  // sine/cosine travel 12 clocks to the rotation stage, -F11 i_d 6 clocks to the 1/G1 stage
  fp32_t sin_d [12];
  fp32_t cos_d [12];
  fp32_t nd_d  [6];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sin_d <= '{default: '0};
      cos_d <= '{default: '0};
      nd_d  <= '{default: '0};
    end else begin
      sin_d[0] <= sin_f;
      cos_d[0] <= cos_f;
      nd_d[0]  <= {~m_d[31], m_d[30:0]};
      for (int i = 1; i < 12; i++) begin sin_d[i] <= sin_d[i-1]; cos_d[i] <= cos_d[i-1]; end
      for (int i = 1; i < 6; i++) nd_d[i] <= nd_d[i-1];
    end
  end
  fp32_t sin_r, cos_r, nd_r;
  assign sin_r = sin_d[11];
  assign cos_r = cos_d[11];
  assign nd_r  = nd_d[5];

  // stage 1: products
  fp_mul u_m0 (.clk, .rst_n, .in_valid(start), .a(C_REF), .b(iq_ref), .out_valid(v1), .y(m_ref));
  fp_mul u_m1 (.clk, .rst_n, .in_valid(start), .a(C_F11), .b(iq_m),   .out_valid(u0), .y(m_q));
  fp_mul u_m2 (.clk, .rst_n, .in_valid(start), .a(C_F12), .b(theta),  .out_valid(u1), .y(m_th));
  fp_mul u_m3 (.clk, .rst_n, .in_valid(start), .a(C_F13), .b(omega),  .out_valid(u2), .y(m_w));
  fp_mul u_m4 (.clk, .rst_n, .in_valid(start), .a(C_F11), .b(id_m),   .out_valid(u3), .y(m_d));
  // stage 2: i_qref - F11 i_q ; F12 th + F13 w
  fp_add u_a1 (.clk, .rst_n, .in_valid(v1), .sub(1'b1), .a(m_ref), .b(m_q),  .out_valid(v2), .y(a1));
  fp_add u_a2 (.clk, .rst_n, .in_valid(v1), .sub(1'b0), .a(m_th),  .b(m_w),  .out_valid(u4), .y(a2));
  // stage 3: full q-axis error
  fp_add u_a3 (.clk, .rst_n, .in_valid(v2), .sub(1'b1), .a(a1), .b(a2), .out_valid(v3), .y(a4));
  // stage 4: divide by G1
  fp_mul u_g1 (.clk, .rst_n, .in_valid(v3), .a(C_G1I), .b(a4),    .out_valid(v4), .y(dtq));
  fp_mul u_g2 (.clk, .rst_n, .in_valid(v3), .a(C_G1I), .b(nd_r), .out_valid(u5), .y(dtd));
  // stage 5: rotation products
  fp_mul u_r0 (.clk, .rst_n, .in_valid(v4), .a(cos_r), .b(dtd), .out_valid(v5), .y(r_cd));
  fp_mul u_r1 (.clk, .rst_n, .in_valid(v4), .a(sin_r), .b(dtq), .out_valid(u6), .y(r_sq));
  fp_mul u_r2 (.clk, .rst_n, .in_valid(v4), .a(sin_r), .b(dtd), .out_valid(u7), .y(r_sd));
  fp_mul u_r3 (.clk, .rst_n, .in_valid(v4), .a(cos_r), .b(dtq), .out_valid(u8), .y(r_cq));
  // stage 6: alpha, beta
  fp_add u_o0 (.clk, .rst_n, .in_valid(v5), .sub(1'b1), .a(r_cd), .b(r_sq), .out_valid(v6), .y(dt_alpha));
  fp_add u_o1 (.clk, .rst_n, .in_valid(v5), .sub(1'b0), .a(r_sd), .b(r_cq), .out_valid(u9), .y(dt_beta));

  assign done = v6;
  // the parallel lanes run in lock step with the ones that carry `valid`
  always @(posedge clk) if (rst_n) assert ({u0, u1, u2, u3} == {4{v1}} && u4 == v2 && u5 == v4 &&
                                           {u6, u7, u8} == {3{v5}} && u9 == v6);
endmodule
