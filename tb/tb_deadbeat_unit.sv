// tb_deadbeat_unit: random references, measured currents, angles and speeds. The expected
// firing times are computed here in double precision from the motor parameters:
//   dTq = (Kref iq_ref - F11 Ka iq - F13 w) / G1,  dTd = -F11 Ka id / G1,
//   dTalpha = (c dTd - s dTq)/511, dTbeta = (s dTd + c dTq)/511,
// with F11 = exp(-R T/L), F13 = -PHI (1 - F11)/R, G1 = exp(-R T/2L) (2/3)(E/L) T_clk and
// Ka = A_PER_ADC/511. Single-precision rounding allows a relative error of 1e-5 of the
// largest term. Checks the 18-clock latency and back-to-back operation.
module tb_deadbeat_unit;
  import tb_fp_pkg::*;
  localparam real R = 2.8, L = 0.0011, PHI = 0.157, E = 30.0, T = 10.0e-6, TC = 20.0e-9;
  localparam real KA = 2.0 / 128.0 / 511.0, KR = 8.0 / 256.0;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [31:0] iq_ref = 0, id_m = 0, iq_m = 0, theta = 0, omega = 0, sin_f = 0, cos_f = 0;
  logic [31:0] dt_alpha, dt_beta;
  int checks = 0, failures = 0;

  deadbeat_unit dut (.clk, .rst_n, .start, .iq_ref, .id_m, .iq_m, .theta, .omega, .sin_f, .cos_f,
                     .done, .dt_alpha, .dt_beta);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real ea_q[$], eb_q[$], sc_q[$];
  int  t_q[$];
  int  cyc = 0;
  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && done) begin
    real ea, eb, sc, a, b;
    int  t0;
    ea = ea_q.pop_front(); eb = eb_q.pop_front(); sc = sc_q.pop_front(); t0 = t_q.pop_front();
    a = fp2r(dt_alpha); b = fp2r(dt_beta);
    checks += 2;
    if (cyc - t0 != 18) begin
      failures++;
      $display("FAIL latency %0d", cyc - t0);
    end
    if (a - ea > 1e-5 * sc || ea - a > 1e-5 * sc || b - eb > 1e-5 * sc || eb - b > 1e-5 * sc) begin
      failures++;
      if (failures < 10) $display("FAIL alpha %g (%g) beta %g (%g)", a, ea, b, eb);
    end
  end

  initial begin
    real f11, f13, g1, r, d, q, w, s, c, ang, tq, td, sc;
    f11 = $exp(-R * T / L);
    f13 = -PHI * (1.0 - f11) / R;
    g1  = $exp(-R * T / (2.0 * L)) * (2.0 / 3.0) * (E / L) * TC;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      r = real'(int'($urandom % 401) - 200);
      d = real'(int'($urandom % 120001) - 60000);
      q = real'(int'($urandom % 120001) - 60000);
      w = real'(int'($urandom % 6001) - 3000) / 10.0;
      ang = 2.0 * 3.14159265358979 * real'($urandom % 4096) / 4096.0;
      s = real'($rtoi(511.0 * $sin(ang)));
      c = real'($rtoi(511.0 * $cos(ang)));
      iq_ref = r2fp(r); id_m = r2fp(d); iq_m = r2fp(q); omega = r2fp(w);
      sin_f = r2fp(s); cos_f = r2fp(c); theta = r2fp(ang);
      tq = (KR * r - f11 * KA * q - f13 * w) / g1;
      td = -f11 * KA * d / g1;
      sc = ((KR * (r < 0 ? -r : r)) + f11 * KA * ((q < 0 ? -q : q) + (d < 0 ? -d : d)) +
            (f13 * w < 0 ? -f13 * w : f13 * w)) / g1 + 1e-3;
      ea_q.push_back((c * td - s * tq) / 511.0);
      eb_q.push_back((s * td + c * tq) / 511.0);
      sc_q.push_back(sc);
      t_q.push_back(cyc);
      start = 1;
      if ($urandom % 3 == 0) begin @(negedge clk) start = 0; repeat ($urandom % 20) @(negedge clk); end
    end
    @(negedge clk) start = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (ea_q.size() != 0) begin failures++; $display("FAIL %0d results missing", ea_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
