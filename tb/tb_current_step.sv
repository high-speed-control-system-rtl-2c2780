// tb_current_step: current step responses of the current loop, the experiment of stepping the
// q-axis current reference to 0.125 A, 0.25 A and 0.5 A with a 30 V inverter supply.
// The current controller runs at its default parameters (100 kHz, 500 clocks per period).
// It drives a three-phase inverter and a locked-rotor R-L motor model: R = 2.8 ohm, L = 1.1 mH,
// PHI = 0.157, 4 pole pairs. The model is integrated every clock. A converter model samples
// the phase currents with 2/128 A per code.
// Each step is held for 40 periods, with a return to 0 A between steps and a final negative
// step. Per step the testbench checks:
//   - steps the inverter can make in one period (up to 0.13 A here: about 348 clocks of an
//     active vector, 3.6e-4 A per clock) settle within 2 periods, the deadbeat claim;
//   - the q current is within 0.04 A of the reference from period 2 + |step| / 0.12 A on
//     (larger steps are limited by the voltage the rest of the period allows) and stays there;
//   - the d current stays within 0.05 A of zero from then on;
//   - the update strobe comes once per period.
// Settling periods and the steady-state error are printed for every step.
module tb_current_step;
  localparam real PI = 3.14159265358979;
  localparam real R = 2.8, L = 0.0011, E = 30.0, DT = 20.0e-9;
  localparam int  PP = 4, HOLD = 40;
  localparam real TOL = 0.04;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [31:0] iq_ref = 0;
  logic signed [31:0] enc_count = 32'sd300;      // locked rotor at an arbitrary angle
  logic [7:0] adc_a_data, adc_b_data, la = 128, lb = 128;
  logic adc_convst, adc_rd, pwm_u, pwm_v, pwm_w, period_start, update, cs_d = 0;
  logic [2:0] sector;
  logic [9:0] on_u, on_v, on_w;
  int checks = 0, failures = 0;

  current_controller dut (.clk, .rst_n, .start, .iq_ref, .enc_count, .enc_step(1'b0), .enc_dir(1'b1),
                          .adc_a_data, .adc_b_data, .adc_convst, .adc_rd, .pwm_u, .pwm_v, .pwm_w,
                          .period_start, .update, .sector, .on_u, .on_v, .on_w);
  always #10 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- plant (rotor locked)
  real i_d = 0.0, i_q = 0.0, th_e;
  initial th_e = real'(PP) * 300.0 * 2.0 * PI / 8192.0;
  always @(posedge clk) begin
    real va, vb, vd, vq;
    va = E * (2.0 * real'(pwm_u) - real'(pwm_v) - real'(pwm_w)) / 3.0;
    vb = E * (real'(pwm_v) - real'(pwm_w)) / $sqrt(3.0);
    vd = va * $cos(th_e) + vb * $sin(th_e);
    vq = -va * $sin(th_e) + vb * $cos(th_e);
    i_d = i_d + DT * (vd - R * i_d) / L;
    i_q = i_q + DT * (vq - R * i_q) / L;
  end

  function automatic logic [7:0] adc_code(real i);
    int v;
    v = $rtoi($floor(i / (2.0 / 128.0) + 0.5)) + 128;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction
  always @(posedge clk) begin
    real ial, ibe;
    cs_d <= adc_convst;
    if (adc_convst && !cs_d) begin
      ial = i_d * $cos(th_e) - i_q * $sin(th_e);
      ibe = i_d * $sin(th_e) + i_q * $cos(th_e);
      la <= adc_code(ial);
      lb <= adc_code(-0.5 * ial + 0.8660254 * ibe);
    end
  end
  assign adc_a_data = adc_rd ? la : 8'h00;
  assign adc_b_data = adc_rd ? lb : 8'h00;

  int n_upd = 0;
  always @(posedge clk) if (update) n_upd++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // one period: start pulse, then 499 more clocks; returns the currents at the period end
  task automatic period(output real qd, output real qq);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (498) @(negedge clk);
    qd = i_d; qq = i_q;
  endtask

  initial begin
    int  codes [7] = '{4, 0, 8, 0, 16, 0, -16};
    real ref_a, prev_a, qd, qq, err, maxd;
    int  settle, upd0, from;
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 10; p++) period(qd, qq);
    prev_a = 0.0;
    foreach (codes[k]) begin
      iq_ref = codes[k];
      ref_a = real'(codes[k]) * 8.0 / 256.0;
      from = 2 + int'($ceil((ref_a > prev_a ? ref_a - prev_a : prev_a - ref_a) / 0.12));
      settle = -1; err = 0.0; maxd = 0.0; upd0 = n_upd;
      for (int p = 1; p <= HOLD; p++) begin
        period(qd, qq);
        if (qq - ref_a > TOL || ref_a - qq > TOL) settle = -1;
        else if (settle < 0) settle = p;
        if (p >= from) begin
          check(qq - ref_a <= TOL && ref_a - qq <= TOL,
                $sformatf("step %0d: period %0d iq %f A, want %f A", k, p, qq, ref_a));
          check(qd <= 0.05 && qd >= -0.05, $sformatf("step %0d: period %0d id %f A", k, p, qd));
        end
        if (p > HOLD - 10) err = err + (qq - ref_a) / 10.0;
        if (qd > maxd) maxd = qd;
        if (-qd > maxd) maxd = -qd;
      end
      if (ref_a - prev_a <= 0.13 && prev_a - ref_a <= 0.13)
        check(settle >= 1 && settle <= 2, $sformatf("step %0d: settled after %0d periods", k, settle));
      prev_a = ref_a;
      check(n_upd - upd0 == HOLD, $sformatf("step %0d: %0d updates in %0d periods", k, n_upd - upd0, HOLD));
      $display("step to %0d codes (%f A): within %0.2f A after %0d periods, mean error %f A, max |id| %f A",
               codes[k], ref_a, TOL, settle, err, maxd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
