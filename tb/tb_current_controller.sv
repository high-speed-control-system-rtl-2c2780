// tb_current_controller: runs the current loop for many 500-clock control cycles with random
// rotor positions, current references and converter readings, and a steady encoder count
// rate for the speed. Per cycle it checks:
//   - the on-times, against a double-precision model of the whole chain (angle from the
//     count, sine/cosine rounded to 511 amplitude, Clarke transform in the converter's fixed
//     point, Park, deadbeat law, inverse rotation, space-vector times with unit-length
//     vectors, clamp to 0..500), tolerance 2 clocks;
//   - that `update` comes 75 clocks after `start`;
//   - that in the following PWM period (500 clocks after `start`) each leg is high for its on-time (rounded down to
//     even clocks).
// Sectors seen are counted and each of the six must occur.
module tb_current_controller;
  localparam real PI = 3.14159265358979;
  localparam real R = 2.8, L = 0.0011, PHI = 0.157, E = 30.0, T = 10.0e-6, TC = 20.0e-9;
  localparam real KA = 2.0 / 128.0 / 511.0, KR = 8.0 / 256.0;
  localparam int  NSTEP = 3000;
  logic clk = 0, rst_n = 0, start = 0, enc_step = 0, enc_dir = 1;
  logic signed [31:0] iq_ref = 0, enc_count = 0;
  logic [7:0] adc_a_data, adc_b_data, va = 128, vb = 128, la = 128, lb = 128;
  logic adc_convst, adc_rd, pwm_u, pwm_v, pwm_w, period_start, update, cs_d = 0;
  logic [2:0] sector;
  logic [9:0] on_u, on_v, on_w;
  int checks = 0, failures = 0;
  int sec_seen [7];

  current_controller dut (.clk, .rst_n, .start, .iq_ref, .enc_count, .enc_step, .enc_dir,
                          .adc_a_data, .adc_b_data, .adc_convst, .adc_rd, .pwm_u, .pwm_v, .pwm_w,
                          .period_start, .update, .sector, .on_u, .on_v, .on_w);
  always #5 clk = ~clk;

  // converter model: samples on the rising conversion strobe, drives the bus during read
  always @(posedge clk) begin
    cs_d <= adc_convst;
    if (adc_convst && !cs_d) begin la <= va; lb <= vb; end
  end
  assign adc_a_data = adc_rd ? la : 8'h00;
  assign adc_b_data = adc_rd ? lb : 8'h00;

  // encoder counts at a steady rate
  int scnt = 0;
  always @(negedge clk) begin
    scnt = (scnt == NSTEP - 1) ? 0 : scnt + 1;
    enc_step = rst_n && (scnt == 0);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real rnd511(real x);
    return real'($rtoi(511.0 * x + (x >= 0 ? 0.5 : -0.5)));
  endfunction

  function automatic real clampr(real x);
    return x < 0.0 ? 0.0 : (x > 500.0 ? 500.0 : x);
  endfunction

  initial begin
    real f11, f13, g1, w, ang, s, c, ial, ibe, idq_d, idq_q, tq, td, a, b, ph, fr, t1, t2, det;
    real ax, ay, bx, by, on [3];
    int  addr, ia, ib, lat, k, hi [3];
    logic [2:0] vec [7];
    logic [2:0] v1, v2;
    logic [9:0] want [3];
    vec = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    f11 = $exp(-R * T / L);
    f13 = -PHI * (1.0 - f11) / R;
    g1  = $exp(-R * T / (2.0 * L)) * (2.0 / 3.0) * (E / L) * TC;
    w   = 2.0 * PI / (8192.0 * real'(NSTEP) * TC);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3 * NSTEP) @(negedge clk);      // let the speed measurement settle
    for (int cyc = 0; cyc < 300; cyc++) begin
      enc_count = int'($urandom % 40000) - 20000;
      iq_ref = int'($urandom % 13) - 6;
      va = 8'(128 + int'($urandom % 13) - 6);
      vb = 8'(128 + int'($urandom % 13) - 6);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // model
      addr = (enc_count * 2) & 4095;
      ang = 2.0 * PI * (real'(addr) + 0.5) / 4096.0;
      s = rnd511($sin(ang));
      c = rnd511($cos(ang));
      ia = int'(va) - 128;
      ib = int'(vb) - 128;
      ial = real'(ia);
      ibe = real'(((ia + 2 * ib) * 2365 + 2048) >>> 12);
      idq_d = ial * c + ibe * s;
      idq_q = ibe * c - ial * s;
      tq = (KR * real'(iq_ref) - f11 * KA * idq_q - f13 * w) / g1;
      td = -f11 * KA * idq_d / g1;
      a = (c * td - s * tq) / 511.0;
      b = (s * td + c * tq) / 511.0;
      ph = $atan2(b, a);
      if (ph < 0) ph += 2.0 * PI;
      k = int'($floor(ph / (PI / 3.0)));
      if (k > 5) k = 5;
      ax = $cos(real'(k) * PI / 3.0);       ay = $sin(real'(k) * PI / 3.0);
      bx = $cos(real'(k + 1) * PI / 3.0);   by = $sin(real'(k + 1) * PI / 3.0);
      det = ax * by - ay * bx;
      t1 = (a * by - b * bx) / det;
      t2 = (ax * b - ay * a) / det;
      v1 = vec[k + 1];
      v2 = vec[(k + 1) % 6 + 1];
      for (int i = 0; i < 3; i++) on[i] = clampr((v1[2-i] ? t1 : 0.0) + (v2[2-i] ? t2 : 0.0));
      // DUT
      lat = 1;
      while (!update && lat < 400) begin @(negedge clk); lat++; end
      check(lat == 75, $sformatf("update %0d clocks after start", lat));
      check(real'(on_u) - on[0] <= 2.0 && on[0] - real'(on_u) <= 2.0 &&
            real'(on_v) - on[1] <= 2.0 && on[1] - real'(on_v) <= 2.0 &&
            real'(on_w) - on[2] <= 2.0 && on[2] - real'(on_w) <= 2.0,
            $sformatf("on %0d %0d %0d want %f %f %f", on_u, on_v, on_w, on[0], on[1], on[2]));
      sec_seen[sector]++;
      want = '{on_u & ~10'd1, on_v & ~10'd1, on_w & ~10'd1};
      // next PWM period (carrier restarted by `start`)
      while (!period_start) @(negedge clk);
      hi = '{default: 0};
      for (int t = 0; t < 500; t++) begin
        @(negedge clk);
        hi[0] += int'(pwm_u); hi[1] += int'(pwm_v); hi[2] += int'(pwm_w);
      end
      for (int i = 0; i < 3; i++)
        check(hi[i] == int'(want[i]), $sformatf("leg %0d high %0d clocks, want %0d", i, hi[i], want[i]));
    end
    for (int i = 1; i <= 6; i++) check(sec_seen[i] > 0, $sformatf("sector %0d never used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
