// tb_sd_ncs_top: end-to-end run of the networked servo at its default parameters
// (50 MHz clock, 500-clock control cycle, 5x oversampled links, 8-bit compensation words).
//
// Around the top sit behavioural models of what is outside the chips:
//   - the plant: three-phase inverter (E = 30 V) driven by the gate signals, a permanent-
//     magnet motor in d-q form (R = 2.8 ohm, L = 1.1 mH, KT = 0.157 N m/A, 4 pole pairs,
//     J = 4.96e-6 kg m^2, B = 3.543e-3 N m s/rad), integrated every clock;
//   - the encoder (8192 counts/rev, quadrature a/b) and the two 8-bit current converters
//     (2/128 A per code, offset binary);
//   - the channels: each data wire passes through unchanged except for noise bursts that
//     invert one bit time of a frame (start bit or payload) now and then.
// The position reference steps from 0 to 1 rad (1304 counts) at the start; 40000 cycles
// (0.4 s) cover the whole step response.
//
// Checks and counts:
//   - consistency of every channel pair once the noise has been quiet for two compensation
//     words: the controller's rebuilt position equals the servo's tracked position of the
//     previous cycle, and the servo's rebuilt current reference equals the controller's
//     tracked reference of the previous cycle;
//   - mechanisms that must each happen at least once: received codes up, down, zero and the
//     unused pattern 10 (at either receiver), compensation words accepted and rejected (at
//     either compensation receiver), PWM updates, all six space-vector sectors;
//   - the step response: 95 % of the step within 0.35 s, overshoot below 0.1 rad, final
//     position within 30 counts of the reference.
module tb_sd_ncs_top;
  localparam real PI = 3.14159265358979;
  localparam real E = 30.0, R = 2.8, L = 0.0011, KT = 0.157, J = 4.96e-6, B = 3.543e-3;
  localparam int  PP = 4;
  localparam real DT = 20.0e-9;
  localparam int  NCYC = 40000;           // control cycles simulated
  localparam int  QUIET = 20;            // cycles without noise before a consistency check

  logic clk = 0, rst_n = 0;
  logic signed [31:0] pos_ref = 0;
  logic enc_a = 0, enc_b = 0;
  logic [7:0] adc_a_data, adc_b_data, la = 128, lb = 128;
  logic adc_convst, adc_rd, pwm_u, pwm_v, pwm_w, cs_d = 0;
  logic ch1_tx_data, ch1_tx_rts, ch2_tx_data, ch2_tx_rts, ch3_tx_data, ch3_tx_rts,
        ch4_tx_data, ch4_tx_rts;
  logic ch1_rx_data, ch2_rx_data, ch3_rx_data, ch4_rx_data;
  logic [4:1] flip = '0;
  logic signed [31:0] pos_fb, position, cur_ref_tx, cur_ref_rx;
  int checks = 0, failures = 0;

  sd_ncs_top dut (
    .clk, .rst_n, .pos_ref, .enc_a, .enc_b, .adc_a_data, .adc_b_data, .adc_convst, .adc_rd,
    .pwm_u, .pwm_v, .pwm_w,
    .ch1_tx_data, .ch1_tx_rts, .ch2_tx_data, .ch2_tx_rts, .ch3_tx_data, .ch3_tx_rts,
    .ch4_tx_data, .ch4_tx_rts,
    .ch1_rx_data, .ch1_rx_rts(ch1_tx_rts), .ch2_rx_data, .ch2_rx_rts(ch2_tx_rts),
    .ch3_rx_data, .ch3_rx_rts(ch3_tx_rts), .ch4_rx_data, .ch4_rx_rts(ch4_tx_rts),
    .pos_fb, .position, .cur_ref_tx, .cur_ref_rx);

  always #10 clk = ~clk;

  initial begin
    #(20 * 500 * (NCYC + 200));
    failures++;
    $display("watchdog expired");
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

  // ---------------------------------------------------------------- channels and noise
  assign ch1_rx_data = ch1_tx_data ^ flip[1];
  assign ch2_rx_data = ch2_tx_data ^ flip[2];
  assign ch3_rx_data = ch3_tx_data ^ flip[3];
  assign ch4_rx_data = ch4_tx_data ^ flip[4];

  int last_noise [5];
  int cyc = 0;
  int n_noise = 0;

  // on a frame, with probability 1/NOISE_DIV, invert one bit time of the start bit or
  // payload (bit times start 5 clocks apart after one lead bit). Bursts are kept apart by
  // more than two compensation words (ISOLATE cycles, counted over all channels): an error
  // larger than the threshold, which several bursts inside one word could build up, is by
  // design beyond repair.
  localparam int NOISE_DIV = 20;
  localparam int ISOLATE   = 18;
  int last_any = 0;
  for (genvar ch = 1; ch <= 4; ch++) begin : g_noise
    logic rts_d = 0;
    int   t = -1, b0 = 0, nb;
    wire  rts_now = (ch == 1) ? ch1_tx_rts : (ch == 2) ? ch2_tx_rts : (ch == 3) ? ch3_tx_rts : ch4_tx_rts;
    assign nb = (ch == 1 || ch == 2) ? 3 : 2;
    always @(posedge clk) begin
      rts_d <= rts_now;
      if (rts_now && !rts_d && rst_n && cyc > 20 && cyc < NCYC - 100 && cyc - last_any > ISOLATE &&
          ($urandom % NOISE_DIV) == 0) begin
        t  <= 0;
        last_any = cyc;
        b0 <= 5 * (1 + int'($urandom % nb)) + 1;
        last_noise[ch] <= cyc;
        n_noise++;
      end else if (t >= 0) begin
        t <= (t > 40) ? -1 : t + 1;
      end
      flip[ch] <= (t >= b0 && t < b0 + 5);
    end
  end

  // ---------------------------------------------------------------- plant
  real th_m = 0.0, w_m = 0.0, i_d = 0.0, i_q = 0.0;
  real th_max = 0.0;
  int  enc_cnt;
  always @(posedge clk) begin
    real va, vb, vd, vq, th_e, s, c, we, tq;
    va = E * (2.0 * real'(pwm_u) - real'(pwm_v) - real'(pwm_w)) / 3.0;
    vb = E * (real'(pwm_v) - real'(pwm_w)) / $sqrt(3.0);
    th_e = real'(PP) * th_m;
    s = $sin(th_e); c = $cos(th_e);
    vd = va * c + vb * s;
    vq = -va * s + vb * c;
    we = real'(PP) * w_m;
    i_d = i_d + DT * (vd - R * i_d + we * L * i_q) / L;
    i_q = i_q + DT * (vq - R * i_q - we * L * i_d - KT * w_m) / L;
    tq = KT * i_q;
    w_m = w_m + DT * (tq - B * w_m) / J;
    th_m = th_m + DT * w_m;
    if (th_m > th_max) th_max = th_m;
    enc_cnt = $rtoi($floor(th_m * 8192.0 / (2.0 * PI)));
    enc_a <= (enc_cnt & 3) == 1 || (enc_cnt & 3) == 2;
    enc_b <= (enc_cnt & 3) == 2 || (enc_cnt & 3) == 3;
  end

  // current converters: sample phase a and b currents on the rising conversion strobe
  function automatic logic [7:0] adc_code(real i);
    int v;
    v = $rtoi($floor(i / (2.0 / 128.0) + 0.5)) + 128;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return 8'(v);
  endfunction
  always @(posedge clk) begin
    real s, c, ial, ibe;
    cs_d <= adc_convst;
    if (adc_convst && !cs_d) begin
      s = $sin(real'(PP) * th_m); c = $cos(real'(PP) * th_m);
      ial = i_d * c - i_q * s;
      ibe = i_d * s + i_q * c;
      la <= adc_code(ial);
      lb <= adc_code(-0.5 * ial + 0.8660254 * ibe);
    end
  end
  assign adc_a_data = adc_rd ? la : 8'h00;
  assign adc_b_data = adc_rd ? lb : 8'h00;

  // ---------------------------------------------------------------- mechanism counters
  int n_code [4];
  int n_acc = 0, n_rej = 0, n_upd = 0;
  int sec_seen [8];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_servo.cyc_start) n_code[dut.u_servo.held1]++;
    if (dut.u_ctrl.cyc_start)  n_code[dut.u_ctrl.held2]++;
    n_acc += int'(dut.u_ctrl.acc3) + int'(dut.u_servo.acc4);
    n_rej += int'(dut.u_ctrl.rej3) + int'(dut.u_servo.rej4);
    if (dut.u_servo.cc_update) begin
      n_upd++;
      sec_seen[dut.u_servo.cc_sector]++;
    end
  end

  // ---------------------------------------------------------------- consistency checks
  logic signed [31:0] pos_track_prev = 0, ref_track_prev = 0;
  int n_cons = 0;
  int t95 = -1;
  initial begin
    repeat (5) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pos_ref = 1304;                        // 1 rad
    for (cyc = 0; cyc < NCYC; cyc++) begin
      // cycle starts at the clock where the timers read 0; look at tick 10
      repeat (10) @(negedge clk);
      if (cyc > 2) begin
        if (cyc - last_noise[2] > QUIET && cyc - last_noise[3] > QUIET) begin
          check(pos_fb == pos_track_prev,
                $sformatf("cycle %0d: rebuilt position %0d, sent %0d", cyc, pos_fb, pos_track_prev));
          n_cons++;
        end
        if (cyc - last_noise[1] > QUIET && cyc - last_noise[4] > QUIET) begin
          check(cur_ref_rx == ref_track_prev,
                $sformatf("cycle %0d: rebuilt reference %0d, sent %0d", cyc, cur_ref_rx, ref_track_prev));
          n_cons++;
        end
      end
      pos_track_prev = dut.u_servo.pos_track;
      if (t95 < 0 && position >= 1239) t95 = cyc;
      repeat (200) @(negedge clk);
      ref_track_prev = cur_ref_tx;
      repeat (290) @(negedge clk);
      if (cyc % 2000 == 0)
        $display("cycle %0d: position %0d counts, rebuilt %0d, current ref %0d, noise events %0d",
                 cyc, position, pos_fb, cur_ref_rx, n_noise);
    end
    $display("codes 00:%0d 01:%0d 10:%0d 11:%0d  compensation accepted %0d rejected %0d",
             n_code[0], n_code[1], n_code[2], n_code[3], n_acc, n_rej);
    $display("pwm updates %0d, sectors %0d %0d %0d %0d %0d %0d, consistency checks %0d, noise %0d",
             n_upd, sec_seen[1], sec_seen[2], sec_seen[3], sec_seen[4], sec_seen[5], sec_seen[6],
             n_cons, n_noise);
    $display("final position %0d counts (%f rad), peak %f rad, 95%% reached at %0d us",
             position, th_m, th_max, t95 * 10);
    check(n_code[1] > 0, "no up code received");
    check(n_code[3] > 0, "no down code received");
    check(n_code[0] > 0, "no zero code received");
    check(n_code[2] > 0, "no 10 pattern received");
    check(n_acc > 0, "no compensation word accepted");
    check(n_rej > 0, "no compensation word rejected");
    check(n_upd >= NCYC - 5, $sformatf("only %0d PWM updates", n_upd));
    for (int s = 1; s <= 6; s++) check(sec_seen[s] > 0, $sformatf("sector %0d never used", s));
    check(n_cons > NCYC / 2, "too few consistency checks");
    check(position > 1274 && position < 1334, $sformatf("final position %0d counts, want 1304 +- 30", position));
    check(th_max < 1.1, $sformatf("overshoot to %f rad", th_max));
    check(t95 > 0 && t95 < 35000, $sformatf("95%% of the step reached at cycle %0d", t95));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
