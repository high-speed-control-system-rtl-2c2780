// current_controller: the minor current-control loop of the servo node.
//
// Once per control cycle (`start`, every 10 us) it runs this sequence:
//   1. the two converters sample the phase currents (adc_interface, 42 clocks) while the
//      encoder count is turned into the electrical angle, which addresses the sine/cosine
//      ROM (trig_rom);
//   2. the integer axis converter rotates the currents into the d-q frame (2 clocks);
//   3. the measured currents, the reference, the angle and sine/cosine go to float
//      (int_to_fp, 1 clock) and the deadbeat unit computes the firing times and rotates
//      them into alpha-beta (18 clocks); the speed comes from speed_unit, which runs on its
//      own from the encoder counts;
//   4. svm_sector picks the sector (4 clocks) and firing_time the leg on-times (8 clocks);
//   5. pwm_gen, whose carrier is restarted by `start`, applies the on-times in the same
//      period, clamped to the room left before the centre of its window (about 348 clocks).
// From `start` to `update` takes 75 clocks, well inside the 500-clock cycle.
//
// The electrical angle in ROM steps (4096 per electrical turn) is
// count * POLE_PAIRS * 4096 / COUNTS_PER_REV, taken modulo 4096; the encoder count is
// assumed to be zero at the rotor's d-axis.
module current_controller
  import sd_pkg::*;
#(
  parameter int unsigned POLE_PAIRS     = 4,
  parameter int unsigned COUNTS_PER_REV = 8192
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,       // control cycle start
  input  logic signed [31:0] iq_ref,      // q-axis current reference, codes of 8/256 A
  input  logic signed [31:0] enc_count,   // rotor position, encoder counts
  input  logic               enc_step,    // motor counter moved (one clock)
  input  logic               enc_dir,     // its direction (1 = up)
  input  logic [7:0]         adc_a_data,
  input  logic [7:0]         adc_b_data,
  output logic               adc_convst,
  output logic               adc_rd,
  output logic               pwm_u,
  output logic               pwm_v,
  output logic               pwm_w,
  output logic               period_start,
  output logic               update,      // new on-times computed (one clock)
  output logic [2:0]         sector,
  output logic [9:0]         on_u,
  output logic [9:0]         on_v,
  output logic [9:0]         on_w
);
  localparam int unsigned ANG_SHIFT = $clog2(COUNTS_PER_REV) - 12;

  // 1. angle and current sampling
  logic [11:0]        addr;
  logic signed [31:0] ref_q;
  logic signed [9:0]  sin_t, cos_t;
  logic signed [7:0]  ia, ib;
  logic               adc_done;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr  <= '0;
      ref_q <= '0;
    end else if (start) begin
      addr  <= 12'((enc_count * $signed(32'(POLE_PAIRS))) >>> ANG_SHIFT);
      ref_q <= iq_ref;
    end
  end

  trig_rom u_rom (.clk, .addr, .sin_o(sin_t), .cos_o(cos_t));

  adc_interface u_adc (
    .clk, .rst_n, .start, .adc_a_data, .adc_b_data,
    .adc_convst, .adc_rd, .ia, .ib, .done(adc_done)
  );

  // 2. d-q currents
  logic               dq_valid;
  logic signed [21:0] id_i, iq_i;
  axis_converter u_axis (
    .clk, .rst_n, .in_valid(adc_done), .ia, .ib, .sin_t, .cos_t,
    .out_valid(dq_valid), .id(id_i), .iq(iq_i)
  );

  // 3. float conversion and deadbeat control
  fp32_t id_f, iq_f, ref_f, th_f, sin_f, cos_f, omega;
  logic  f_valid, c1, c2, c3, c4, c5, spd_upd;
  int_to_fp #(.W(22)) u_cid  (.clk, .rst_n, .in_valid(dq_valid), .x(id_i), .out_valid(f_valid), .y(id_f));
  int_to_fp #(.W(22)) u_ciq  (.clk, .rst_n, .in_valid(dq_valid), .x(iq_i), .out_valid(c1), .y(iq_f));
  int_to_fp #(.W(32)) u_cref (.clk, .rst_n, .in_valid(dq_valid), .x(ref_q), .out_valid(c2), .y(ref_f));
  int_to_fp #(.W(13)) u_cth  (.clk, .rst_n, .in_valid(dq_valid), .x({1'b0, addr}), .out_valid(c3), .y(th_f));
  int_to_fp #(.W(10)) u_csin (.clk, .rst_n, .in_valid(dq_valid), .x(sin_t), .out_valid(c4), .y(sin_f));
  int_to_fp #(.W(10)) u_ccos (.clk, .rst_n, .in_valid(dq_valid), .x(cos_t), .out_valid(c5), .y(cos_f));

  speed_unit u_speed (.clk, .rst_n, .step(enc_step), .dir(enc_dir), .omega, .updated(spd_upd));

  logic  db_done;
  fp32_t dt_a, dt_b;
  deadbeat_unit u_db (
    .clk, .rst_n, .start(f_valid), .iq_ref(ref_f), .id_m(id_f), .iq_m(iq_f),
    .theta(th_f), .omega, .sin_f, .cos_f, .done(db_done), .dt_alpha(dt_a), .dt_beta(dt_b)
  );

  // 4. sector and firing times
  logic  sec_valid;
  fp32_t a_d [4];
  fp32_t b_d [4];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_d <= '{default: '0};
      b_d <= '{default: '0};
    end else begin
      a_d[0] <= dt_a; b_d[0] <= dt_b;
      for (int i = 1; i < 4; i++) begin a_d[i] <= a_d[i-1]; b_d[i] <= b_d[i-1]; end
    end
  end

  svm_sector u_sec (.clk, .rst_n, .in_valid(db_done), .alpha(dt_a), .beta(dt_b),
                    .out_valid(sec_valid), .sector);

  firing_time u_fire (.clk, .rst_n, .in_valid(sec_valid), .sector, .alpha(a_d[3]), .beta(b_d[3]),
                      .out_valid(update), .on_u, .on_v, .on_w);

  // 5. PWM
  pwm_gen u_pwm (.clk, .rst_n, .sync(start), .load(update), .on_u, .on_v, .on_w,
                 .pwm_u, .pwm_v, .pwm_w, .period_start);

  always @(posedge clk) if (rst_n) assert ({c1, c2, c3, c4, c5} == {5{f_valid}});
endmodule
