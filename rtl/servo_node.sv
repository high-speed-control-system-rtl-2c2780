// servo_node: the local node of the networked servo, next to the motor.
//
// A cycle timer divides the clock into control cycles of CYCLE_CLKS clocks. Within a cycle:
//   clock 0  : the motor counter's position is delta-modulated; one clock later the code goes
//              out on ch2, and the ch3 compensation transmitter sends one bit of the tracked
//              position. The ch1 code received during the last cycle is applied to the
//              current-reference sigma modulator (no frame received = code 00);
//   clock 1  : the ch4 compensation receiver takes the ch4 bit of the last cycle (from the
//              second cycle after reset on) and, once
//              per COMP_BITS cycles, repairs the current reference (correction at clock 3);
//   clock 3  : the current controller starts (ADC, axis conversion, deadbeat, space-vector
//              PWM); its PWM carrier is aligned to this clock.
module servo_node
  import sd_pkg::*;
#(
  parameter int unsigned CYCLE_CLKS = 500,
  parameter int unsigned OVERSAMPLE = 5,
  parameter int unsigned COMP_BITS  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enc_a,
  input  logic               enc_b,
  input  logic [7:0]         adc_a_data,
  input  logic [7:0]         adc_b_data,
  output logic               adc_convst,
  output logic               adc_rd,
  output logic               pwm_u,
  output logic               pwm_v,
  output logic               pwm_w,
  input  logic               ch1_data,
  input  logic               ch1_rts,
  input  logic               ch4_data,
  input  logic               ch4_rts,
  output logic               ch2_data,
  output logic               ch2_rts,
  output logic               ch3_data,
  output logic               ch3_rts,
  output logic signed [31:0] position,    // motor counter
  output logic signed [31:0] iq_ref       // rebuilt current reference
);
  localparam int unsigned CW = $clog2(CYCLE_CLKS);

  logic [CW-1:0] tick;
  logic          cyc_start;
  logic [2:0]    st_d;
  logic          not_first;   // the compensation bit of cycle k is taken at cycle k+1
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tick <= '0;
      st_d <= '0;
      not_first <= 1'b0;
    end else begin
      tick <= (tick == CW'(CYCLE_CLKS - 1)) ? '0 : tick + 1'b1;
      st_d <= {st_d[1:0], cyc_start};
      if (st_d[1]) not_first <= 1'b1;
    end
  end
  assign cyc_start = rst_n && (tick == '0);

  // position measurement and ch2 / ch3 transmit side
  logic enc_step, enc_dir, enc_glitch;
  motor_counter #(.W(32)) u_cnt (.clk, .rst_n, .enc_a, .enc_b, .count(position),
                                 .step(enc_step), .dir(enc_dir), .glitch(enc_glitch));

  sd_code_e           code2;
  logic               code2_v, tx2_busy, tx3_busy, c3_send, c3_bit;
  logic signed [31:0] pos_track;
  logic [$clog2(COMP_BITS)-1:0] c3_idx;
  delta_modulator #(.W(32), .STEP(1)) u_dm_pos (
    .clk, .rst_n, .sample(cyc_start), .data_in(position), .load(1'b0), .load_value('0),
    .code(code2), .code_valid(code2_v), .track(pos_track));
  serial_tx #(.PAYLOAD(2), .OVERSAMPLE(OVERSAMPLE)) u_tx2 (
    .clk, .rst_n, .send(code2_v), .payload(code2), .data(ch2_data), .rts(ch2_rts), .busy(tx2_busy));
  comp_tx #(.N(COMP_BITS)) u_ctx3 (
    .clk, .rst_n, .sample(code2_v), .word_in(pos_track[COMP_BITS-1:0]), .send(c3_send),
    .bit_out(c3_bit), .bit_idx(c3_idx));
  serial_tx #(.PAYLOAD(1), .OVERSAMPLE(OVERSAMPLE)) u_tx3 (
    .clk, .rst_n, .send(c3_send), .payload(c3_bit), .data(ch3_data), .rts(ch3_rts), .busy(tx3_busy));

  // ch1 / ch4 receive side: current reference
  logic [1:0] rx1_code, held1;
  logic       rx1_valid, rx4_bit_v;
  logic [0:0] rx4_bit;
  serial_rx #(.PAYLOAD(2), .OVERSAMPLE(OVERSAMPLE)) u_rx1 (
    .clk, .rst_n, .data(ch1_data), .rts(ch1_rts), .payload(rx1_code), .valid(rx1_valid));
  serial_rx #(.PAYLOAD(1), .OVERSAMPLE(OVERSAMPLE)) u_rx4 (
    .clk, .rst_n, .data(ch4_data), .rts(ch4_rts), .payload(rx4_bit), .valid(rx4_bit_v));

  always_ff @(posedge clk) begin
    if (!rst_n)          held1 <= 2'b00;
    else if (rx1_valid)  held1 <= rx1_code;
    else if (cyc_start)  held1 <= 2'b00;
  end

  logic                 corr_v, acc4, rej4;
  logic signed [31:0]   corr_d;
  logic [COMP_BITS-1:0] word4;
  sigma_modulator #(.W(32), .STEP(1)) u_sig_ref (
    .clk, .rst_n, .code_valid(cyc_start), .code(held1), .corr_valid(corr_v), .corr_delta(corr_d),
    .value(iq_ref));
  comp_rx #(.N(COMP_BITS), .W(32)) u_crx4 (
    .clk, .rst_n, .bit_valid(rx4_bit_v), .bit_in(rx4_bit[0]), .sample(st_d[0] && not_first),
    .local_value(iq_ref), .corr_valid(corr_v), .corr_delta(corr_d), .word(word4),
    .accepted(acc4), .rejected(rej4));

  // current loop
  logic       cc_pstart, cc_update;
  logic [2:0] cc_sector;
  logic [9:0] cc_on_u, cc_on_v, cc_on_w;
  current_controller u_cc (
    .clk, .rst_n, .start(st_d[2]), .iq_ref, .enc_count(position), .enc_step, .enc_dir,
    .adc_a_data, .adc_b_data, .adc_convst, .adc_rd, .pwm_u, .pwm_v, .pwm_w,
    .period_start(cc_pstart), .update(cc_update), .sector(cc_sector),
    .on_u(cc_on_u), .on_v(cc_on_v), .on_w(cc_on_w));

  always @(posedge clk) if (rst_n) assert (!(code2_v && tx2_busy) && !(c3_send && tx3_busy));
endmodule
