// sd_ncs_top: networked servo system with sigma-delta modulated channels.
//
// Two nodes exchange one small code per 10 us control cycle instead of full data words:
// the controller node (position loop) and the servo node (motor counter, current loop,
// PWM). Each value crosses a unidirectional serial channel as a three-level delta code
// (2 bits) and is rebuilt by an up/down counter at the far end; a one-bit-per-cycle
// compensation channel beside it carries the low COMP_BITS bits of the value, so the far
// end can repair the rebuilt value after noise has corrupted codes.
//   ch1: current reference, controller -> servo (2 bits/cycle)
//   ch2: position,          servo -> controller (2 bits/cycle)
//   ch3: position compensation,          servo -> controller (1 bit/cycle)
//   ch4: current-reference compensation, controller -> servo (1 bit/cycle)
// The wires of all four channels are brought out (tx side and rx side separately) so the
// transmission medium, with its noise, sits outside this module. The motor, inverter and
// converter chips are outside too: the encoder phases and the converter data come in, the
// converter strobes and the gate signals go out. Both nodes share clk and rst_n here; each
// has its own cycle timer.
module sd_ncs_top
  import sd_pkg::*;
#(
  parameter int unsigned CYCLE_CLKS = 500,
  parameter int unsigned OVERSAMPLE = 5,
  parameter int unsigned COMP_BITS  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [31:0] pos_ref,
  input  logic               enc_a,
  input  logic               enc_b,
  input  logic [7:0]         adc_a_data,
  input  logic [7:0]         adc_b_data,
  output logic               adc_convst,
  output logic               adc_rd,
  output logic               pwm_u,
  output logic               pwm_v,
  output logic               pwm_w,
  // channel wires as driven by the transmitters
  output logic               ch1_tx_data, ch1_tx_rts,
  output logic               ch2_tx_data, ch2_tx_rts,
  output logic               ch3_tx_data, ch3_tx_rts,
  output logic               ch4_tx_data, ch4_tx_rts,
  // channel wires as seen by the receivers
  input  logic               ch1_rx_data, ch1_rx_rts,
  input  logic               ch2_rx_data, ch2_rx_rts,
  input  logic               ch3_rx_data, ch3_rx_rts,
  input  logic               ch4_rx_data, ch4_rx_rts,
  // observation
  output logic signed [31:0] pos_fb,      // position as rebuilt by the controller node
  output logic signed [31:0] position,    // motor counter in the servo node
  output logic signed [31:0] cur_ref_tx,  // current reference as tracked by the controller node
  output logic signed [31:0] cur_ref_rx   // current reference as rebuilt by the servo node
);
  controller_node #(.CYCLE_CLKS(CYCLE_CLKS), .OVERSAMPLE(OVERSAMPLE), .COMP_BITS(COMP_BITS)) u_ctrl (
    .clk, .rst_n, .pos_ref,
    .ch1_data(ch1_tx_data), .ch1_rts(ch1_tx_rts), .ch4_data(ch4_tx_data), .ch4_rts(ch4_tx_rts),
    .ch2_data(ch2_rx_data), .ch2_rts(ch2_rx_rts), .ch3_data(ch3_rx_data), .ch3_rts(ch3_rx_rts),
    .pos_fb, .cur_ref(cur_ref_tx));

  servo_node #(.CYCLE_CLKS(CYCLE_CLKS), .OVERSAMPLE(OVERSAMPLE), .COMP_BITS(COMP_BITS)) u_servo (
    .clk, .rst_n, .enc_a, .enc_b, .adc_a_data, .adc_b_data, .adc_convst, .adc_rd,
    .pwm_u, .pwm_v, .pwm_w,
    .ch1_data(ch1_rx_data), .ch1_rts(ch1_rx_rts), .ch4_data(ch4_rx_data), .ch4_rts(ch4_rx_rts),
    .ch2_data(ch2_tx_data), .ch2_rts(ch2_tx_rts), .ch3_data(ch3_tx_data), .ch3_rts(ch3_tx_rts),
    .position, .iq_ref(cur_ref_rx));
endmodule
