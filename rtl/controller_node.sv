// controller_node: the remote node of the networked servo, which runs the position loop.
//
// A cycle timer divides the clock into control cycles of CYCLE_CLKS clocks (500 = 10 us at
// 50 MHz). Within a cycle:
//   clock 0  : the ch2 code received during the last cycle is applied to the position
//              sigma modulator (no frame received = code 00);
//   clock 1  : the ch3 compensation receiver takes the ch3 bit of the last cycle (from the
//              second cycle after reset on) and, once
//              per COMP_BITS cycles, repairs the position value (correction lands at clock 3);
//   clock 3  : the position controller starts with the reference and the rebuilt position;
//   +23      : its output (current-reference code) is delta-modulated, and the code goes out
//              on ch1; one clock later the ch4 compensation transmitter sends one bit of the
//              tracked reference.
// Received codes are held until the next cycle start, so a value that crosses the link is
// used one cycle later at the far end.
module controller_node
  import sd_pkg::*;
#(
  parameter int unsigned CYCLE_CLKS = 500,
  parameter int unsigned OVERSAMPLE = 5,
  parameter int unsigned COMP_BITS  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [31:0] pos_ref,     // position reference, encoder counts
  output logic               ch1_data,    // current reference, delta code
  output logic               ch1_rts,
  output logic               ch4_data,    // current reference, compensation bits
  output logic               ch4_rts,
  input  logic               ch2_data,    // position, delta code
  input  logic               ch2_rts,
  input  logic               ch3_data,    // position, compensation bits
  input  logic               ch3_rts,
  output logic signed [31:0] pos_fb,      // rebuilt position
  output logic signed [31:0] cur_ref      // current reference sent to the servo (tracked)
);
  localparam int unsigned CW = $clog2(CYCLE_CLKS);

  // cycle timer
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

  // ch2 / ch3 receive side: position
  logic [1:0] rx2_code, held2;
  logic       rx2_valid, rx3_bit_v;
  logic [0:0] rx3_bit;
  serial_rx #(.PAYLOAD(2), .OVERSAMPLE(OVERSAMPLE)) u_rx2 (
    .clk, .rst_n, .data(ch2_data), .rts(ch2_rts), .payload(rx2_code), .valid(rx2_valid));
  serial_rx #(.PAYLOAD(1), .OVERSAMPLE(OVERSAMPLE)) u_rx3 (
    .clk, .rst_n, .data(ch3_data), .rts(ch3_rts), .payload(rx3_bit), .valid(rx3_bit_v));

  always_ff @(posedge clk) begin
    if (!rst_n)          held2 <= 2'b00;
    else if (rx2_valid)  held2 <= rx2_code;
    else if (cyc_start)  held2 <= 2'b00;
  end

  logic                 corr_v, acc3, rej3;
  logic signed [31:0]   corr_d;
  logic [COMP_BITS-1:0] word3;
  sigma_modulator #(.W(32), .STEP(1)) u_sig_pos (
    .clk, .rst_n, .code_valid(cyc_start), .code(held2), .corr_valid(corr_v), .corr_delta(corr_d),
    .value(pos_fb));
  comp_rx #(.N(COMP_BITS), .W(32)) u_crx3 (
    .clk, .rst_n, .bit_valid(rx3_bit_v), .bit_in(rx3_bit[0]), .sample(st_d[0] && not_first),
    .local_value(pos_fb), .corr_valid(corr_v), .corr_delta(corr_d), .word(word3),
    .accepted(acc3), .rejected(rej3));

  // position controller
  logic               pc_done;
  logic signed [31:0] u_code;
  fp32_t              u_float;
  position_controller u_pc (
    .clk, .rst_n, .start(st_d[2]), .r_cnt(pos_ref), .y_cnt(pos_fb),
    .done(pc_done), .u_code, .u_float);

  // ch1 / ch4 transmit side: current reference
  sd_code_e code1;
  logic     code1_v, tx1_busy, tx4_busy, c4_send, c4_bit;
  logic [$clog2(COMP_BITS)-1:0] c4_idx;
  delta_modulator #(.W(32), .STEP(1)) u_dm_ref (
    .clk, .rst_n, .sample(pc_done), .data_in(u_code), .load(1'b0), .load_value('0),
    .code(code1), .code_valid(code1_v), .track(cur_ref));
  serial_tx #(.PAYLOAD(2), .OVERSAMPLE(OVERSAMPLE)) u_tx1 (
    .clk, .rst_n, .send(code1_v), .payload(code1), .data(ch1_data), .rts(ch1_rts), .busy(tx1_busy));
  comp_tx #(.N(COMP_BITS)) u_ctx4 (
    .clk, .rst_n, .sample(code1_v), .word_in(cur_ref[COMP_BITS-1:0]), .send(c4_send),
    .bit_out(c4_bit), .bit_idx(c4_idx));
  serial_tx #(.PAYLOAD(1), .OVERSAMPLE(OVERSAMPLE)) u_tx4 (
    .clk, .rst_n, .send(c4_send), .payload(c4_bit), .data(ch4_data), .rts(ch4_rts), .busy(tx4_busy));

  // a new frame is never requested while the previous one is still on the wire
  always @(posedge clk) if (rst_n) assert (!(code1_v && tx1_busy) && !(c4_send && tx4_busy));
endmodule
