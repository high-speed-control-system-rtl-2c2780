// pwm_gen: three-phase double-edge (centre-aligned) PWM generator.
//
// A counter runs from 0 to PERIOD-1 (500 clocks = 10 us = 100 kHz at 50 MHz) and is
// restarted by `sync`, so the carrier stays aligned with the control cycle. A leg is on
// while |2 cnt - (PERIOD-1)| < on_time, i.e. in a window centred in the period, so both
// edges move and the zero vectors are split evenly at both ends. The on-time resolution is
// two clocks (an odd on_time acts as the even value below it).
// New on-times are taken on `load` into a holding register, which every free-running period
// start copies into the active values. A load in the first half of a period also acts at
// once, per leg, if that leg's window has not opened yet. It is clamped to what still fits
// before the centre (|2 cnt - (PERIOD-1)| at the load), so the period never mixes old and new
// values. `sync` (a new control period) clears the active values: the legs stay off until
// that period's load. The current loop loads 75 clocks after `sync`, so its on-times act in
// the period in which they were computed, up to about 348 clocks each. The deadbeat law
// relies on that: one period of delay would leave its closed loop with poles at the square
// root of F11, which is barely damped. The clamp acts as a voltage limit.
// `period_start` strobes at each period start.
// Dead time between the upper and lower switch is left to the gate driver chip.
module pwm_gen #(
  parameter int unsigned PERIOD = 500
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync,       // restart the carrier (control cycle start)
  input  logic       load,
  input  logic [9:0] on_u,
  input  logic [9:0] on_v,
  input  logic [9:0] on_w,
  output logic       pwm_u,
  output logic       pwm_v,
  output logic       pwm_w,
  output logic       period_start
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] cnt;
  logic [9:0]    hold_u, hold_v, hold_w, act_u, act_v, act_w;
  logic          wrap, early;

  assign wrap  = sync || (cnt == CW'(PERIOD - 1));
  assign early = cnt < CW'(PERIOD / 2);

  // on-time that still fits in the rest of the window
  function automatic logic [9:0] fit(input logic [9:0] on, input logic [CW:0] room);
    return (11'(on) > 11'(room)) ? 10'(room) : on;
  endfunction

  // distance of the next count from the centre of the period, doubled
  logic [CW:0] cdist;
  always_comb begin
    logic signed [CW+1:0] c2;
    c2   = $signed({1'b0, cnt, 1'b0}) - $signed((CW+2)'(PERIOD - 1));
    cdist = c2[CW+1] ? (CW+1)'(-c2) : c2[CW:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      hold_u <= '0; hold_v <= '0; hold_w <= '0;
      act_u  <= '0; act_v  <= '0; act_w  <= '0;
      period_start <= 1'b0;
    end else begin
      cnt <= wrap ? '0 : cnt + 1'b1;
      period_start <= wrap;
      if (load) begin hold_u <= on_u; hold_v <= on_v; hold_w <= on_w; end
      if (wrap) begin
        act_u <= load ? on_u : (sync ? '0 : hold_u);
        act_v <= load ? on_v : (sync ? '0 : hold_v);
        act_w <= load ? on_w : (sync ? '0 : hold_w);
      end else if (load && early) begin
        if (11'(cdist) >= 11'(act_u)) act_u <= fit(on_u, cdist);
        if (11'(cdist) >= 11'(act_v)) act_v <= fit(on_v, cdist);
        if (11'(cdist) >= 11'(act_w)) act_w <= fit(on_w, cdist);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pwm_u <= 1'b0; pwm_v <= 1'b0; pwm_w <= 1'b0;
    end else begin
      pwm_u <= 11'(cdist) < 11'(act_u);
      pwm_v <= 11'(cdist) < 11'(act_v);
      pwm_w <= 11'(cdist) < 11'(act_w);
    end
  end
endmodule
