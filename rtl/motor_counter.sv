// motor_counter: 4x quadrature counter for the servomotor encoder.
//
// Every clock the comparator tests whether phase a or phase b has changed since the last
// clock. A change of exactly one phase is one count; the direction unit decides up or down
// from the relation of the two phases (a leading b counts up), and the up/down counter
// moves by one. Counting every edge of both phases gives four counts per encoder line.
// A simultaneous change of both phases cannot be resolved; it is not counted and raises
// `glitch` for one clock.
//
// Interface: enc_a/enc_b are the raw encoder phases; they pass a two-flop synchroniser
// first (this design's choice, the encoder being asynchronous to the clock). `count` is the
// signed position in counts, `step` pulses for one clock on each count and `dir` gives its
// direction (1 = up). Latency from a phase edge to `count`: 3 clocks.
// The comparator / direction unit / up-down counter split follows the described unit;
// widths, reset value and the synchroniser are choices of this design.
module motor_counter #(
  parameter int unsigned W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enc_a,
  input  logic                enc_b,
  output logic signed [W-1:0] count,
  output logic                step,
  output logic                dir,
  output logic                glitch
);
  logic [1:0] sync_a, sync_b;
  logic       a_prev, b_prev;
  logic       a_cur, b_cur;
  logic       chg_a, chg_b, up, down;

  assign a_cur = sync_a[1];
  assign b_cur = sync_b[1];

  // comparator: phase changes since the previous clock
  assign chg_a = a_cur ^ a_prev;
  assign chg_b = b_cur ^ b_prev;
  // direction unit
  assign up    = (chg_a ^ chg_b) & (a_cur ^ b_prev);
  assign down  = (chg_a ^ chg_b) & (a_prev ^ b_cur);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
      a_prev <= 1'b0;
      b_prev <= 1'b0;
      count  <= '0;
      step   <= 1'b0;
      dir    <= 1'b1;
      glitch <= 1'b0;
    end else begin
      sync_a <= {sync_a[0], enc_a};
      sync_b <= {sync_b[0], enc_b};
      a_prev <= a_cur;
      b_prev <= b_cur;
      step   <= up | down;
      glitch <= chg_a & chg_b;
      if (up) begin
        count <= count + 1'b1;
        dir   <= 1'b1;
      end else if (down) begin
        count <= count - 1'b1;
        dir   <= 1'b0;
      end
    end
  end
endmodule
