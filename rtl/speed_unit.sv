// speed_unit: motor speed from the time between encoder counts, omega = 2*pi / (P n T).
//
// A counter measures n, the number of clocks (period T) between neighbouring counts of the
// motor counter (P counts per revolution). At each count the last n is converted to float
// and the float divisor forms K / n with K = 2*pi/(P T); the direction from the motor
// counter sets the sign. The comparator on the counter also handles standstill: when no
// count has come for N_MAX clocks the speed is set to zero. The result (rad/s, mechanical)
// is refreshed once per count, about 31 clocks after it; between refreshes it holds.
// Counts that arrive while a division is running only restart the interval measurement.
// Defaults: P = 8192 counts/rev (the pi/4096 rad position quantum), T = 20 ns (50 MHz).
module speed_unit
  import sd_pkg::*;
#(
  parameter real         COUNTS_PER_REV = 8192.0,
  parameter real         CLK_PERIOD     = 20.0e-9,
  parameter int unsigned N_MAX          = 1_000_000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  step,
  input  logic  dir,
  output fp32_t omega,
  output logic  updated
);
  localparam fp32_t K_OMEGA = real_to_fp(2.0 * 3.14159265358979 / (COUNTS_PER_REV * CLK_PERIOD));

  logic [31:0] n, n_lat;
  logic        cv_go, cv_v, div_done, div_busy, dir_lat, seen;
  fp32_t       n_f, q;

  int_to_fp u_cv (.clk, .rst_n, .in_valid(cv_go), .x(n_lat), .out_valid(cv_v), .y(n_f));
  fp_div    u_dv (.clk, .rst_n, .start(cv_v), .a(K_OMEGA), .b(n_f), .done(div_done), .y(q));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n <= '0; n_lat <= 32'd1; cv_go <= 1'b0; div_busy <= 1'b0; dir_lat <= 1'b1;
      seen <= 1'b0; omega <= '0; updated <= 1'b0;
    end else begin
      cv_go   <= 1'b0;
      updated <= 1'b0;
      if (step) begin
        n <= 32'd1;
        // the first count after standstill has no valid interval
        if (seen && !div_busy && n < N_MAX) begin
          n_lat    <= n;
          dir_lat  <= dir;
          cv_go    <= 1'b1;
          div_busy <= 1'b1;
        end
        seen <= 1'b1;
      end else if (n < N_MAX) begin
        n <= n + 1'b1;
      end else begin
        seen  <= 1'b0;
        if (!div_busy && omega != '0) begin
          omega   <= '0;
          updated <= 1'b1;
        end
      end
      if (div_done) begin
        div_busy <= 1'b0;
        omega    <= {~dir_lat, q[30:0]};
        updated  <= 1'b1;
      end
    end
  end
endmodule
