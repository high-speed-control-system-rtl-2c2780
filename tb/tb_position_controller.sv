// tb_position_controller: runs the float controller for 2000 sampling periods against a
// double-precision model of the same difference equations (u = C x + D v,
// x += E x + B v). The reference steps between several positions and the measured
// position follows it through a first-order lag with small random disturbances. Checks
// the float output (relative 1e-3 or absolute 0.05 codes), the rounded integer code
// (within one code of the model) and the 23-clock latency from `start` to `done`.
module tb_position_controller;
  import tb_fp_pkg::*;
  localparam int NS = 4;
  localparam real E [NS][NS] = '{
    '{0.0, 0.0, 0.0, 0.0},
    '{0.0, -1.598720682e-03, 0.0, 0.0},
    '{0.0, 0.0, -1.999760013e-08, 9.998200149e-06},
    '{0.0, 0.0, -3.999280060e-03, -3.599552030e-04}};
  localparam real B [NS][2] = '{
    '{5.538745408e-07, -5.538745408e-07},
    '{2.546252847e-08, -1.288403941e-06},
    '{3.834491804e-14, 0.0},
    '{7.668523471e-09, 0.0}};
  localparam real C [NS] = '{3.2e+01, 3.2e+01, -6.499270588e+04, -2.142868646e+03};
  localparam real D [2]  = '{3.101572365e-04, -9.925031568e-03};

  logic clk = 0, rst_n = 0, start = 0, done;
  logic signed [31:0] r_cnt = 0, y_cnt = 0, u_code;
  logic [31:0] u_float;
  int checks = 0, failures = 0;
  real xm [NS];
  real xn [NS];

  position_controller dut (.clk, .rst_n, .start, .r_cnt, .y_cnt, .done, .u_code, .u_float);
  always #10 clk = ~clk;

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real um, uf, yr;
    int lat;
    for (int i = 0; i < NS; i++) xm[i] = 0.0;
    yr = 0.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      if (k % 500 == 0) r_cnt = int'($urandom % 4001) - 2000;
      yr = yr + (real'(r_cnt) - yr) * 0.01 + (real'($urandom % 5) - 2.0);
      y_cnt = int'(yr);
      // model
      um = D[0] * r_cnt + D[1] * y_cnt;
      for (int j = 0; j < NS; j++) um += C[j] * xm[j];
      for (int i = 0; i < NS; i++) begin
        xn[i] = xm[i] + B[i][0] * r_cnt + B[i][1] * y_cnt;
        for (int j = 0; j < NS; j++) xn[i] += E[i][j] * xm[j];
      end
      for (int i = 0; i < NS; i++) xm[i] = xn[i];
      // device
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done && lat < 100) begin @(negedge clk); lat++; end
      uf = fp2r(u_float);
      checks++;
      if (lat - 1 != 23) begin   // edges after the one that sampled start
        failures++;
        if (failures < 10) $display("FAIL latency %0d", lat);
      end
      checks++;
      if ((uf - um > 1e-3 * (um < 0 ? -um : um) + 0.05) || (um - uf > 1e-3 * (um < 0 ? -um : um) + 0.05)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d u=%g model=%g", k, uf, um);
      end
      checks++;
      if (real'(u_code) - um > 1.01 || um - real'(u_code) > 1.01) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d code=%0d model=%g", k, u_code, um);
      end
      if (k % 400 == 0) $display("k=%0d r=%0d y=%0d u=%g model=%g code=%0d", k, r_cnt, y_cnt, uf, um, u_code);
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
