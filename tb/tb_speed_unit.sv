// tb_speed_unit: feeds encoder counts at a constant interval n (random per run, both
// directions) and checks omega = +-2*pi/(8192 n 20 ns) to a relative error of 1e-6, that
// the result is refreshed within 40 clocks of a count, and that the speed drops to zero
// once no count has come for N_MAX clocks (N_MAX reduced to keep the run short).
module tb_speed_unit;
  import tb_fp_pkg::*;
  localparam int NMAX = 20000;
  logic clk = 0, rst_n = 0, step = 0, dir = 0, updated;
  logic [31:0] omega;
  int checks = 0, failures = 0;

  speed_unit #(.N_MAX(NMAX)) dut (.clk, .rst_n, .step, .dir, .omega, .updated);
  always #5 clk = ~clk;

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

  initial begin
    int n, lat;
    real w, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      n = 40 + int'($urandom % 15000);
      dir = $urandom % 2;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk) step = 1;
        @(negedge clk) step = 0;
        lat = 1;
        if (k >= 1) begin
          while (!updated && lat < 60) begin @(negedge clk); lat++; end
          w = fp2r(omega);
          e = 2.0 * 3.14159265358979 / (8192.0 * real'(n) * 20.0e-9) * (dir ? 1.0 : -1.0);
          check(lat <= 40, $sformatf("refresh after %0d clocks", lat));
          check((w - e) / e < 1e-6 && (e - w) / e < 1e-6 && (w * e > 0),
                $sformatf("n=%0d dir=%0d omega=%g want %g", n, dir, w, e));
        end
        repeat (n - 1 - lat) @(negedge clk);
      end
      if (run % 10 == 9) begin
        repeat (NMAX + 10) @(negedge clk);
        check(omega[30:0] == '0, "standstill not detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
