// tb_pwm_gen: loads random on-times at random points of the period and checks each whole
// period: the leg is high for on_time rounded down to even clocks, the high window is
// centred (equal low time before and after it, within the 1-clock output register), a value
// loaded in the first half of the period while its leg's window is still closed takes effect
// in that period, clamped to the room left before the centre, and in full from the next period
// start, and period_start
// comes every 500 clocks. A sync pulse restarts the carrier.
module tb_pwm_gen;
  localparam int P = 500;
  logic clk = 0, rst_n = 0, sync = 0, load = 0, pwm_u, pwm_v, pwm_w, period_start;
  logic [9:0] on_u = 0, on_v = 0, on_w = 0;
  int checks = 0, failures = 0;

  pwm_gen dut (.clk, .rst_n, .sync, .load, .on_u, .on_v, .on_w, .pwm_u, .pwm_v, .pwm_w,
               .period_start);
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

  // record one period of a leg, starting at the clock after period_start
  int hi [3], first [3], last [3];
  logic [9:0] act [3];
  logic [9:0] pend [3];

  initial begin
    int load_at, since, n_now = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) sync = 1;
    @(negedge clk) sync = 0;
    act = '{default: 0};
    pend = '{default: 0};
    for (int per = 0; per < 400; per++) begin
      // wait for the period start
      since = 0;
      while (!period_start) begin @(negedge clk); since++; end
      if (per > 1) check(since == 0, $sformatf("period start late by %0d clocks", since));
      foreach (act[i]) act[i] = pend[i];
      load_at = int'($urandom % (P - 20)) + 5;
      hi = '{default: 0}; first = '{default: -1}; last = '{default: -1};
      for (int t = 0; t < P; t++) begin
        @(negedge clk);
        if (t == load_at) begin
          on_u = 10'($urandom % 501); on_v = 10'($urandom % 501); on_w = 10'($urandom % 501);
          if ($urandom % 8 == 0) on_u = 10'd500;
          if ($urandom % 8 == 0) on_v = 10'd0;
          load = 1;
          pend = '{on_u, on_v, on_w};
          // the load is seen with the carrier at t + 1
          foreach (act[i]) begin
            int cd;
            cd = 2 * (t + 1) - (P - 1);
            if (cd < 0) cd = -cd;
            if (t + 1 < P / 2 && cd >= int'(act[i])) begin
              act[i] = (int'(pend[i]) > cd) ? 10'(cd) : pend[i];
              n_now++;
            end
          end
        end else load = 0;
        foreach (hi[i]) begin
          logic b;
          b = (i == 0) ? pwm_u : (i == 1) ? pwm_v : pwm_w;
          if (b) begin hi[i]++; if (first[i] < 0) first[i] = t; last[i] = t; end
        end
        if (t == P - 2) break;
      end
      @(negedge clk);
      foreach (hi[i]) begin
        logic b;
        b = (i == 0) ? pwm_u : (i == 1) ? pwm_v : pwm_w;
        if (b) begin hi[i]++; if (first[i] < 0) first[i] = P - 1; last[i] = P - 1; end
      end
      if (per > 1) foreach (hi[i]) begin
        check(hi[i] == int'(act[i] & ~10'd1), $sformatf("leg %0d high %0d clocks, want %0d", i, hi[i], act[i] & ~10'd1));
        if (hi[i] > 0)
          check(first[i] == P - 1 - last[i], $sformatf("leg %0d window %0d..%0d not centred", i, first[i], last[i]));
      end
    end
    check(n_now > 0, "no load ever applied within its own period");
    $display("loads applied in their own period: %0d", n_now);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
