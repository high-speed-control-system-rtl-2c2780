// tb_svm: svm_sector followed by firing_time, as in the current controller.
// Random voltage-time requests (alpha, beta); the expected sector is
// floor(atan2(beta, alpha) / 60 deg) + 1 (requests within 1e-3 rad of a sector boundary are
// not checked for the sector), and the expected leg on-times come from the vector times,
// worked out here by solving t1*Va + t2*Vb = (alpha, beta) with the two hexagon vectors that
// bound the sector (length 1 in these units, i.e. one unit is an active vector applied for
// one clock), then summing the times of the vectors that switch each leg on, rounded and clamped
// to 0..500. Tolerance 1 clock. Latencies: 4 clocks for the sector, 8 more for the on-times.
module tb_svm;
  import tb_fp_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, in_valid = 0, s_valid, f_valid;
  logic [31:0] alpha = 0, beta = 0;
  logic [31:0] a_d [4];
  logic [31:0] b_d [4];
  logic [2:0] sector;
  logic [9:0] on_u, on_v, on_w;
  int checks = 0, failures = 0;
  int sec_seen [7];

  svm_sector u_sec (.clk, .rst_n, .in_valid, .alpha, .beta, .out_valid(s_valid), .sector);
  firing_time u_ft (.clk, .rst_n, .in_valid(s_valid), .sector, .alpha(a_d[3]), .beta(b_d[3]),
                    .out_valid(f_valid), .on_u, .on_v, .on_w);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    a_d[0] <= alpha; b_d[0] <= beta;
    for (int i = 1; i < 4; i++) begin a_d[i] <= a_d[i-1]; b_d[i] <= b_d[i-1]; end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  cyc = 0;
  always @(posedge clk) cyc++;
  int  es_q[$], ts_q[$], tss_q[$];
  real eu_q[$], ev_q[$], ew_q[$];

  always @(negedge clk) if (rst_n && s_valid) begin
    int es, t0;
    es = es_q.pop_front(); t0 = tss_q.pop_front();
    checks++;
    if (cyc - t0 != 4 || (es > 0 && es != int'(sector))) begin
      failures++;
      if (failures < 10) $display("FAIL sector %0d want %0d latency %0d", sector, es, cyc - t0);
    end
    if (sector >= 1 && sector <= 6) sec_seen[sector]++;
  end

  always @(negedge clk) if (rst_n && f_valid) begin
    real eu, ev, ew;
    int t0;
    t0 = ts_q.pop_front();
    eu = eu_q.pop_front(); ev = ev_q.pop_front(); ew = ew_q.pop_front();
    checks++;
    if (cyc - t0 != 12 || real'(on_u) - eu > 1.0 || eu - real'(on_u) > 1.0 ||
        real'(on_v) - ev > 1.0 || ev - real'(on_v) > 1.0 ||
        real'(on_w) - ew > 1.0 || ew - real'(on_w) > 1.0) begin
      failures++;
      if (failures < 10) $display("FAIL on %0d %0d %0d want %f %f %f latency %0d", on_u, on_v, on_w,
                                  eu, ev, ew, cyc - t0);
    end
  end

  function automatic real clampr(real x);
    return x < 0.0 ? 0.0 : (x > 500.0 ? 500.0 : x);
  endfunction

  initial begin
    real a, b, ang, fr, t1, t2, ax, ay, bx, by, det, on [3];
    int  k, es;
    logic [2:0] va, vb;
    logic [2:0] vec [7];
    vec = '{3'b000, 3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a = real'(int'($urandom % 8001) - 4000) / 10.0;
      b = real'(int'($urandom % 8001) - 4000) / 10.0;
      if (n % 50 == 0) b = 0.0;
      ang = $atan2(b, a);
      if (ang < 0) ang += 2.0 * PI;
      k = int'($floor(ang / (PI / 3.0)));
      if (k > 5) k = 5;
      fr = ang - real'(k) * PI / 3.0;
      es = (fr < 1e-3 || PI / 3.0 - fr < 1e-3) ? 0 : k + 1;
      // vectors of sector k+1: the one at k*60 deg and the one at (k+1)*60 deg
      ax = $cos(real'(k) * PI / 3.0);       ay = $sin(real'(k) * PI / 3.0);
      bx = $cos(real'(k + 1) * PI / 3.0);   by = $sin(real'(k + 1) * PI / 3.0);
      det = ax * by - ay * bx;
      t1 = (a * by - b * bx) / det;                // time of the vector at k*60
      t2 = (ax * b - ay * a) / det;                // time of the vector at (k+1)*60
      va = vec[k + 1];
      vb = vec[(k + 1) % 6 + 1];
      for (int i = 0; i < 3; i++)
        on[i] = clampr((va[2-i] ? t1 : 0.0) + (vb[2-i] ? t2 : 0.0));
      alpha = r2fp(a); beta = r2fp(b);
      es_q.push_back(es); ts_q.push_back(cyc); tss_q.push_back(cyc);
      eu_q.push_back(on[0]); ev_q.push_back(on[1]); ew_q.push_back(on[2]);
      in_valid = 1;
      if ($urandom % 2 == 0) begin @(negedge clk) in_valid = 0; repeat ($urandom % 5) @(negedge clk); end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(negedge clk);
    // every request must have produced one sector and one set of on-times
    checks += 2;
    if (es_q.size() != 0) begin failures += es_q.size(); $display("FAIL %0d sectors missing", es_q.size()); end
    if (ts_q.size() != 0) begin failures += ts_q.size(); $display("FAIL %0d on-time sets missing", ts_q.size()); end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (sec_seen[s] == 0) begin failures++; $display("FAIL sector %0d never selected", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
