// tb_axis_converter: random phase currents and angles. The expected d-q currents are
// computed in real arithmetic (Clarke with the exact 1/sqrt(3), Park with the same
// quantised sine/cosine the ROM would give, amplitude 511). The converter rounds i_beta to
// an integer, so the result may differ by up to 0.5 * 511 * (|sin| + |cos|) plus the
// 1/sqrt(3) constant's error; the tolerance is 1.5 * 511. Latency must be 2 clocks.
module tb_axis_converter;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] ia = 0, ib = 0;
  logic signed [9:0] sin_t = 0, cos_t = 0;
  logic signed [21:0] id, iq;
  int checks = 0, failures = 0;

  axis_converter dut (.clk, .rst_n, .in_valid, .ia, .ib, .sin_t, .cos_t, .out_valid, .id, .iq);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, al, be, ed, eq, s, c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      ia = 8'($urandom); ib = 8'($urandom);
      // keep the third phase current -(ia+ib) within the 8-bit range too
      if (int'(ia) + int'(ib) > 127 || int'(ia) + int'(ib) < -128) ib = -ib;
      ang = 2.0 * 3.14159265358979 * real'($urandom % 4096) / 4096.0;
      s = $rtoi(511.0 * $sin(ang) + ($sin(ang) >= 0 ? 0.5 : -0.5));
      c = $rtoi(511.0 * $cos(ang) + ($cos(ang) >= 0 ? 0.5 : -0.5));
      sin_t = 10'($rtoi(s)); cos_t = 10'($rtoi(c));
      in_valid = 1;
      @(negedge clk) in_valid = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL early valid"); end
      @(negedge clk);
      al = real'(ia);
      be = (real'(ia) + 2.0 * real'(ib)) / $sqrt(3.0);
      ed = al * c + be * s;
      eq = be * c - al * s;
      checks++;
      if (!out_valid || (real'(id) - ed > 766.5) || (ed - real'(id) > 766.5) ||
          (real'(iq) - eq > 766.5) || (eq - real'(iq) > 766.5)) begin
        failures++;
        if (failures < 10) $display("FAIL ia=%0d ib=%0d s=%0f c=%0f id=%0d (%f) iq=%0d (%f) v=%0b",
                                    ia, ib, s, c, id, ed, iq, eq, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
