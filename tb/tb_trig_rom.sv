// tb_trig_rom: reads every address of the sine/cosine ROM and compares both outputs with
// 511*sin and 511*cos of the angle 2*pi*(addr + 0.5)/4096, computed here in real arithmetic;
// each must be the rounded value (error at most 0.5 LSB). Also checks the one-clock read
// latency by changing the address every clock.
module tb_trig_rom;
  logic clk = 0;
  logic [11:0] addr = 0;
  logic signed [9:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  trig_rom dut (.clk, .addr, .sin_o, .cos_o);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ang, es, ec;
    int prev;
    prev = -1;
    for (int a = 0; a <= 4096; a++) begin
      @(negedge clk);
      if (prev >= 0) begin
        ang = 2.0 * 3.14159265358979 * (real'(prev) + 0.5) / 4096.0;
        es = 511.0 * $sin(ang);
        ec = 511.0 * $cos(ang);
        checks += 2;
        if ((real'(sin_o) - es > 0.5001) || (es - real'(sin_o) > 0.5001)) begin
          failures++;
          if (failures < 10) $display("FAIL sin addr=%0d got %0d want %f", prev, sin_o, es);
        end
        if ((real'(cos_o) - ec > 0.5001) || (ec - real'(cos_o) > 0.5001)) begin
          failures++;
          if (failures < 10) $display("FAIL cos addr=%0d got %0d want %f", prev, cos_o, ec);
        end
      end
      if (a < 4096) begin
        addr = 12'(a);
        prev = a;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
