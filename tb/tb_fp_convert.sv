// tb_fp_convert: checks the integer <-> float transform units. int_to_fp must return the
// float nearest to each random integer (within half an ulp); fp_to_int must return the
// rounded integer (halves away from zero) and saturate outside the 32-bit range. Both
// results must arrive one clock after the input.
module tb_fp_convert;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic iv = 0, i2f_v, f2i_v;
  logic signed [31:0] xi, yi;
  logic [31:0] xf, yf;
  int checks = 0, failures = 0;

  int_to_fp u_i2f (.clk, .rst_n, .in_valid(iv), .x(xi), .out_valid(i2f_v), .y(yf));
  fp_to_int u_f2i (.clk, .rst_n, .in_valid(iv), .x(xf), .out_valid(f2i_v), .y(yi));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd_away(input real r);
    return (r >= 0.0) ? $floor(r + 0.5) : -$floor(-r + 0.5);
  endfunction

  initial begin
    real r, ex, got;
    xi = 0; xf = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      case (i)
        0: begin xi = 0;            xf = r2fp(2.5);   end
        1: begin xi = -1;           xf = r2fp(-2.5);  end
        2: begin xi = 32'h7fffffff; xf = r2fp(3.0e9); end
        3: begin xi = 32'h80000000; xf = r2fp(-3.0e9); end
        4: begin xi = 16777217;     xf = 32'h0;       end
        default: begin
          xi = $signed($urandom) >>> ($urandom % 31);
          xf = rand_fp(-3, 33);
        end
      endcase
      iv = 1;
      @(negedge clk);
      iv = 0;
      // int -> float
      checks++;
      ex = real'(xi); got = fp2r(yf);
      if (!i2f_v || (got != ex && ((got - ex > 0.5 * ulp(ex) * 1.000001) || (ex - got > 0.5 * ulp(ex) * 1.000001)))) begin
        failures++;
        if (failures < 10) $display("I2F FAIL %0d -> %h (%g)", xi, yf, got);
      end
      // float -> int
      checks++;
      r  = fp2r(xf);
      ex = rnd_away(r);
      if (ex > 2147483647.0) ex = 2147483647.0;
      if (ex < -2147483647.0) ex = -2147483647.0;
      if (!f2i_v || real'(yi) != ex) begin
        failures++;
        if (failures < 10) $display("F2I FAIL %h (%g) -> %0d exp %g", xf, r, yi, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
