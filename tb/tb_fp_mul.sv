// tb_fp_mul: random and corner-case check of the three-stage float multiplier. Operands
// stream in back to back; each result must equal the exact product rounded to the
// nearest float (within half an ulp) and arrive exactly 3 clocks after its operands.
module tb_fp_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  real qa[$], qb[$];
  int  qt[$];
  int  cyc = 0;

  fp_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real ea, eb, ex, got;
    ea = qa.pop_front(); eb = qb.pop_front();
    ex = ea * eb; got = fp2r(y);
    checks++;
    if ((got - ex > 0.5 * ulp(ex) * 1.000001) || (ex - got > 0.5 * ulp(ex) * 1.000001)) begin
      failures++;
      if (failures < 10) $display("MUL FAIL %g * %g = %g got %g", ea, eb, ex, got);
    end
    checks++;
    if (cyc - qt.pop_front() != 3) begin
      failures++;
      $display("MUL latency wrong");
    end
  end

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      case (i)
        0: begin a = r2fp(1.5); b = r2fp(-2.0); end
        1: begin a = 32'h0; b = r2fp(3.0); end
        2: begin a = 32'h3fffffff; b = 32'h3fffffff; end
        default: begin a = rand_fp(-30, 30); b = rand_fp(-30, 30); end
      endcase
      qa.push_back(fp2r(a)); qb.push_back(fp2r(b)); qt.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (qa.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
