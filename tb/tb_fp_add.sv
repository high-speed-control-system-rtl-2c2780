// tb_fp_add: random and corner-case check of the three-stage float adder/subtractor. Operands
// stream in back to back; each result must equal the exact sum or difference rounded to the
// nearest float (within half an ulp) and arrive exactly 3 clocks after its operands.
module tb_fp_add;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [31:0] a, b, y;
  logic sub = 0;
  int   qs[$];
  int checks = 0, failures = 0;
  real qa[$], qb[$];
  int  qt[$];
  int  cyc = 0;

  fp_add dut (.clk, .rst_n, .in_valid, .sub, .a, .b, .out_valid, .y);

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
    ex = qs.pop_front() ? ea - eb : ea + eb; got = fp2r(y);
    checks++;
    if (got != ex && ((got - ex > 0.5 * ulp(ex) * 1.000001) || (ex - got > 0.5 * ulp(ex) * 1.000001))) begin
      failures++;
      if (failures < 10) $display("ADD FAIL %g op %g = %g got %g", ea, eb, ex, got);
    end
    checks++;
    if (cyc - qt.pop_front() != 3) begin
      failures++;
      $display("ADD latency wrong");
    end
  end

  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = 1;
      sub = (i % 2 == 1);
      case (i)
        0: begin a = r2fp(1.5); b = r2fp(-2.0); end
        1: begin a = 32'h0; b = r2fp(3.0); end
        2: begin a = 32'h3fffffff; b = 32'h3fffffff; end
        3: begin a = r2fp(1.0); b = r2fp(1.0); end
        4: begin a = 32'h3f800001; b = 32'h3f800000; end
        default: begin
          a = rand_fp(-10, 10);
          if (i % 3 == 0) b = {a[31:23], a[22:0] ^ 23'($urandom % 64)};   // cancellation
          else            b = rand_fp(-10, 10);
        end
      endcase
      qs.push_back(int'(sub)); qa.push_back(fp2r(a)); qb.push_back(fp2r(b)); qt.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (qa.size() != 0) begin failures++; $display("missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
