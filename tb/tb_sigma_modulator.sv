// tb_sigma_modulator: sends random two-bit codes (including the unused 10 pattern) and
// correction strobes, and checks the rebuilt value against value += STEP * step + delta,
// with 10 read as zero. Run with STEP = 2.
module tb_sigma_modulator;
  import sd_pkg::*;
  localparam int STEP = 2;
  logic clk = 0, rst_n = 0;
  logic code_valid = 0, corr_valid = 0;
  logic [1:0] code = 0;
  logic signed [31:0] corr_delta = 0, value;
  int checks = 0, failures = 0;
  int model = 0;

  sigma_modulator #(.W(32), .STEP(STEP)) dut (.clk, .rst_n, .code_valid, .code, .corr_valid,
                                              .corr_delta, .value);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      code       = 2'($urandom);
      code_valid = ($urandom % 4) != 0;
      corr_valid = ($urandom % 10) == 0;
      corr_delta = int'($urandom % 17) - 8;
      if (code_valid) model += STEP * (code == 2'b01 ? 1 : (code == 2'b11 ? -1 : 0));
      if (corr_valid) model += corr_delta;
      @(negedge clk);
      code_valid = 0; corr_valid = 0; code = 2'b01;   // no strobe: no change
      checks++;
      if (value != model) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d value=%0d model=%0d", i, value, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
