// tb_delta_modulator: feeds random input walks (steps of 0, 1 or several quanta per
// sample) and checks each two-bit code and the held value against a reference model of
// the three-level quantiser: +1 (01) when the input exceeds the held value by at least a
// quantum, -1 (11) when it is below by at least a quantum, 0 (00) otherwise. Also checks
// the one-clock code latency and the load input. Run with STEP = 3.
module tb_delta_modulator;
  import sd_pkg::*;
  localparam int STEP = 3;
  logic clk = 0, rst_n = 0;
  logic sample = 0, load = 0, code_valid;
  logic signed [31:0] data_in = 0, load_value = 0, track;
  sd_code_e code;
  int checks = 0, failures = 0;
  int ref_track = 0, n_up = 0, n_dn = 0, n_zero = 0;

  delta_modulator #(.W(32), .STEP(STEP)) dut (.clk, .rst_n, .sample, .data_in, .load,
                                              .load_value, .code, .code_valid, .track);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] exp_code;
    int d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      case ($urandom % 6)
        0, 1: ;
        2: data_in = data_in + 1;
        3: data_in = data_in - 1;
        4: data_in = data_in + int'($urandom % 10);
        default: data_in = data_in - int'($urandom % 10);
      endcase
      sample = 1;
      d = data_in - ref_track;
      if (d >= STEP)       begin exp_code = 2'b01; ref_track += STEP; n_up++; end
      else if (d <= -STEP) begin exp_code = 2'b11; ref_track -= STEP; n_dn++; end
      else                 begin exp_code = 2'b00; n_zero++; end
      @(negedge clk);
      sample = 0;
      checks++;
      if (!code_valid || code != exp_code || track != ref_track) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d in=%0d code=%b exp=%b track=%0d ref=%0d",
                                    i, data_in, code, exp_code, track, ref_track);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    // load
    @(negedge clk); load = 1; load_value = 1234; ref_track = 1234;
    @(negedge clk); load = 0;
    checks++;
    if (track != 1234) begin failures++; $display("FAIL load"); end
    checks++;
    if (n_up == 0 || n_dn == 0 || n_zero == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
