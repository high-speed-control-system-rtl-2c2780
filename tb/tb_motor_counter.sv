// tb_motor_counter: drives a quadrature encoder model forward and backward at random
// speeds and checks the count against the number of phase edges the model produced
// (4 counts per line), the step pulse count, the direction flag, and that a simultaneous
// change of both phases is flagged and not counted.
module tb_motor_counter;
  logic clk = 0, rst_n = 0;
  logic enc_a = 0, enc_b = 0;
  logic signed [31:0] count;
  logic step, dir, glitch;
  int checks = 0, failures = 0;
  int model_pos = 0, steps_seen = 0, glitches = 0;

  motor_counter dut (.clk, .rst_n, .enc_a, .enc_b, .count, .step, .dir, .glitch);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (step) steps_seen++;
    if (glitch) glitches++;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one encoder edge; phase order a-leads-b is "up"
  task automatic move(input bit up_dir, input int hold);
    logic [1:0] s, n;
    s = {enc_a, enc_b};
    case (s)
      2'b00: n = up_dir ? 2'b10 : 2'b01;
      2'b10: n = up_dir ? 2'b11 : 2'b00;
      2'b11: n = up_dir ? 2'b01 : 2'b10;
      default: n = up_dir ? 2'b00 : 2'b11;   // 2'b01
    endcase
    @(negedge clk);
    {enc_a, enc_b} = n;
    model_pos += up_dir ? 1 : -1;
    repeat (hold) @(negedge clk);
  endtask

  task automatic check_pos(input string what);
    repeat (5) @(negedge clk);
    checks++;
    if (count != model_pos) begin
      failures++;
      $display("FAIL %s: count %0d model %0d", what, count, model_pos);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 400; i++) move(1, 1 + ($urandom % 4));
    check_pos("forward");
    checks++; if (dir !== 1'b1) begin failures++; $display("FAIL dir up"); end
    for (int i = 0; i < 1000; i++) move(0, 1 + ($urandom % 3));
    check_pos("backward");
    checks++; if (dir !== 1'b0) begin failures++; $display("FAIL dir down"); end
    for (int i = 0; i < 500; i++) move(($urandom % 3) != 0, 1 + ($urandom % 5));
    check_pos("random walk");
    checks++;
    if (steps_seen != 1900) begin failures++; $display("FAIL steps %0d", steps_seen); end
    // both phases at once: not counted, flagged
    @(negedge clk) {enc_a, enc_b} = ~{enc_a, enc_b};
    repeat (6) @(negedge clk);
    checks++;
    if (glitches != 1 || count != model_pos) begin
      failures++; $display("FAIL glitch handling %0d", glitches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
