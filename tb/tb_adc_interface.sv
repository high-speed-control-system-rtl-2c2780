// tb_adc_interface: drives the converter interface with random conversion results.
// A small converter model latches the data at the rising edge of the conversion strobe
// and puts it on the bus only while the read strobe is high (0 otherwise). Checks per
// conversion: the conversion strobe lasts 3 clocks, `done` comes 42 clocks after `start`,
// read happens after the conversion time, and ia/ib are the offset-binary codes as signed
// values (code - 128).
module tb_adc_interface;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] adc_a_data, adc_b_data, va = 0, vb = 0, la = 0, lb = 0;
  logic adc_convst, adc_rd, done, cs_d = 0;
  logic signed [7:0] ia, ib;
  int checks = 0, failures = 0;
  int conv_len = 0, t_rd = 0;

  adc_interface dut (.clk, .rst_n, .start, .adc_a_data, .adc_b_data, .adc_convst, .adc_rd,
                     .ia, .ib, .done);
  always #5 clk = ~clk;

  // converter model
  always @(posedge clk) begin
    cs_d <= adc_convst;
    if (adc_convst && !cs_d) begin la <= va; lb <= vb; end
    if (adc_convst) conv_len++;
  end
  assign adc_a_data = adc_rd ? la : 8'h00;
  assign adc_b_data = adc_rd ? lb : 8'h00;

  initial begin
    #2000000;
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

  initial begin
    int lat, rd_at;
    logic [7:0] ea, eb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      va = 8'($urandom); vb = 8'($urandom);
      ea = va; eb = vb;
      conv_len = 0;
      start = 1;
      @(negedge clk) start = 0;
      lat = 1; rd_at = -1;
      while (!done && lat < 200) begin
        if (adc_rd && rd_at < 0) rd_at = lat;
        if (lat == 4) begin va = 8'($urandom); vb = 8'($urandom); end  // moves after sampling
        @(negedge clk);
        lat++;
      end
      check(lat == 42, $sformatf("latency %0d", lat));
      check(conv_len == 3, $sformatf("convst %0d clocks", conv_len));
      check(rd_at >= 38, $sformatf("read at %0d", rd_at));
      check(ia == $signed(8'(ea - 8'd128)) && ib == $signed(8'(eb - 8'd128)),
            $sformatf("data %0d %0d from %0d %0d", ia, ib, ea, eb));
      repeat ($urandom % 4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
