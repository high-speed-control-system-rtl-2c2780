// tb_serial_link: two driver/receiver pairs (2-bit payload as on the sigma-delta channels,
// 1-bit payload as on the compensation channels) with 5x oversampling. Checks that every
// frame arrives intact, that the driver is busy for exactly (lead + start + payload) bit
// times, that the receiver delivers within its stated latency, and that a short glitch on
// the data wire while the receiver is armed is rejected as a false start bit.
module tb_serial_link;
  localparam int OS = 5;
  logic clk = 0, rst_n = 0;
  logic send2 = 0, send1 = 0;
  logic [1:0] pay2 = 0, got2;
  logic [0:0] pay1 = 0, got1;
  logic d2, r2, b2, v2, d1, r1, b1, v1;
  logic glitch = 0;
  int checks = 0, failures = 0;
  int cyc = 0, t_send = 0, busy_len = 0, frames2 = 0, frames1 = 0;

  serial_tx #(.PAYLOAD(2), .OVERSAMPLE(OS)) tx2 (.clk, .rst_n, .send(send2), .payload(pay2),
                                                 .data(d2), .rts(r2), .busy(b2));
  serial_rx #(.PAYLOAD(2), .OVERSAMPLE(OS)) rx2 (.clk, .rst_n, .data(d2 & ~glitch), .rts(r2),
                                                 .payload(got2), .valid(v2));
  serial_tx #(.PAYLOAD(1), .OVERSAMPLE(OS)) tx1 (.clk, .rst_n, .send(send1), .payload(pay1),
                                                 .data(d1), .rts(r1), .busy(b1));
  serial_rx #(.PAYLOAD(1), .OVERSAMPLE(OS)) rx1 (.clk, .rst_n, .data(d1), .rts(r1),
                                                 .payload(got1), .valid(v1));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (b2) busy_len <= busy_len + 1;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int lat;
      @(negedge clk);
      pay2 = 2'($urandom); pay1 = 1'($urandom);
      send2 = 1; send1 = 1; busy_len = 0; t_send = cyc;
      @(negedge clk);
      send2 = 0; send1 = 0;
      // a glitch of one clock on the data wire during the lead bit, on some frames
      if (i % 4 == 1) begin
        repeat (OS / 2 + 3) @(negedge clk);
        glitch = 1;
        @(negedge clk);
        glitch = 0;
      end
      fork
        begin wait (v2); end
        begin repeat (100) @(negedge clk); end
      join_any
      disable fork;
      lat = cyc - t_send;
      checks++;
      if (!v2 || got2 != pay2 || lat > (1 + 1 + 2) * OS + OS / 2 + 4) begin
        failures++;
        $display("FAIL frame %0d: valid=%b got=%b sent=%b lat=%0d", i, v2, got2, pay2, lat);
      end else frames2++;
      wait (!b1 && !b2);
      @(negedge clk);
      checks++;
      if (got1 != pay1) begin failures++; $display("FAIL 1-bit frame %0d", i); end
      else frames1++;
      checks++;
      if (busy_len != (1 + 1 + 2) * OS) begin
        failures++; $display("FAIL busy length %0d", busy_len);
      end
      repeat ($urandom % 8) @(negedge clk);
    end
    $display("frames: %0d two-bit, %0d one-bit", frames2, frames1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
