// tb_comp_channel: the compensation channel (comp_tx -> comp_rx) repairing a sigma-delta
// channel. A transmitter value walks by -1/0/+1 per sampling period; the receiving sigma
// modulator gets the same codes, but some codes are corrupted on the way. Every N = 8
// periods the compensation word is rebuilt and compared with the receiver's value of the
// same period. A reference model of the restore rule (accept and correct when the
// difference is within +-8, keep the value otherwise) predicts the receiver's error each
// period; some compensation bits are flipped too, so that both outcomes occur.
module tb_comp_channel;
  import sd_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic tx_sample = 0, rx_sample = 0, send, bit_out, code_valid = 0;
  logic [$clog2(N)-1:0] bit_idx;
  logic [1:0] code = 0;
  logic [N-1:0] word_in = 0, word;
  logic corr_valid, accepted, rejected, flip = 0;
  logic signed [31:0] corr_delta, rx_val;
  int checks = 0, failures = 0;
  int tx_val = 0, err = 0, err_snap = 0, n_acc = 0, n_rej = 0, m_acc = 0, m_rej = 0;
  logic [N-1:0] sent_word = 0, recv_word = 0;

  comp_tx #(.N(N)) u_tx (.clk, .rst_n, .sample(tx_sample), .word_in, .send, .bit_out, .bit_idx);
  comp_rx #(.N(N), .W(32)) u_rx (.clk, .rst_n, .bit_valid(send), .bit_in(bit_out ^ flip),
                                 .sample(rx_sample), .local_value(rx_val), .corr_valid,
                                 .corr_delta, .word, .accepted, .rejected);
  sigma_modulator #(.W(32)) u_sig (.clk, .rst_n, .code_valid, .code, .corr_valid, .corr_delta,
                                   .value(rx_val));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && accepted) n_acc++;
    if (rst_n && rejected) n_rej++;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int stp, rstp, k, d;
    logic [N-1:0] dw;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (k = 0; k < 4000; k++) begin
      // 1. receiver takes the bit of the previous period (none before the first period)
      if (k > 0) begin
        @(negedge clk) rx_sample = 1;
        @(negedge clk) rx_sample = 0;
        if ((k - 1) % N == 0) err_snap = err;
        if ((k - 1) % N == N - 1) begin
          dw = recv_word - sent_word;
          d  = int'($signed(dw));
          d  = d - err_snap;             // = (received word - snapshot) mod 2^N, signed
          dw = N'(d);
          d  = int'($signed(dw));
          if (d != 0) begin
            if (d <= N && d >= -N) begin err = err + d; m_acc++; end
            else m_rej++;
          end
        end
        @(negedge clk);
        checks++;
        if (rx_val - tx_val != err) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d rx=%0d tx=%0d model err=%0d", k, rx_val, tx_val, err);
        end
      end
      // 2. a new sample: transmitter moves, code travels (sometimes corrupted)
      stp = int'($urandom % 3) - 1;
      tx_val += stp;
      rstp = stp;
      if ($urandom % 100 < 4) rstp = int'($urandom % 3) - 1;
      err += rstp - stp;
      @(negedge clk);
      code = (rstp == 1) ? 2'b01 : (rstp == -1 ? 2'b11 : 2'b00);
      code_valid = 1;
      @(negedge clk) code_valid = 0;
      // 3. the compensation transmitter sends one bit of the current word
      word_in = N'(tx_val);
      if (k % N == 0) begin sent_word = N'(tx_val); recv_word = N'(tx_val); end
      flip = ($urandom % 100) < 3;
      if (flip) recv_word[k % N] = ~recv_word[k % N];
      @(negedge clk) tx_sample = 1;
      @(negedge clk) tx_sample = 0;
      repeat (3) @(negedge clk);
      flip = 0;
    end
    checks++;
    if (n_acc != m_acc || n_rej != m_rej || n_acc == 0 || n_rej == 0) begin
      failures++;
      $display("FAIL decisions: accepted %0d (model %0d) rejected %0d (model %0d)", n_acc, m_acc, n_rej, m_rej);
    end
    $display("accepted %0d rejected %0d", n_acc, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
