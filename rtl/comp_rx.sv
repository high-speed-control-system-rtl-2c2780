// comp_rx: receiving end of a compensation channel, with the noise-compensation rule.
//
// Each received bit is held until the next local sampling strobe, where it is placed at
// the current bit position; after N strobes the N-bit word sent by the far end is
// complete. At the strobe that takes bit 0 the receiver also keeps a snapshot of the local
// sigma-modulator value, i.e. the value for the same sampling period the far end latched
// its word in. When the word completes, the signed N-bit difference d = word - snapshot
// (mod 2^N) is compared with the threshold:
//   |d| <= THRESH : the compensation word is trusted and the sigma value is moved by d,
//   |d| >  THRESH : the word itself must be corrupt, and the sigma value is kept.
// The threshold N (= the word width) is the largest change the position can make in N
// sampling periods. Between word completions the sigma-delta value is used unchanged.
//
// Interface: bit_valid/bit_in from the serial receiver; `sample` is the local strobe at
// which the bits of the previous period are taken (the far end's bit for period k is
// processed at the start of period k+1). corr_valid/corr_delta go to the sigma modulator
// one clock after the last bit is taken. `accepted` / `rejected` strobe with the decision
// when d != 0. Holding the received bit until the local strobe and correcting by the
// difference rather than overwriting the value are this design's choices.
module comp_rx #(
  parameter int unsigned N      = 8,
  parameter int unsigned W      = 32,
  parameter int unsigned THRESH = N
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bit_valid,
  input  logic                bit_in,
  input  logic                sample,
  input  logic signed [W-1:0] local_value,
  output logic                corr_valid,
  output logic signed [W-1:0] corr_delta,
  output logic [N-1:0]        word,
  output logic                accepted,
  output logic                rejected
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] idx;
  logic          pend_bit;
  logic [N-1:0]  asm_word, full_word, snap;
  logic signed [N-1:0] d;
  logic [N-1:0]  mag;

  always_comb begin
    full_word      = asm_word;
    full_word[idx] = pend_bit;
    d   = $signed(full_word - snap);
    mag = d[N-1] ? N'(-d) : N'(d);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx        <= '0;
      pend_bit   <= 1'b0;
      asm_word   <= '0;
      snap       <= '0;
      word       <= '0;
      corr_valid <= 1'b0;
      corr_delta <= '0;
      accepted   <= 1'b0;
      rejected   <= 1'b0;
    end else begin
      corr_valid <= 1'b0;
      accepted   <= 1'b0;
      rejected   <= 1'b0;
      if (bit_valid) pend_bit <= bit_in;
      if (sample) begin
        asm_word <= full_word;
        if (idx == '0) snap <= local_value[N-1:0];
        if (idx == IW'(N - 1)) begin
          word <= full_word;
          if (d != '0) begin
            if (mag <= N'(THRESH)) begin
              corr_valid <= 1'b1;
              corr_delta <= W'(d);
              accepted   <= 1'b1;
            end else begin
              rejected   <= 1'b1;
            end
          end
          idx <= '0;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
