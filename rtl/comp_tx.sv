// comp_tx: transmitting end of a compensation channel.
//
// Every N sampling periods the N-bit word on `word_in` (the low bits of the value the
// sigma-delta channel is carrying) is latched in parallel; during that period and the
// N-1 following ones one bit per period is handed to the serial driver, bit 0 first.
// The receiver rebuilds the word over the same N periods and uses it to repair the
// sigma-delta channel.
//
// Interface: `sample` is the sampling strobe. One clock later `send` strobes with
// `bit_out` (bit number `bit_idx` of the current word). The parallel-to-serial conversion
// over N periods follows the described compensation channel; sending the low N bits of the
// position is this design's reading of "an n-bit parallel output signal".
module comp_tx #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample,
  input  logic [N-1:0]         word_in,
  output logic                 send,
  output logic                 bit_out,
  output logic [$clog2(N)-1:0] bit_idx
);
  localparam int unsigned IW = $clog2(N);
  logic [N-1:0]  word;
  logic [IW-1:0] idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word    <= '0;
      idx     <= '0;
      send    <= 1'b0;
      bit_out <= 1'b0;
      bit_idx <= '0;
    end else begin
      send <= sample;
      if (sample) begin
        bit_idx <= idx;
        if (idx == '0) begin
          word    <= word_in;
          bit_out <= word_in[0];
        end else begin
          bit_out <= word[idx];
        end
        idx <= (idx == IW'(N - 1)) ? '0 : idx + 1'b1;
      end
    end
  end
endmodule
