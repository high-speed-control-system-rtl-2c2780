// serial_tx: driver of one unidirectional serial channel (parallel-to-serial converter).
//
// A channel has two wires: `data` and the request-to-send line `rts`. When `send` strobes,
// the driver raises `rts`, waits LEAD_BITS bit times so that the receiver can arm, then
// sends a start bit (0) followed by the PAYLOAD bits, least significant first, and drops
// `rts`. The data wire idles at 1. Each bit lasts OVERSAMPLE clocks, so the receiver can
// sample it several times and read it in its middle.
//
// Timing: the frame occupies (LEAD_BITS + 1 + PAYLOAD) * OVERSAMPLE clocks after `send`;
// `busy` is high for that time and a `send` while busy is ignored. The RTS + start bit +
// data format and the oversampling follow the described interface; the polarity of RTS,
// the idle level, the bit order and the lead time are this design's choices.
module serial_tx #(
  parameter int unsigned PAYLOAD    = 2,
  parameter int unsigned OVERSAMPLE = 5,
  parameter int unsigned LEAD_BITS  = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               send,
  input  logic [PAYLOAD-1:0] payload,
  output logic               data,
  output logic               rts,
  output logic               busy
);
  localparam int unsigned NBITS = LEAD_BITS + 1 + PAYLOAD;
  localparam int unsigned BW    = $clog2(NBITS + 1);
  localparam int unsigned OW    = $clog2(OVERSAMPLE + 1);

  // shift register: lead (1s), start bit (0), payload
  logic [NBITS-1:0] shreg;
  logic [BW-1:0]    bits_left;
  logic [OW-1:0]    os_cnt;

  assign busy = (bits_left != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      os_cnt    <= '0;
      data      <= 1'b1;
      rts       <= 1'b0;
    end else if (!busy) begin
      data <= 1'b1;
      rts  <= 1'b0;
      if (send) begin
        shreg     <= {payload, 1'b0, {LEAD_BITS{1'b1}}};
        bits_left <= BW'(NBITS);
        os_cnt    <= '0;
      end
    end else begin
      rts  <= 1'b1;
      data <= shreg[0];
      if (os_cnt == OW'(OVERSAMPLE - 1)) begin
        os_cnt    <= '0;
        shreg     <= {1'b1, shreg[NBITS-1:1]};
        bits_left <= bits_left - 1'b1;
      end else begin
        os_cnt <= os_cnt + 1'b1;
      end
    end
  end
endmodule
